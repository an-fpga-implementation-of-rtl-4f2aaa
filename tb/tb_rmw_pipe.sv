// Test of the forwarding read-modify-write pipeline: a stream of addresses
// from a small range (so that equal addresses one and two apart are common)
// is counted into a RAM at one per cycle. The final table must equal the
// counts, the W-stage view must show the correct old value for every
// iteration, and n iterations must be written back n+2 cycles after the
// first enters.
module tb_rmw_pipe;
  localparam int AW = 3, DW = 12, N = 300;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic in_valid = 0;
  logic [AW-1:0] in_addr = '0, raddr, waddr, w_addr;
  logic [DW-1:0] rdata, wdata, w_old;
  logic [8:0] in_tag = '0, w_tag;
  logic we, w_valid;
  rmw_pipe #(.AW(AW), .DW(DW), .TW(9)) dut (.*);
  sdp_ram #(.AW(AW), .DW(DW)) u_ram (.clk, .raddr, .rdata, .we, .waddr, .wdata);

  int checks = 0, failures = 0;
  int cnt [2**AW];
  int seq [N];
  int oldv [N];
  
  initial begin
    repeat (5000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  always @(posedge clk) if (w_valid) begin
    checks++;
    if (int'(w_old) != oldv[w_tag] || int'(w_addr) != seq[w_tag]) begin
      failures++; $display("FAIL iter %0d old %0d vs %0d", w_tag, w_old, oldv[w_tag]);
    end
  end
  int active = 0;
  // stages D/M and W are busy for N+1 cycles; with the A cycle, N+2
  always @(negedge clk) if (dut.d_valid || w_valid) active++;
  initial begin
    for (int a = 0; a < 2**AW; a++) begin u_ram.mem[a] = '0; cnt[a] = 0; end
    for (int i = 0; i < N; i++) begin
      seq[i] = (i % 50 < 10) ? 3 : $urandom_range(2**AW - 1);
      oldv[i] = cnt[seq[i]];
      cnt[seq[i]]++;
    end
    repeat (2) @(posedge clk); rst_n = 1;
    @(negedge clk);
    for (int i = 0; i < N; i++) begin
      in_valid = 1; in_addr = AW'(seq[i]); in_tag = 9'(i);
      @(negedge clk);
    end
    in_valid = 0;
    repeat (4) @(negedge clk);
    for (int a = 0; a < 2**AW; a++) begin
      checks++;
      if (int'(u_ram.mem[a]) != cnt[a]) begin failures++; $display("FAIL count[%0d] %0d vs %0d", a, u_ram.mem[a], cnt[a]); end
    end
    checks++;
    if (active + 1 != N + 2) begin failures++; $display("FAIL: %0d cycles for %0d iterations", active + 1, N); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
