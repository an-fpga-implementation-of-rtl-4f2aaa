// Test of C1a: the two symbol memories are filled with a skewed symbol mix
// (long runs of one symbol, so both forwarding paths are used), the count
// tables are zeroed, and the block is run. FA0 must hold the counts of
// mem0's symbols, FA1 those of mem1's, and the whole pass must take
// NSAMP/2 + 4 cycles from the start pulse to the done pulse.
module tb_c1a_count;
  localparam int NSAMP = 2048, SW = 8, FW = 12, MA = 10;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic start = 0, done;
  logic [MA-1:0] m_raddr;
  logic [SW-1:0] m0_rdata, m1_rdata, fa0_raddr, fa0_waddr, fa1_raddr, fa1_waddr;
  logic [FW-1:0] fa0_rdata, fa0_wdata, fa1_rdata, fa1_wdata;
  logic fa0_we, fa1_we;
  c1a_count #(.NSAMP(NSAMP), .SYM_W(SW), .FW(FW)) dut (.*);
  sdp_ram #(.AW(MA), .DW(SW)) u_m0 (.clk, .raddr(m_raddr), .rdata(m0_rdata), .we(1'b0), .waddr('0), .wdata('0));
  sdp_ram #(.AW(MA), .DW(SW)) u_m1 (.clk, .raddr(m_raddr), .rdata(m1_rdata), .we(1'b0), .waddr('0), .wdata('0));
  sdp_ram #(.AW(SW), .DW(FW)) u_fa0 (.clk, .raddr(fa0_raddr), .rdata(fa0_rdata), .we(fa0_we), .waddr(fa0_waddr), .wdata(fa0_wdata));
  sdp_ram #(.AW(SW), .DW(FW)) u_fa1 (.clk, .raddr(fa1_raddr), .rdata(fa1_rdata), .we(fa1_we), .waddr(fa1_waddr), .wdata(fa1_wdata));

  int checks = 0, failures = 0, c0 [256], c1 [256], cyc = 0;
  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    // preload only after reset has cleared the pipelines' write enables
    repeat (2) @(posedge clk); rst_n = 1;
    for (int s = 0; s < 256; s++) begin c0[s] = 0; c1[s] = 0; u_fa0.mem[s] = '0; u_fa1.mem[s] = '0; end
    for (int j = 0; j < NSAMP/2; j++) begin
      int a, b;
      a = (j % 64 < 20) ? 5 : ((j % 64 < 30) ? (j % 2) * 9 : int'($urandom_range(255)));
      b = (j % 64 < 20) ? 5 : int'($urandom_range(3));
      u_m0.mem[j] = SW'(a); u_m1.mem[j] = SW'(b); c0[a]++; c1[b]++;
    end
    @(negedge clk); start = 1; @(negedge clk); start = 0;
    cyc = 1;
    while (!done) begin @(negedge clk); cyc++; end
    checks++;
    if (cyc != NSAMP/2 + 4) begin failures++; $display("FAIL: %0d cycles", cyc); end
    for (int s = 0; s < 256; s++) begin
      checks += 2;
      if (int'(u_fa0.mem[s]) != c0[s]) begin failures++; $display("FAIL FA0[%0d] %0d vs %0d", s, u_fa0.mem[s], c0[s]); end
      if (int'(u_fa1.mem[s]) != c1[s]) begin failures++; $display("FAIL FA1[%0d] %0d vs %0d", s, u_fa1.mem[s], c1[s]); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
