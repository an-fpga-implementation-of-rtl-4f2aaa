// Test of C1c: F2 is loaded with symbol counts per frequency and the block
// must replace each entry v = 1..max_f by 1 + (number of symbols with a
// frequency above v). Entries above max_f must stay untouched, and the pass
// must take max_f + 2 cycles.
module tb_c1c_bucket;
  localparam int NSAMP = 2048, FW = 12, MAXF = 300;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic start = 0, done, f2_we;
  logic [FW-1:0] max_f, f2_raddr, f2_rdata, f2_waddr, f2_wdata;
  c1c_bucket #(.NSAMP(NSAMP), .FW(FW)) dut (.*);
  sdp_ram #(.AW(FW), .DW(FW)) u_f2 (.clk, .raddr(f2_raddr), .rdata(f2_rdata), .we(f2_we), .waddr(f2_waddr), .wdata(f2_wdata));

  int checks = 0, failures = 0, cyc = 0, cnt [MAXF+2], expv [MAXF+2];
  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    int above;
    // preload only after reset has cleared the pipelines' write enables
    repeat (2) @(posedge clk); rst_n = 1;
    for (int v = 0; v <= MAXF + 1; v++) begin
      cnt[v] = (v % 7 == 0 || v == MAXF) ? int'($urandom_range(3)) + (v == MAXF) : 0;
      u_f2.mem[v] = FW'(cnt[v]);
    end
    u_f2.mem[MAXF+1] = 12'h5A5;
    above = 0;
    for (int v = MAXF; v >= 1; v--) begin expv[v] = above + 1; above += cnt[v]; end
    max_f = FW'(MAXF);
    @(negedge clk); start = 1; @(negedge clk); start = 0;
    cyc = 1;
    while (!done) begin @(negedge clk); cyc++; end
    checks++;
    if (cyc != MAXF + 2) begin failures++; $display("FAIL: %0d cycles", cyc); end
    for (int v = 1; v <= MAXF; v++) begin
      checks++;
      if (int'(u_f2.mem[v]) != expv[v]) begin failures++; $display("FAIL F2[%0d] %0d vs %0d", v, u_f2.mem[v], expv[v]); end
    end
    checks++;
    if (u_f2.mem[MAXF+1] != 12'h5A5) begin failures++; $display("FAIL: entry above max_f written"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
