// Test of the single-table C1a: the two symbol memories are filled with a
// skewed symbol mix (runs of one symbol, and two symbols alternating, so
// that both forwarding paths of the pipeline are used), the count table is
// zeroed, and the block is run. FA must hold the counts of all NSAMP
// symbols, both forwarding paths must have been taken, and the pass must
// take NSAMP + 4 cycles from the start pulse to the done pulse.
module tb_c1a_count1;
  localparam int NSAMP = 2048, SW = 8, FW = 12, MA = 10;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic start = 0, done;
  logic [MA-1:0] m_raddr;
  logic [SW-1:0] m0_rdata, m1_rdata, fa_raddr, fa_waddr;
  logic [FW-1:0] fa_rdata, fa_wdata;
  logic fa_we;
  c1a_count1 #(.NSAMP(NSAMP), .SYM_W(SW), .FW(FW)) dut (.*);
  sdp_ram #(.AW(MA), .DW(SW)) u_m0 (.clk, .raddr(m_raddr), .rdata(m0_rdata), .we(1'b0), .waddr('0), .wdata('0));
  sdp_ram #(.AW(MA), .DW(SW)) u_m1 (.clk, .raddr(m_raddr), .rdata(m1_rdata), .we(1'b0), .waddr('0), .wdata('0));
  sdp_ram #(.AW(SW), .DW(FW)) u_fa (.clk, .raddr(fa_raddr), .rdata(fa_rdata), .we(fa_we), .waddr(fa_waddr), .wdata(fa_wdata));

  int checks = 0, failures = 0, c [256], cyc = 0, fwd_w = 0, fwd_x = 0;
  always @(posedge clk) if (rst_n && dut.u_p.d_valid) begin
    if (dut.u_p.w_valid && dut.u_p.w_addr == dut.u_p.d_addr) fwd_w++;
    else if (dut.u_p.x_valid && dut.u_p.x_addr == dut.u_p.d_addr) fwd_x++;
  end
  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    // preload only after reset has cleared the pipeline's write enable
    repeat (2) @(posedge clk); rst_n = 1;
    for (int s = 0; s < 256; s++) begin c[s] = 0; u_fa.mem[s] = '0; end
    for (int j = 0; j < NSAMP/2; j++) begin
      int a, b;
      a = (j % 64 < 20) ? 5 : ((j % 64 < 30) ? 7 : int'($urandom_range(255)));
      b = (j % 64 < 20) ? 5 : ((j % 64 < 30) ? 9 : int'($urandom_range(3)));
      u_m0.mem[j] = SW'(a); u_m1.mem[j] = SW'(b); c[a]++; c[b]++;
    end
    @(negedge clk); start = 1; @(negedge clk); start = 0;
    cyc = 1;
    while (!done) begin @(negedge clk); cyc++; end
    checks++;
    if (cyc != NSAMP + 4) begin failures++; $display("FAIL: %0d cycles", cyc); end
    for (int s = 0; s < 256; s++) begin
      checks++;
      if (int'(u_fa.mem[s]) != c[s]) begin failures++; $display("FAIL FA[%0d] %0d vs %0d", s, u_fa.mem[s], c[s]); end
    end
    checks++;
    if (fwd_w == 0 || fwd_x == 0) begin failures++; $display("FAIL forwarding not used: %0d %0d", fwd_w, fwd_x); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
