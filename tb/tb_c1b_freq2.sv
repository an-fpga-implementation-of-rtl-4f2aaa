// Test of C1b: the duplicated count tables are filled with frequencies
// (many symbols absent, several sharing a frequency, consecutive symbols
// with equal frequency so the forwarding paths are used) and F2 is zeroed.
// F2 must then count how many symbols have each non-zero frequency, and the
// recorded number of symbols, largest frequency and largest symbol must be
// right. The pass must take NSYM + 4 cycles.
module tb_c1b_freq2;
  localparam int NSAMP = 2048, SW = 8, FW = 12;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic start = 0, done, f2_we;
  logic [SW-1:0] fa_raddr, max_sym;
  logic [FW-1:0] fa0_rdata, fa1_rdata, f2_raddr, f2_rdata, f2_waddr, f2_wdata, max_f;
  logic [SW:0] n_nz;
  c1b_freq2 #(.NSAMP(NSAMP), .SYM_W(SW), .FW(FW)) dut (.*);
  sdp_ram #(.AW(SW), .DW(FW)) u_fa0 (.clk, .raddr(fa_raddr), .rdata(fa0_rdata), .we(1'b0), .waddr('0), .wdata('0));
  sdp_ram #(.AW(SW), .DW(FW)) u_fa1 (.clk, .raddr(fa_raddr), .rdata(fa1_rdata), .we(1'b0), .waddr('0), .wdata('0));
  sdp_ram #(.AW(FW), .DW(FW)) u_f2 (.clk, .raddr(f2_raddr), .rdata(f2_rdata), .we(f2_we), .waddr(f2_waddr), .wdata(f2_wdata));

  int checks = 0, failures = 0, cyc = 0, f2 [4096], nz = 0, mf = 0, ms = 0;
  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  task automatic chk(bit ok, string m);
    checks++; if (!ok) begin failures++; $display("FAIL %s", m); end
  endtask
  initial begin
    // preload only after reset has cleared the pipelines' write enables
    repeat (2) @(posedge clk); rst_n = 1;
    for (int a = 0; a < 4096; a++) begin u_f2.mem[a] = '0; f2[a] = 0; end
    for (int s = 0; s < 256; s++) begin
      int a, b;
      a = (s < 40) ? 3 : ((s % 3 == 0 && s < 230) ? int'($urandom_range(20)) : 0);
      b = (s < 40) ? 1 : ((s % 5 == 0 && s < 230) ? int'($urandom_range(20)) : 0);
      u_fa0.mem[s] = FW'(a); u_fa1.mem[s] = FW'(b);
      if (a + b > 0) begin f2[a+b]++; nz++; ms = s; if (a + b > mf) mf = a + b; end
    end
    @(negedge clk); start = 1; @(negedge clk); start = 0;
    cyc = 1;
    while (!done) begin @(negedge clk); cyc++; end
    chk(cyc == 256 + 4, $sformatf("%0d cycles", cyc));
    chk(int'(n_nz) == nz, $sformatf("n %0d vs %0d", n_nz, nz));
    chk(int'(max_f) == mf, $sformatf("max_f %0d vs %0d", max_f, mf));
    chk(int'(max_sym) == ms, $sformatf("max_sym %0d vs %0d", max_sym, ms));
    for (int a = 1; a <= 64; a++) chk(int'(u_f2.mem[a]) == f2[a], $sformatf("F2[%0d] %0d vs %0d", a, u_f2.mem[a], f2[a]));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
