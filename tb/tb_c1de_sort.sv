// Test of the merged C1d/C1e pass: count tables with ties (runs of
// consecutive symbols with the same frequency, which use both forwarding
// paths) and absent symbols, F2 holding the 1-based bucket starts. Idx must
// list the symbols by non-increasing frequency, equal frequencies in
// ascending symbol order, Fs their frequencies, F2 the advanced pointers,
// and the pass must take max_sym + 5 cycles.
module tb_c1de_sort;
  localparam int NSAMP = 2048, SW = 8, FW = 12;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic start = 0, done, f2_we, idx_we, fs_we;
  logic [SW-1:0] max_sym, fa_raddr, idx_waddr, idx_wdata, fs_waddr;
  logic [FW-1:0] fa0_rdata, fa1_rdata, f2_raddr, f2_rdata, f2_waddr, f2_wdata, fs_wdata;
  c1de_sort #(.NSAMP(NSAMP), .SYM_W(SW), .FW(FW)) dut (.*);
  sdp_ram #(.AW(SW), .DW(FW)) u_fa0 (.clk, .raddr(fa_raddr), .rdata(fa0_rdata), .we(1'b0), .waddr('0), .wdata('0));
  sdp_ram #(.AW(SW), .DW(FW)) u_fa1 (.clk, .raddr(fa_raddr), .rdata(fa1_rdata), .we(1'b0), .waddr('0), .wdata('0));
  sdp_ram #(.AW(FW), .DW(FW)) u_f2 (.clk, .raddr(f2_raddr), .rdata(f2_rdata), .we(f2_we), .waddr(f2_waddr), .wdata(f2_wdata));
  sdp_ram #(.AW(SW), .DW(SW)) u_idx (.clk, .raddr('0), .rdata(), .we(idx_we), .waddr(idx_waddr), .wdata(idx_wdata));
  sdp_ram #(.AW(SW), .DW(FW)) u_fs (.clk, .raddr('0), .rdata(), .we(fs_we), .waddr(fs_waddr), .wdata(fs_wdata));

  int checks = 0, failures = 0, cyc = 0, fr [256], cnt [64], ord [$], ms = 0;
  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  task automatic chk(bit ok, string m);
    checks++; if (!ok) begin failures++; $display("FAIL %s", m); end
  endtask
  initial begin
    int above;
    repeat (2) @(posedge clk); rst_n = 1;
    for (int v = 0; v < 64; v++) cnt[v] = 0;
    for (int s = 0; s < 256; s++) begin
      fr[s] = (s >= 10 && s < 20) ? 7 : ((s < 200 && $urandom_range(2) == 0) ? int'($urandom_range(1, 40)) : 0);
      u_fa0.mem[s] = FW'(fr[s] / 3); u_fa1.mem[s] = FW'(fr[s] - fr[s] / 3);
      if (fr[s] > 0) begin cnt[fr[s]]++; ms = s; end
    end
    above = 0;
    for (int v = 63; v >= 1; v--) begin u_f2.mem[v] = FW'(above + 1); above += cnt[v]; end
    for (int v = 63; v >= 1; v--) for (int s = 0; s < 256; s++) if (fr[s] == v) ord.push_back(s);
    max_sym = SW'(ms);
    @(negedge clk); start = 1; @(negedge clk); start = 0;
    cyc = 1;
    while (!done) begin @(negedge clk); cyc++; end
    chk(cyc == ms + 5, $sformatf("%0d cycles, max_sym %0d", cyc, ms));
    foreach (ord[p]) begin
      chk(int'(u_idx.mem[p]) == ord[p], $sformatf("Idx[%0d] %0d vs %0d", p, u_idx.mem[p], ord[p]));
      chk(int'(u_fs.mem[p]) == fr[ord[p]], $sformatf("Fs[%0d] %0d vs %0d", p, u_fs.mem[p], fr[ord[p]]));
    end
    above = 0;
    for (int v = 63; v >= 1; v--) begin
      chk(int'(u_f2.mem[v]) == above + cnt[v] + 1, $sformatf("F2[%0d] %0d", v, u_f2.mem[v]));
      above += cnt[v];
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
