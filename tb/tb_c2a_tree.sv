// Test of C2a: sorted weight lists of several sizes (1, 2, 3, a few, all 256
// symbols; flat, geometric and random weights) are loaded into Fs, and after
// the pass Fs (leaf parents) and L (internal node parents, root weight at
// L(0)) must equal a direct model of the in-place algorithm. For n > 2 the
// pass must take 4 cycles per iteration plus 4.
module tb_c2a_tree;
  localparam int SW = 8, FW = 12;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic start = 0, done, fs_we, l_we;
  logic [SW:0] n;
  logic [SW-1:0] fs_raddr, fs_waddr, l_raddr, l_waddr;
  logic [FW-1:0] fs_rdata, fs_wdata, l_rdata, l_wdata;
  c2a_tree #(.SYM_W(SW), .FW(FW)) dut (.*);
  sdp_ram #(.AW(SW), .DW(FW)) u_fs (.clk, .raddr(fs_raddr), .rdata(fs_rdata), .we(fs_we), .waddr(fs_waddr), .wdata(fs_wdata));
  sdp_ram #(.AW(SW), .DW(FW)) u_l (.clk, .raddr(l_raddr), .rdata(l_rdata), .we(l_we), .waddr(l_waddr), .wdata(l_wdata));

  int checks = 0, failures = 0;
  initial begin
    repeat (50000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  task automatic chk(bit ok, string m);
    checks++; if (!ok) begin failures++; $display("FAIL %s", m); end
  endtask

  task automatic run(int nn, int kind);
    int w [$], F [258], L [258], i, f, T, cyc;
    for (int k = 0; k < nn; k++)
      w.push_back(kind == 0 ? 8 : (kind == 1 ? ((k < 10) ? (1 << (10 - k)) : 1) : int'($urandom_range(1, 15))));
    w.rsort();
    for (int k = 0; k < nn; k++) u_fs.mem[k] = FW'(w[k]);
    // model, 1-based as in the algorithm's usual statement
    for (int k = 1; k <= nn; k++) F[k] = w[k-1];
    for (int k = 0; k < 258; k++) L[k] = 0;
    if (nn == 1) F[1] = 1;
    else begin
      L[nn-1] = F[nn-1] + F[nn]; F[nn-1] = nn - 1; F[nn] = nn - 1;
      i = nn - 1; f = nn - 2;
      for (int k = nn - 2; k >= 1; k--) begin
        if (f < 1 || L[i] < F[f]) begin T = L[i]; L[i] = k; i--; end
        else begin T = F[f]; F[f] = k; f--; end
        if (f < 1 || (i > k && L[i] < F[f])) begin L[k] = T + L[i]; L[i] = k; i--; end
        else begin L[k] = T + F[f]; F[f] = k; f--; end
      end
    end
    n = (SW+1)'(nn);
    @(negedge clk); start = 1; @(negedge clk); start = 0;
    cyc = 1;
    while (!done) begin @(negedge clk); cyc++; end
    if (nn > 2) chk(cyc == 4 * (nn - 2) + 4, $sformatf("n=%0d: %0d cycles", nn, cyc));
    for (int k = 1; k <= nn; k++)
      chk(int'(u_fs.mem[k-1]) == F[k] - 1, $sformatf("n=%0d Fs[%0d] %0d vs %0d", nn, k - 1, u_fs.mem[k-1], F[k] - 1));
    for (int k = 1; k <= nn - 1; k++)
      chk(int'(u_l.mem[k-1]) == ((k == 1) ? L[1] : L[k] - 1),
          $sformatf("n=%0d L[%0d] %0d vs %0d", nn, k - 1, u_l.mem[k-1], (k == 1) ? L[1] : L[k] - 1));
  endtask

  initial begin
    repeat (2) @(posedge clk); rst_n = 1;
    run(1, 0); run(2, 0); run(3, 2); run(5, 1); run(17, 0); run(40, 2); run(256, 2); run(256, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
