// Test of C2b: L is loaded with random parent pointers (each node's parent
// has a smaller index, node 0 is the root and holds a weight) for several
// node counts; afterwards L(k) must be the depth of node k. Parents equal to
// k-1 occur often, which exercises the bypass of a depth that is written in
// the same cycle as it is read. For n > 2 the pass must take 2 cycles per iteration plus 2.
module tb_c2b_depth;
  localparam int SW = 8, FW = 12;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic start = 0, done, l_we;
  logic [SW:0] n;
  logic [SW-1:0] l_raddr, l_waddr;
  logic [FW-1:0] l_rdata, l_wdata;
  c2b_depth #(.SYM_W(SW), .FW(FW)) dut (.*);
  sdp_ram #(.AW(SW), .DW(FW)) u_l (.clk, .raddr(l_raddr), .rdata(l_rdata), .we(l_we), .waddr(l_waddr), .wdata(l_wdata));

  int checks = 0, failures = 0;
  initial begin
    repeat (50000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  task automatic chk(bit ok, string m);
    checks++; if (!ok) begin failures++; $display("FAIL %s", m); end
  endtask
  task automatic run(int nn);
    int d [256], cyc, p;
    u_l.mem[0] = FW'(2048);
    d[0] = 0;
    for (int k = 1; k <= nn - 2; k++) begin
      p = ($urandom_range(1) == 0) ? k - 1 : int'($urandom_range(k - 1));
      u_l.mem[k] = FW'(p);
      d[k] = d[p] + 1;
    end
    n = (SW+1)'(nn);
    @(negedge clk); start = 1; @(negedge clk); start = 0;
    cyc = 1;
    while (!done) begin @(negedge clk); cyc++; end
    if (nn > 2) chk(cyc == 2 * (nn - 2) + 2, $sformatf("n=%0d: %0d cycles", nn, cyc));
    for (int k = 0; k <= nn - 2; k++)
      chk(int'(u_l.mem[k]) == d[k], $sformatf("n=%0d depth[%0d] %0d vs %0d", nn, k, u_l.mem[k], d[k]));
  endtask
  initial begin
    repeat (2) @(posedge clk); rst_n = 1;
    run(2); run(3); run(4); run(30); run(256);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
