// Test of C3: non-decreasing code lengths (steps of 0, 1 and more) and a
// random symbol permutation in Idx. CW(Idx(f)) must hold {Len(f), code}
// with the canonical code: 0 for the first leaf, previous + 1 for an equal
// length, (previous + 1) << (length step) otherwise. The codes must also be
// prefix-free. The pass must take n + 3 cycles.
module tb_c3_codegen;
  localparam int SW = 8, LW = 5, CW = 16;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic start = 0, done, cw_we;
  logic [SW:0] n;
  logic [SW-1:0] rd_addr, idx_rdata, cw_waddr;
  logic [LW-1:0] len_rdata;
  logic [LW+CW-1:0] cw_wdata;
  c3_codegen #(.SYM_W(SW), .LW(LW), .CODE_W(CW)) dut (.*);
  sdp_ram #(.AW(SW), .DW(LW)) u_len (.clk, .raddr(rd_addr), .rdata(len_rdata), .we(1'b0), .waddr('0), .wdata('0));
  sdp_ram #(.AW(SW), .DW(SW)) u_idx (.clk, .raddr(rd_addr), .rdata(idx_rdata), .we(1'b0), .waddr('0), .wdata('0));
  sdp_ram #(.AW(SW), .DW(LW+CW)) u_cw (.clk, .raddr('0), .rdata(), .we(cw_we), .waddr(cw_waddr), .wdata(cw_wdata));

  int checks = 0, failures = 0;
  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  task automatic chk(bit ok, string m);
    checks++; if (!ok) begin failures++; $display("FAIL %s", m); end
  endtask
  task automatic run(int lens [$]);
    int perm [256], code [$], nn, cyc, pc, pl;
    nn = lens.size();
    for (int s = 0; s < 256; s++) perm[s] = s;
    perm.shuffle();
    for (int f = 0; f < nn; f++) begin u_len.mem[f] = LW'(lens[f]); u_idx.mem[f] = SW'(perm[f]); end
    for (int f = 0; f < nn; f++) begin
      code.push_back((f == 0) ? 0 : (pc + 1) << (lens[f] - pl));
      pc = code[f]; pl = lens[f];
    end
    n = (SW+1)'(nn);
    @(negedge clk); start = 1; @(negedge clk); start = 0;
    cyc = 1;
    while (!done) begin @(negedge clk); cyc++; end
    chk(cyc == nn + 3, $sformatf("n=%0d: %0d cycles", nn, cyc));
    for (int f = 0; f < nn; f++)
      chk(u_cw.mem[perm[f]] == {LW'(lens[f]), CW'(code[f])},
          $sformatf("n=%0d CW[%0d] %h vs len %0d code %h", nn, perm[f], u_cw.mem[perm[f]], lens[f], code[f]));
    // prefix property
    for (int a = 0; a < nn; a++) for (int b = a + 1; b < nn; b++)
      chk((code[b] >> (lens[b] - lens[a])) != code[a], $sformatf("code %0d is a prefix of %0d", a, b));
  endtask
  initial begin
    int l [$];
    repeat (2) @(posedge clk); rst_n = 1;
    l = {1}; run(l);
    l = {1, 1}; run(l);
    l = {1, 3, 3, 3, 3}; run(l);
    l = {2, 2, 3, 4, 5, 6, 7, 7}; run(l);
    l = {};
    for (int k = 0; k < 256; k++) l.push_back(8);
    run(l);
    l = {1, 2, 3, 4, 5, 6, 7, 8, 9, 10, 11, 12, 13, 14, 15, 15}; run(l);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
