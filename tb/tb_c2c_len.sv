// Test of C2c: Fs holds random leaf parents, L random node depths; Len(f)
// must become L(Fs(f)) + 1 for every leaf, in n + 4 cycles.
module tb_c2c_len;
  localparam int SW = 8, FW = 12, LW = 5;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic start = 0, done, len_we;
  logic [SW:0] n;
  logic [SW-1:0] fs_raddr, l_raddr, len_waddr;
  logic [FW-1:0] fs_rdata, l_rdata;
  logic [LW-1:0] len_wdata;
  c2c_len #(.SYM_W(SW), .FW(FW), .LW(LW)) dut (.*);
  sdp_ram #(.AW(SW), .DW(FW)) u_fs (.clk, .raddr(fs_raddr), .rdata(fs_rdata), .we(1'b0), .waddr('0), .wdata('0));
  sdp_ram #(.AW(SW), .DW(FW)) u_l (.clk, .raddr(l_raddr), .rdata(l_rdata), .we(1'b0), .waddr('0), .wdata('0));
  sdp_ram #(.AW(SW), .DW(LW)) u_len (.clk, .raddr('0), .rdata(), .we(len_we), .waddr(len_waddr), .wdata(len_wdata));

  int checks = 0, failures = 0;
  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  task automatic chk(bit ok, string m);
    checks++; if (!ok) begin failures++; $display("FAIL %s", m); end
  endtask
  task automatic run(int nn);
    int cyc;
    for (int k = 0; k < 256; k++) begin u_l.mem[k] = FW'($urandom_range(14)); u_len.mem[k] = '1; end
    for (int f = 0; f < nn; f++) u_fs.mem[f] = FW'($urandom_range(nn > 1 ? nn - 2 : 0));
    n = (SW+1)'(nn);
    @(negedge clk); start = 1; @(negedge clk); start = 0;
    cyc = 1;
    while (!done) begin @(negedge clk); cyc++; end
    chk(cyc == nn + 4, $sformatf("n=%0d: %0d cycles", nn, cyc));
    for (int f = 0; f < nn; f++)
      chk(int'(u_len.mem[f]) == int'(u_l.mem[u_fs.mem[f]]) + 1, $sformatf("n=%0d Len[%0d] %0d", nn, f, u_len.mem[f]));
    if (nn < 256) chk(u_len.mem[nn] == '1, "write past the last leaf");
  endtask
  initial begin
    repeat (2) @(posedge clk); rst_n = 1;
    run(1); run(2); run(77); run(256);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
