// Test of C1e: Idx is loaded with a permutation of random symbols and the
// two count tables with random counts; for several n the pass must write
// Fs(j) = FA0(Idx(j)) + FA1(Idx(j)) for j < n, leave Fs(n..) alone, and take
// n + 3 cycles from the start pulse to the done pulse.
module tb_c1e_gather;
  localparam int SW = 8, FW = 12;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic start = 0, done, fs_we;
  logic [SW:0] n;
  logic [SW-1:0] idx_raddr, idx_rdata, fa_raddr, fs_waddr;
  logic [FW-1:0] fa0_rdata, fa1_rdata, fs_wdata;
  c1e_gather #(.SYM_W(SW), .FW(FW)) dut (.*);
  sdp_ram #(.AW(SW), .DW(SW)) u_idx (.clk, .raddr(idx_raddr), .rdata(idx_rdata), .we(1'b0), .waddr('0), .wdata('0));
  sdp_ram #(.AW(SW), .DW(FW)) u_fa0 (.clk, .raddr(fa_raddr), .rdata(fa0_rdata), .we(1'b0), .waddr('0), .wdata('0));
  sdp_ram #(.AW(SW), .DW(FW)) u_fa1 (.clk, .raddr(fa_raddr), .rdata(fa1_rdata), .we(1'b0), .waddr('0), .wdata('0));
  sdp_ram #(.AW(SW), .DW(FW)) u_fs (.clk, .raddr('0), .rdata(), .we(fs_we), .waddr(fs_waddr), .wdata(fs_wdata));

  int checks = 0, failures = 0;
  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  task automatic chk(bit ok, string m);
    checks++; if (!ok) begin failures++; $display("FAIL %s", m); end
  endtask

  task automatic run(int nn);
    int perm [256], cyc;
    for (int s = 0; s < 256; s++) perm[s] = s;
    perm.shuffle();
    for (int s = 0; s < 256; s++) begin
      u_idx.mem[s] = SW'(perm[s]);
      u_fa0.mem[s] = FW'($urandom_range(0, 1024));
      u_fa1.mem[s] = FW'($urandom_range(0, 1024));
      u_fs.mem[s]  = '1;
    end
    n = (SW+1)'(nn);
    @(negedge clk); start = 1; @(negedge clk); start = 0;
    cyc = 1;
    while (!done) begin @(negedge clk); cyc++; end
    chk(cyc == nn + 3, $sformatf("n=%0d: %0d cycles", nn, cyc));
    for (int j = 0; j < 256; j++)
      chk(u_fs.mem[j] == ((j < nn) ? FW'(u_fa0.mem[perm[j]] + u_fa1.mem[perm[j]]) : '1),
          $sformatf("n=%0d Fs[%0d] = %0d", nn, j, u_fs.mem[j]));
  endtask

  initial begin
    repeat (2) @(posedge clk); rst_n = 1;
    run(1); run(2); run(3); run(100); run(256);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
