// Test of the simple dual-port RAM: random reads and writes against an
// array model. Checks the one-cycle read latency and that a read of the
// address written in the same cycle returns the old word, the new one on
// the next read.
module tb_sdp_ram;
  localparam int AW = 4, DW = 8;
  logic clk = 0;
  always #5 clk = ~clk;
  logic [AW-1:0] raddr, waddr;
  logic [DW-1:0] rdata, wdata;
  logic we;
  sdp_ram #(.AW(AW), .DW(DW)) dut (.*);

  int checks = 0, failures = 0, collisions = 0;
  logic [DW-1:0] model [2**AW];
  initial begin
    repeat (5000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    logic [DW-1:0] expect_d;
    we = 1; raddr = 0;
    for (int a = 0; a < 2**AW; a++) begin
      @(negedge clk); waddr = AW'(a); wdata = DW'(a * 7); model[a] = DW'(a * 7);
    end
    @(negedge clk); we = 0;
    for (int t = 0; t < 400; t++) begin
      @(negedge clk);
      raddr = AW'($urandom); we = $urandom_range(1); waddr = ($urandom_range(2) == 0) ? raddr : AW'($urandom);
      wdata = DW'($urandom);
      expect_d = model[raddr];              // old word, even on a collision
      if (we && waddr == raddr) collisions++;
      @(posedge clk);
      if (we) model[waddr] = wdata;
      @(negedge clk);
      checks++;
      if (rdata !== expect_d) begin failures++; $display("FAIL t=%0d %h vs %h", t, rdata, expect_d); end
      we = 0;
    end
    checks++;
    if (collisions == 0) begin failures++; $display("FAIL: no same-address read/write"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
