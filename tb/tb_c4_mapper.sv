// Test of C4: symbol memories with random symbols and a codeword table
// with random lengths (1..16) and codes. The output words must be the codes
// of the samples in order, concatenated most significant bit first, cut
// into 32-bit words; the final word carries the remaining bits left-aligned
// with out_nbits giving their number, and done rises with it. The pass
// must take NSAMP + 4 cycles to done.
module tb_c4_mapper;
  localparam int NSAMP = 512, SW = 8, LW = 5, CW = 16, OW = 32, MA = $clog2(NSAMP/2);
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic start = 0, done, out_valid, out_last;
  logic [MA-1:0] m_raddr;
  logic [SW-1:0] m0_rdata, m1_rdata, cw_raddr;
  logic [LW+CW-1:0] cw_rdata;
  logic [OW-1:0] out_word;
  logic [4:0] out_nbits;
  c4_mapper #(.NSAMP(NSAMP), .SYM_W(SW), .LW(LW), .CODE_W(CW), .OUT_W(OW)) dut (.*);
  sdp_ram #(.AW(MA), .DW(SW)) u_m0 (.clk, .raddr(m_raddr), .rdata(m0_rdata), .we(1'b0), .waddr('0), .wdata('0));
  sdp_ram #(.AW(MA), .DW(SW)) u_m1 (.clk, .raddr(m_raddr), .rdata(m1_rdata), .we(1'b0), .waddr('0), .wdata('0));
  sdp_ram #(.AW(SW), .DW(LW+CW)) u_cw (.clk, .raddr(cw_raddr), .rdata(cw_rdata), .we(1'b0), .waddr('0), .wdata('0));

  int checks = 0, failures = 0;
  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  task automatic chk(bit ok, string m);
    checks++; if (!ok) begin failures++; $display("FAIL %s", m); end
  endtask
  logic [OW-1:0] got [$];
  int got_bits = -1, done_with_last = 0;
  always @(negedge clk) if (out_valid) begin
    got.push_back(out_word);
    if (out_last) begin got_bits = int'(out_nbits); done_with_last = done; end
  end
  initial begin
    int lens [256], codes [256], sym, cyc, nbits;
    bit acc [$];
    repeat (2) @(posedge clk); rst_n = 1;
    for (int s = 0; s < 256; s++) begin
      lens[s] = int'($urandom_range(1, 16));
      codes[s] = int'($urandom) & ((1 << lens[s]) - 1);
      u_cw.mem[s] = {LW'(lens[s]), CW'(codes[s])};
    end
    for (int j = 0; j < NSAMP; j++) begin
      sym = int'($urandom_range(255));
      if (j % 2 == 0) u_m0.mem[j/2] = SW'(sym); else u_m1.mem[j/2] = SW'(sym);
      for (int b = lens[sym] - 1; b >= 0; b--) acc.push_back(codes[sym][b]);
    end
    nbits = acc.size() % OW;
    while (acc.size() % OW != 0) acc.push_back(1'b0);
    @(negedge clk); start = 1; @(negedge clk); start = 0;
    cyc = 1;
    while (!done) begin @(negedge clk); cyc++; end
    @(negedge clk);
    chk(cyc == NSAMP + 4, $sformatf("%0d cycles", cyc));
    chk(got.size() == acc.size() / OW + (nbits == 0), $sformatf("%0d words", got.size()));
    chk(got_bits == nbits, $sformatf("last word bits %0d vs %0d", got_bits, nbits));
    chk(done_with_last == 1, "done not with the last word");
    for (int w = 0; w < acc.size() / OW && w < got.size(); w++) begin
      logic [OW-1:0] e;
      for (int b = 0; b < OW; b++) e[OW-1-b] = acc[w*OW + b];
      chk(got[w] == e, $sformatf("word %0d %h vs %h", w, got[w], e));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
