// Test of C0: random 8-bit samples (in 16-bit words) are fed two per cycle,
// with occasional idle cycles. Every write to the two symbol memories is
// compared with a model of the prediction and mapping; sample 0 must be
// stored as is. The latency from an accepted beat to its write must be 3
// cycles, and the block must take exactly NSAMP/2 beats.
module tb_c0_dpcm;
  localparam int NSAMP = 256, SW = 8, MA = $clog2(NSAMP/2);
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic start = 0, in_valid = 0, in_ready, m_we, done;
  logic [15:0] in_d0 = '0, in_d1 = '0;
  logic [MA-1:0] m_waddr;
  logic [SW-1:0] m0_wdata, m1_wdata;
  c0_dpcm #(.NSAMP(NSAMP), .SAMPLE_W(16), .SYM_W(SW)) dut (.*);

  int checks = 0, failures = 0;
  int x [NSAMP];
  int cyc = 0, writes = 0, dones = 0;
  initial begin
    repeat (5000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  function automatic int pmap(int p, int v);
    int d = v - p, th = (p < 255 - p) ? p : 255 - p;
    if (d >= 0 && d <= th) return 2 * d;
    if (d < 0 && -d <= th) return -2 * d - 1;
    return th + ((d < 0) ? -d : d);
  endfunction
  always @(negedge clk) cyc++;
  int beat_cyc [$];
  always @(posedge clk) if (rst_n && in_valid && in_ready) beat_cyc.push_back(cyc);
  always @(posedge clk) if (rst_n && m_we) begin
    int j, e0, e1, lat;
    j = int'(m_waddr);
    e0 = (j == 0) ? x[0] : pmap(x[2*j-1], x[2*j]);
    e1 = pmap(x[2*j], x[2*j+1]);
    lat = cyc - beat_cyc.pop_front();
    checks += 3; writes++;
    if (int'(m0_wdata) != e0 || int'(m1_wdata) != e1) begin
      failures++; $display("FAIL j=%0d got %0d %0d exp %0d %0d", j, m0_wdata, m1_wdata, e0, e1);
    end
    // accepted in cycle c, written in cycle c+2: the third cycle of the beat
    if (lat != 2) begin failures++; $display("FAIL latency %0d", lat); end
    if (j != writes - 1) begin failures++; $display("FAIL order"); end
  end
  always @(negedge clk) if (done) dones++;
  initial begin
    for (int i = 0; i < NSAMP; i++) x[i] = (i % 40 < 5) ? ((i % 2) ? 255 : 0) : int'($urandom_range(255));
    repeat (2) @(posedge clk); rst_n = 1;
    @(negedge clk); start = 1; @(negedge clk); start = 0;
    for (int j = 0; j < NSAMP/2; j++) begin
      if ($urandom_range(4) == 0) @(negedge clk);
      in_valid = 1; in_d0 = 16'(x[2*j]); in_d1 = 16'(x[2*j+1]);
      @(negedge clk); in_valid = 0;
    end
    in_valid = 1;               // extra beat must be refused
    repeat (3) @(negedge clk);
    checks++;
    if (in_ready) begin failures++; $display("FAIL: extra beat accepted"); end
    in_valid = 0;
    repeat (3) @(negedge clk);
    checks += 2;
    if (writes != NSAMP/2) begin failures++; $display("FAIL: %0d writes", writes); end
    if (dones != 1) begin failures++; $display("FAIL: %0d done pulses", dones); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
