// C0: DPCM and positive mapping, two samples per cycle.
//
// Each accepted beat carries samples 2j (in_d0) and 2j+1 (in_d1). The odd
// sample of the previous beat is held in a register (prev), so every sample
// is fetched once: sample 2j is predicted by sample 2j-1 and sample 2j+1 by
// sample 2j. The two mapped results go to two memories, mem0[j] and mem1[j],
// so later stages can read two symbols per cycle. Sample 0 is the DC value
// and is stored as is.
//
// Pipeline (3 cycles from in_valid to the write): stage 1 registers the
// samples and the predictor, stage 2 registers the prediction differences
// (the extra stage that shortens the critical path), stage 3 maps and
// writes. The beat structure, the prev register, the two memories and the
// DC rule follow the source design.
//
// This design's choices: a symbol is the low SYM_W bits of a sample (the
// samples are taken to carry SYM_W significant bits, matching the
// 256-symbol alphabet), and the positive mapping is the CCSDS 121.0 one,
// which folds a difference into SYM_W bits without loss:
//   theta = min(pred, 2^SYM_W-1-pred)
//   delta in [0,theta]    -> 2*delta
//   delta in [-theta,-1]  -> 2*|delta|-1
//   otherwise             -> theta+|delta|
//
// Interface: start pulse arms the block for NSAMP/2 beats; in_ready is high
// while beats are accepted; done pulses once the last write is made.
module c0_dpcm #(
  parameter int unsigned NSAMP    = 2048,
  parameter int unsigned SAMPLE_W = 16,
  parameter int unsigned SYM_W    = 8,
  localparam int unsigned MA      = $clog2(NSAMP/2)
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                start,
  input  logic                in_valid,
  output logic                in_ready,
  input  logic [SAMPLE_W-1:0] in_d0,
  input  logic [SAMPLE_W-1:0] in_d1,
  output logic                m_we,
  output logic [MA-1:0]       m_waddr,
  output logic [SYM_W-1:0]    m0_wdata,
  output logic [SYM_W-1:0]    m1_wdata,
  output logic                done
);

  localparam logic [SYM_W-1:0] SMAX = '1;

  function automatic logic [SYM_W-1:0] pos_map(input logic [SYM_W-1:0] pred,
                                               input logic signed [SYM_W:0] delta);
    logic [SYM_W-1:0] theta;
    logic [SYM_W:0]   mag;
    theta = (pred < SMAX - pred) ? pred : SMAX - pred;
    mag   = delta[SYM_W] ? (SYM_W+1)'(-delta) : (SYM_W+1)'(delta);
    if (mag <= {1'b0, theta})
      pos_map = delta[SYM_W] ? SYM_W'({mag, 1'b0} - 1'b1) : SYM_W'({mag, 1'b0});
    else
      pos_map = SYM_W'({1'b0, theta} + mag);
  endfunction

  logic          busy;
  logic [MA:0]   beat;        // beats accepted so far
  logic [SYM_W-1:0] prev;
  // stage 1
  logic          v1, dc1;
  logic [MA-1:0] a1;
  logic [SYM_W-1:0] x0_1, x1_1, p_1;
  // stage 2
  logic          v2, dc2, last2;
  logic [MA-1:0] a2;
  logic [SYM_W-1:0] x0_2, p_2;
  logic signed [SYM_W:0] d0_2, d1_2;
  logic          last1;

  assign in_ready = busy && (beat < (MA+1)'(NSAMP/2));
  wire   take     = in_valid && in_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy <= 1'b0; beat <= '0; prev <= '0;
      v1 <= 1'b0; dc1 <= 1'b0; a1 <= '0; x0_1 <= '0; x1_1 <= '0; p_1 <= '0; last1 <= 1'b0;
      v2 <= 1'b0; dc2 <= 1'b0; a2 <= '0; x0_2 <= '0; p_2 <= '0; d0_2 <= '0; d1_2 <= '0;
      last2 <= 1'b0; done <= 1'b0;
    end else begin
      if (start) begin
        busy <= 1'b1;
        beat <= '0;
      end else if (take) begin
        beat <= beat + 1'b1;
        prev <= in_d1[SYM_W-1:0];
      end
      // stage 1: capture samples and predictor
      v1    <= take;
      dc1   <= take && (beat == '0);
      last1 <= take && (beat == (MA+1)'(NSAMP/2 - 1));
      a1    <= beat[MA-1:0];
      x0_1  <= in_d0[SYM_W-1:0];
      x1_1  <= in_d1[SYM_W-1:0];
      p_1   <= prev;
      // stage 2: differences
      v2    <= v1;
      dc2   <= dc1;
      last2 <= last1;
      a2    <= a1;
      x0_2  <= x0_1;
      p_2   <= p_1;
      d0_2  <= $signed({1'b0, x0_1}) - $signed({1'b0, p_1});
      d1_2  <= $signed({1'b0, x1_1}) - $signed({1'b0, x0_1});
      // stage 3 writes combinationally from stage 2 registers
      done  <= v2 && last2;
      if (v2 && last2) busy <= 1'b0;
    end
  end

  assign m_we     = v2;
  assign m_waddr  = a2;
  assign m0_wdata = dc2 ? x0_2 : pos_map(p_2, d0_2);
  assign m1_wdata = pos_map(x0_2, d1_2);

endmodule
