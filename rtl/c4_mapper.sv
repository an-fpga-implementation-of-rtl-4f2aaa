// C4: symbol-to-codeword mapping and bit packing.
//
// Reads the block's symbols back in sample order, one per cycle (sample 2j
// from mem0[j], sample 2j+1 from mem1[j]), looks each one up in the
// codeword table CW built by C3, and appends its code to the output stream,
// most significant bit first. Full OUT_W-bit words leave on out_valid/
// out_word. After the last sample the remaining bits leave as a final word,
// left-aligned and zero-padded, with out_last set and out_nbits giving the
// number of valid bits in it (0..OUT_W-1).
//
// The source design names this stage's function (map, then compact the
// bits) but not its structure; the three-stage pipeline and the packer are
// this design's choice. The receiver has no back-pressure: it must take a
// word in every cycle out_valid is high.
//
// Timing: NSAMP + 4 cycles from start to done, which rises together with
// out_last; a codeword reaches the packer
// 2 cycles after its sample address.
module c4_mapper #(
  parameter int unsigned NSAMP  = 2048,
  parameter int unsigned SYM_W  = 8,
  parameter int unsigned LW     = 5,
  parameter int unsigned CODE_W = 16,
  parameter int unsigned OUT_W  = 32,
  localparam int unsigned MA    = $clog2(NSAMP/2),
  localparam int unsigned SA_W  = $clog2(NSAMP)
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 start,
  output logic [MA-1:0]        m_raddr,
  input  logic [SYM_W-1:0]     m0_rdata,
  input  logic [SYM_W-1:0]     m1_rdata,
  output logic [SYM_W-1:0]     cw_raddr,
  input  logic [LW+CODE_W-1:0] cw_rdata,
  output logic                 out_valid,
  output logic [OUT_W-1:0]     out_word,
  output logic                 out_last,
  output logic [$clog2(OUT_W)-1:0] out_nbits,
  output logic                 done
);

  localparam int unsigned BW = 2*OUT_W;     // packing buffer
  localparam int unsigned CW_ = $clog2(BW+1);

  logic            busy, v1, v2, odd1, last1, last2, flush;
  logic [SA_W:0]   s;
  logic [BW-1:0]   buffer, buf_app;
  logic [CW_-1:0]  cnt, cnt_app;
  logic [LW-1:0]   len2;
  logic [CODE_W-1:0] code2;

  assign m_raddr  = s[SA_W-1:1];
  assign cw_raddr = odd1 ? m1_rdata : m0_rdata;
  assign len2     = cw_rdata[LW+CODE_W-1:CODE_W];
  assign code2    = cw_rdata[CODE_W-1:0];

  // append the code (left-aligned after the bits already held)
  always_comb begin
    buf_app = buffer;
    cnt_app = cnt;
    if (v2) begin
      buf_app = buffer | ((BW'(code2) << (BW - 32'(len2))) >> cnt);
      cnt_app = cnt + CW_'(len2);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy <= 1'b0; s <= '0; v1 <= 1'b0; v2 <= 1'b0; odd1 <= 1'b0; last1 <= 1'b0; last2 <= 1'b0; flush <= 1'b0;
      buffer <= '0; cnt <= '0; out_valid <= 1'b0; out_word <= '0; out_last <= 1'b0;
      out_nbits <= '0; done <= 1'b0;
    end else begin
      done      <= 1'b0;
      out_valid <= 1'b0;
      out_last  <= 1'b0;
      v1    <= busy && (s < (SA_W+1)'(NSAMP));
      odd1  <= s[0];
      last1 <= busy && (s == (SA_W+1)'(NSAMP - 1));
      v2    <= v1;
      last2 <= last1;
      if (start) begin
        busy <= 1'b1; s <= '0; buffer <= '0; cnt <= '0;
      end else begin
        if (busy && s < (SA_W+1)'(NSAMP)) s <= s + 1'b1;
        // pack
        if (cnt_app >= CW_'(OUT_W)) begin
          out_valid <= 1'b1;
          out_word  <= buf_app[BW-1 -: OUT_W];
          buffer    <= buf_app << OUT_W;
          cnt       <= cnt_app - CW_'(OUT_W);
        end else begin
          buffer    <= buf_app;
          cnt       <= cnt_app;
        end
        flush <= v2 && last2;
        if (v2 && last2) busy <= 1'b0;
      end
      // flush: one cycle after the last append
      if (flush) begin
        done      <= 1'b1;
        out_valid <= 1'b1;
        out_last  <= 1'b1;
        out_word  <= buffer[BW-1 -: OUT_W];
        out_nbits <= $clog2(OUT_W)'(cnt);
        buffer    <= '0;
        cnt       <= '0;
      end
    end
  end

endmodule
