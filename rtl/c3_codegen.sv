// C3: canonical codeword generation.
//
// Walks the leaves in sorted order (non-decreasing code length). The first
// leaf gets the all-zero code. Each later leaf gets the previous codeword
// plus one when its length equals the previous length, and otherwise the
// previous codeword plus one shifted left by the length increase. For an
// increase of one this is (prev << 1) + 2, the selection of the source
// design; the general shift is this design's extension, needed because the
// length can grow by more than one between neighbouring leaves.
//
// The length and the codeword are stored together as one word, and at the
// symbol's own address CW(Idx(f)), so C4 needs a single table look-up per
// sample. The layout of a word is {length, codeword}, the codeword right-
// aligned in CODE_W bits.
//
// Timing: Len(f) and Idx(f) are read together, the word is written one
// cycle later; n + 3 cycles from start to done.
module c3_codegen #(
  parameter int unsigned SYM_W  = 8,
  parameter int unsigned LW     = 5,
  parameter int unsigned CODE_W = 16
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 start,
  input  logic [SYM_W:0]       n,
  output logic [SYM_W-1:0]     rd_addr,      // Len and Idx read address
  input  logic [LW-1:0]        len_rdata,
  input  logic [SYM_W-1:0]     idx_rdata,
  output logic                 cw_we,
  output logic [SYM_W-1:0]     cw_waddr,
  output logic [LW+CODE_W-1:0] cw_wdata,
  output logic                 done
);

  logic              busy, v1, first;
  logic [SYM_W:0]    f;
  logic [CODE_W-1:0] prev_code, code;
  logic [LW-1:0]     prev_len;

  assign rd_addr = f[SYM_W-1:0];

  always_comb begin
    if (first)                     code = '0;
    else if (len_rdata == prev_len) code = prev_code + 1'b1;
    else                            code = (prev_code + 1'b1) << (len_rdata - prev_len);
  end

  assign cw_we    = v1;
  assign cw_waddr = idx_rdata;
  assign cw_wdata = {len_rdata, code};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy <= 1'b0; f <= '0; v1 <= 1'b0; first <= 1'b0; done <= 1'b0;
      prev_code <= '0; prev_len <= '0;
    end else begin
      done <= 1'b0;
      v1   <= busy && (f < n);
      if (v1) begin
        prev_code <= code;
        prev_len  <= len_rdata;
        first     <= 1'b0;
      end
      if (start) begin
        busy <= 1'b1; f <= '0; first <= 1'b1;
      end else if (busy) begin
        if (f < n) f <= f + 1'b1;
        else if (!v1) begin busy <= 1'b0; done <= 1'b1; end
      end
    end
  end

endmodule
