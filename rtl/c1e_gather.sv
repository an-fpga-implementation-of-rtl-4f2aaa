// C1e: sorted frequency table, the last loop of the frequency stage.
//
// After C1d has placed the symbols in Idx(0..n-1) in non-increasing
// frequency order, this pass builds Fs(j) = F(Idx(j)) for j = 0..n-1, one
// entry per cycle. It is the separate fifth loop of the source design's
// first prototype; the optimised design writes Fs during C1d instead
// (c1de_sort) and has no C1e. The top level uses this module when
// C1_OPT = 0.
//
// Schedule: cycle j reads Idx(j); cycle j+1 reads FA0/FA1 at that symbol;
// cycle j+2 writes Fs(j) = FA0 + FA1. The tables are only read, so there
// is no hazard.
//
// Timing: n + 3 cycles from start to the done pulse (n >= 1).
module c1e_gather #(
  parameter int unsigned SYM_W = 8,
  parameter int unsigned FW    = 12
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             start,
  input  logic [SYM_W:0]   n,
  output logic [SYM_W-1:0] idx_raddr,
  input  logic [SYM_W-1:0] idx_rdata,
  output logic [SYM_W-1:0] fa_raddr,
  input  logic [FW-1:0]    fa0_rdata,
  input  logic [FW-1:0]    fa1_rdata,
  output logic             fs_we,
  output logic [SYM_W-1:0] fs_waddr,
  output logic [FW-1:0]    fs_wdata,
  output logic             done
);

  logic             busy, v1, v2;
  logic [SYM_W:0]   cnt;
  logic [SYM_W-1:0] j1, j2;

  assign idx_raddr = cnt[SYM_W-1:0];
  assign fa_raddr  = idx_rdata;
  assign fs_we     = v2;
  assign fs_waddr  = j2;
  assign fs_wdata  = fa0_rdata + fa1_rdata;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy <= 1'b0; cnt <= '0; v1 <= 1'b0; v2 <= 1'b0; j1 <= '0; j2 <= '0; done <= 1'b0;
    end else begin
      v1   <= busy && cnt < n;
      j1   <= cnt[SYM_W-1:0];
      v2   <= v1;
      j2   <= j1;
      done <= busy && cnt == n + 1'b1;
      if (start) begin
        busy <= 1'b1; cnt <= '0;
      end else if (busy) begin
        if (cnt == n + 1'b1) busy <= 1'b0;
        cnt <= cnt + 1'b1;
      end
    end
  end

endmodule
