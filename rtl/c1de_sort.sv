// C1d + C1e: counting-sort placement of the symbols.
//
// For each symbol i = 0..max_sym with frequency f = FA0(i)+FA1(i) > 0, the
// bucket pointer j = F2(f) (1-based, from C1c) is read and advanced to j+1,
// and in the same cycle symbol i is written to Idx(j-1) and its frequency
// to Fs(j-1). Idx is then the list of symbols and Fs their frequencies in
// non-increasing frequency order. Writing Fs in the pass that builds Idx
// (instead of a separate loop over Idx) is the stage merge of the source
// design, and so is the schedule: F read in cycle 0, F2 read in cycle 1,
// F2 word in cycle 2, F2/Idx/Fs written in cycle 3, one symbol per cycle.
// Two symbols of the same frequency in a row are handled by the two
// forwarding paths of rmw_pipe. In the unmerged configuration of the top
// level (C1_OPT = 0) the Fs outputs are not used and c1e_gather builds Fs.
//
// Timing: max_sym + 5 cycles from start to done.
module c1de_sort #(
  parameter int unsigned NSAMP = 2048,
  parameter int unsigned SYM_W = 8,
  parameter int unsigned FW    = $clog2(NSAMP + 1)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             start,
  input  logic [SYM_W-1:0] max_sym,
  output logic [SYM_W-1:0] fa_raddr,
  input  logic [FW-1:0]    fa0_rdata,
  input  logic [FW-1:0]    fa1_rdata,
  output logic [FW-1:0]    f2_raddr,
  input  logic [FW-1:0]    f2_rdata,
  output logic             f2_we,
  output logic [FW-1:0]    f2_waddr,
  output logic [FW-1:0]    f2_wdata,
  output logic             idx_we,
  output logic [SYM_W-1:0] idx_waddr,
  output logic [SYM_W-1:0] idx_wdata,
  output logic             fs_we,
  output logic [SYM_W-1:0] fs_waddr,
  output logic [FW-1:0]    fs_wdata,
  output logic             done
);

  logic             busy, rv, last;
  logic [SYM_W:0]   cnt;
  logic [SYM_W-1:0] sym_d;
  logic [2:0]       tail;
  logic [FW-1:0]    f;

  assign fa_raddr = cnt[SYM_W-1:0];
  assign f        = fa0_rdata + fa1_rdata;
  assign last     = (cnt == {1'b0, max_sym});

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy <= 1'b0; cnt <= '0; rv <= 1'b0; sym_d <= '0; tail <= '0; done <= 1'b0;
    end else begin
      done  <= 1'b0;
      sym_d <= cnt[SYM_W-1:0];
      if (start) begin
        busy <= 1'b1; cnt <= '0; tail <= '0; rv <= 1'b0;
      end else if (busy) begin
        rv <= (tail == '0);
        if (tail == '0) begin
          if (last) tail <= 3'd1;
          else      cnt  <= cnt + 1'b1;
        end else begin
          tail <= tail + 1'b1;
          if (tail == 3'd3) begin busy <= 1'b0; done <= 1'b1; end
        end
      end else rv <= 1'b0;
    end
  end

  logic             wv;
  logic [FW-1:0]    wa, wo;
  logic [SYM_W-1:0] wt;

  rmw_pipe #(.AW(FW), .DW(FW), .TW(SYM_W)) u_pipe (
    .clk, .rst_n, .in_valid(rv && f != '0), .in_addr(f), .in_tag(sym_d),
    .raddr(f2_raddr), .rdata(f2_rdata), .we(f2_we), .waddr(f2_waddr), .wdata(f2_wdata),
    .w_valid(wv), .w_addr(wa), .w_old(wo), .w_tag(wt));

  assign idx_we    = wv;
  assign idx_waddr = SYM_W'(wo - 1'b1);
  assign idx_wdata = wt;
  assign fs_we     = wv;
  assign fs_waddr  = SYM_W'(wo - 1'b1);
  assign fs_wdata  = wa;

endmodule
