// C1b: frequency-of-frequency table.
//
// For every symbol s the frequency F(s) = FA0(s) + FA1(s) is read (both
// duplicated count tables at the same address, outputs added), and
// F2(F(s)) is incremented by the same forwarding read-modify-write pipeline
// as C1a, one symbol per cycle. Alongside, the block records the three
// numbers later stages use to skip idle work: the number of symbols that
// occur (n_nz), the largest frequency (max_f) and the largest symbol that
// occurs (max_sym).
//
// This design's choice: symbols that do not occur (F(s) = 0) are not
// counted into F2, since they get no code.
//
// Timing: NSYM + 4 cycles from start to done. F2 must be zero at
// addresses 1..NSAMP at start.
module c1b_freq2 #(
  parameter int unsigned NSAMP = 2048,
  parameter int unsigned SYM_W = 8,
  parameter int unsigned FW    = $clog2(NSAMP + 1)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             start,
  output logic [SYM_W-1:0] fa_raddr,
  input  logic [FW-1:0]    fa0_rdata,
  input  logic [FW-1:0]    fa1_rdata,
  output logic [FW-1:0]    f2_raddr,
  input  logic [FW-1:0]    f2_rdata,
  output logic             f2_we,
  output logic [FW-1:0]    f2_waddr,
  output logic [FW-1:0]    f2_wdata,
  output logic [SYM_W:0]   n_nz,
  output logic [FW-1:0]    max_f,
  output logic [SYM_W-1:0] max_sym,
  output logic             done
);

  localparam int unsigned NSYM = 2**SYM_W;

  logic             busy, rv;
  logic [SYM_W:0]   cnt;
  logic [SYM_W-1:0] sym_d;
  logic [2:0]       tail;
  logic [FW-1:0]    f;

  assign fa_raddr = cnt[SYM_W-1:0];
  assign f        = fa0_rdata + fa1_rdata;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy <= 1'b0; cnt <= '0; rv <= 1'b0; sym_d <= '0; tail <= '0; done <= 1'b0;
      n_nz <= '0; max_f <= '0; max_sym <= '0;
    end else begin
      done  <= 1'b0;
      rv    <= busy && (cnt < (SYM_W+1)'(NSYM));
      sym_d <= cnt[SYM_W-1:0];
      if (start) begin
        busy <= 1'b1; cnt <= '0; tail <= '0;
        n_nz <= '0; max_f <= '0; max_sym <= '0;
      end else if (busy) begin
        if (cnt < (SYM_W+1)'(NSYM)) cnt <= cnt + 1'b1;
        else begin
          tail <= tail + 1'b1;
          if (tail == 3'd2) begin busy <= 1'b0; done <= 1'b1; end
        end
      end
      if (rv && f != '0) begin
        n_nz    <= n_nz + 1'b1;
        max_sym <= sym_d;
        if (f > max_f) max_f <= f;
      end
    end
  end

  logic          wv;
  logic [FW-1:0] wa, wo;
  logic          wt;

  rmw_pipe #(.AW(FW), .DW(FW), .TW(1)) u_pipe (
    .clk, .rst_n, .in_valid(rv && f != '0), .in_addr(f), .in_tag(1'b0),
    .raddr(f2_raddr), .rdata(f2_rdata), .we(f2_we), .waddr(f2_waddr), .wdata(f2_wdata),
    .w_valid(wv), .w_addr(wa), .w_old(wo), .w_tag(wt));

endmodule
