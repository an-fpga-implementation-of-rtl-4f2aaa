// C1a, single-table variant: symbol frequency count, one symbol per cycle.
//
// The loop  F(v(i)) = F(v(i)) + 1  over all NSAMP symbols, in sample order
// (mem0(j) holds sample 2j, mem1(j) sample 2j+1), into one count table FA
// through one forwarding read-modify-write pipeline. This is the source
// design's first prototype; its optimised version (c1a_count) duplicates
// the table and counts two symbols per cycle. The top level uses this
// module when C1_OPT = 0.
//
// Timing: each mem0/mem1 address is held for two cycles, the first cycle's
// word is taken from mem0 and the second from mem1 (read latency 1), then
// rmw_pipe adds 2 cycles. NSAMP + 4 cycles from start to the done pulse.
// The count table must be zero at start.
module c1a_count1 #(
  parameter int unsigned NSAMP = 2048,
  parameter int unsigned SYM_W = 8,
  parameter int unsigned FW    = $clog2(NSAMP + 1),
  localparam int unsigned MA   = $clog2(NSAMP/2)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             start,
  output logic [MA-1:0]    m_raddr,
  input  logic [SYM_W-1:0] m0_rdata,
  input  logic [SYM_W-1:0] m1_rdata,
  output logic [SYM_W-1:0] fa_raddr,
  input  logic [FW-1:0]    fa_rdata,
  output logic             fa_we,
  output logic [SYM_W-1:0] fa_waddr,
  output logic [FW-1:0]    fa_wdata,
  output logic             done
);

  logic          busy, rv, odd;
  logic [MA+1:0] cnt;      // symbol index 0..NSAMP
  logic [2:0]    tail;     // pipeline drain after the last read

  assign m_raddr = cnt[MA:1];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy <= 1'b0; cnt <= '0; rv <= 1'b0; odd <= 1'b0; tail <= '0; done <= 1'b0;
    end else begin
      done <= 1'b0;
      rv   <= busy && (cnt < (MA+2)'(NSAMP));
      odd  <= cnt[0];
      if (start) begin
        busy <= 1'b1; cnt <= '0; tail <= '0;
      end else if (busy) begin
        if (cnt < (MA+2)'(NSAMP)) cnt <= cnt + 1'b1;
        else begin
          tail <= tail + 1'b1;
          if (tail == 3'd2) begin busy <= 1'b0; done <= 1'b1; end
        end
      end
    end
  end

  logic             wv;
  logic [SYM_W-1:0] wa;
  logic [FW-1:0]    wo;
  logic             wt;

  rmw_pipe #(.AW(SYM_W), .DW(FW), .TW(1)) u_p (
    .clk, .rst_n, .in_valid(rv), .in_addr(odd ? m1_rdata : m0_rdata), .in_tag(1'b0),
    .raddr(fa_raddr), .rdata(fa_rdata), .we(fa_we), .waddr(fa_waddr), .wdata(fa_wdata),
    .w_valid(wv), .w_addr(wa), .w_old(wo), .w_tag(wt));

endmodule
