// C1a: symbol frequency count, two symbols per cycle.
//
// The loop  F(v(i)) = F(v(i)) + 1  over all NSAMP symbols is the longest
// loop of the coder. Its RAM ports are fully used at one symbol per cycle,
// so the table is duplicated: the symbols of mem0 are counted into FA0 and
// those of mem1 into FA1, each by its own forwarding read-modify-write
// pipeline. Later stages read both tables at the same address and add the
// two words to get the frequency. This follows the source design.
//
// Timing: one address per cycle into mem0/mem1 (read latency 1), then two
// rmw_pipe instances (2 more cycles). NSAMP/2 + 4 cycles from start to the
// done pulse. The count tables must be zero at start.
module c1a_count #(
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
  output logic [SYM_W-1:0] fa0_raddr,
  input  logic [FW-1:0]    fa0_rdata,
  output logic             fa0_we,
  output logic [SYM_W-1:0] fa0_waddr,
  output logic [FW-1:0]    fa0_wdata,
  output logic [SYM_W-1:0] fa1_raddr,
  input  logic [FW-1:0]    fa1_rdata,
  output logic             fa1_we,
  output logic [SYM_W-1:0] fa1_waddr,
  output logic [FW-1:0]    fa1_wdata,
  output logic             done
);

  logic          busy, rv;
  logic [MA:0]   cnt;
  logic [2:0]    tail;     // pipeline drain after the last read

  assign m_raddr = cnt[MA-1:0];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy <= 1'b0; cnt <= '0; rv <= 1'b0; tail <= '0; done <= 1'b0;
    end else begin
      done <= 1'b0;
      rv   <= busy && (cnt < (MA+1)'(NSAMP/2));
      if (start) begin
        busy <= 1'b1; cnt <= '0; tail <= '0;
      end else if (busy) begin
        if (cnt < (MA+1)'(NSAMP/2)) cnt <= cnt + 1'b1;
        else begin
          tail <= tail + 1'b1;
          if (tail == 3'd2) begin busy <= 1'b0; done <= 1'b1; end
        end
      end
    end
  end

  logic             w0v, w1v;
  logic [SYM_W-1:0] w0a, w1a;
  logic [FW-1:0]    w0o, w1o;
  logic             w0t, w1t;

  rmw_pipe #(.AW(SYM_W), .DW(FW), .TW(1)) u_p0 (
    .clk, .rst_n, .in_valid(rv), .in_addr(m0_rdata), .in_tag(1'b0),
    .raddr(fa0_raddr), .rdata(fa0_rdata), .we(fa0_we), .waddr(fa0_waddr), .wdata(fa0_wdata),
    .w_valid(w0v), .w_addr(w0a), .w_old(w0o), .w_tag(w0t));

  rmw_pipe #(.AW(SYM_W), .DW(FW), .TW(1)) u_p1 (
    .clk, .rst_n, .in_valid(rv), .in_addr(m1_rdata), .in_tag(1'b0),
    .raddr(fa1_raddr), .rdata(fa1_rdata), .we(fa1_we), .waddr(fa1_waddr), .wdata(fa1_wdata),
    .w_valid(w1v), .w_addr(w1a), .w_old(w1o), .w_tag(w1t));

endmodule
