// Pipelined read-modify-write (increment) over a simple dual-port RAM.
//
// Implements the loop body  T(a) = T(a) + 1  at one iteration per cycle, so
// n iterations finish in n+2 cycles instead of 3n. Each iteration passes
// three stages:
//   A   : the address goes to the RAM read port,
//   D/M : the old word arrives and is incremented,
//   W   : the new word is written.
// Because the RAM returns old data on a same-cycle read/write, an iteration
// in D/M can see a stale word when one of the two iterations ahead of it
// used the same address: the one now in W (writing this cycle) and the one
// that wrote in the previous cycle. Both are forwarded, the nearer first.
//
// Interface: in_valid/in_addr/in_tag enter stage A. The RAM ports are driven
// directly (raddr is combinational from in_addr). In stage W the block also
// shows w_valid, w_addr, w_old (the correct value before the increment) and
// w_tag, which callers use to write other tables in the same cycle.
// Latency from in_valid to the write is 2 cycles.
module rmw_pipe #(
  parameter int unsigned AW = 8,
  parameter int unsigned DW = 12,
  parameter int unsigned TW = 8
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          in_valid,
  input  logic [AW-1:0] in_addr,
  input  logic [TW-1:0] in_tag,
  // RAM ports
  output logic [AW-1:0] raddr,
  input  logic [DW-1:0] rdata,
  output logic          we,
  output logic [AW-1:0] waddr,
  output logic [DW-1:0] wdata,
  // stage W view
  output logic          w_valid,
  output logic [AW-1:0] w_addr,
  output logic [DW-1:0] w_old,
  output logic [TW-1:0] w_tag
);

  logic          d_valid;
  logic [AW-1:0] d_addr;
  logic [TW-1:0] d_tag;
  logic [DW-1:0] d_old;
  logic          x_valid;      // the write issued one cycle ago
  logic [AW-1:0] x_addr;
  logic [DW-1:0] x_data;

  assign raddr = in_addr;

  // D/M: pick the freshest copy of the word.
  always_comb begin
    if (w_valid && w_addr == d_addr)      d_old = w_old + DW'(1);
    else if (x_valid && x_addr == d_addr) d_old = x_data;
    else                                  d_old = rdata;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      d_valid <= 1'b0;
      w_valid <= 1'b0;
      x_valid <= 1'b0;
      d_addr  <= '0;
      d_tag   <= '0;
      w_addr  <= '0;
      w_old   <= '0;
      w_tag   <= '0;
      x_addr  <= '0;
      x_data  <= '0;
    end else begin
      d_valid <= in_valid;
      d_addr  <= in_addr;
      d_tag   <= in_tag;
      w_valid <= d_valid;
      w_addr  <= d_addr;
      w_old   <= d_old;
      w_tag   <= d_tag;
      x_valid <= w_valid;
      x_addr  <= w_addr;
      x_data  <= wdata;
    end
  end

  assign we    = w_valid;
  assign waddr = w_addr;
  assign wdata = w_old + DW'(1);

endmodule
