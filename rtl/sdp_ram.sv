// Simple dual-port RAM: one read port, one write port, one clock.
//
// A read address presented in cycle t returns its word in cycle t+1 (the
// output is registered). A write in cycle t lands at the end of cycle t, so a
// read of the same address in the same cycle returns the old word and only a
// later read sees the new one. There is no write-through bypass: every stage
// that needs a just-written value forwards it itself. This is the memory
// behaviour the whole coder is scheduled around.
//
// Ports: raddr/rdata (read), we/waddr/wdata (write). No reset: contents are
// undefined until written. Depth is 2**AW words of DW bits.
module sdp_ram #(
  parameter int unsigned AW = 8,
  parameter int unsigned DW = 12
) (
  input  logic          clk,
  input  logic [AW-1:0] raddr,
  output logic [DW-1:0] rdata,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  logic [DW-1:0] wdata
);

  logic [DW-1:0] mem [2**AW];

  always_ff @(posedge clk) begin
    rdata <= mem[raddr];
    if (we) mem[waddr] <= wdata;
  end

endmodule
