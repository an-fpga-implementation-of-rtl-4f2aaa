// C1c: bucket start positions for a non-increasing sort.
//
// Walks F2 from the largest frequency max_f down to 1. Each entry F2(v),
// the number of symbols of frequency v, is replaced by the 1-based position
// at which the first symbol of frequency v goes in the frequency-sorted
// table: one plus the number of symbols with a larger frequency. Only
// max_f entries are visited, the saving the source design gets from
// recording max_f in C1b.
//
// Timing: one address per cycle; the word read in cycle t is rewritten in
// cycle t+1 while the next address is read, so no forwarding is needed.
// max_f + 2 cycles from start to done (3 when max_f is 0).
module c1c_bucket #(
  parameter int unsigned NSAMP = 2048,
  parameter int unsigned FW    = $clog2(NSAMP + 1)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  logic [FW-1:0] max_f,
  output logic [FW-1:0] f2_raddr,
  input  logic [FW-1:0] f2_rdata,
  output logic          f2_we,
  output logic [FW-1:0] f2_waddr,
  output logic [FW-1:0] f2_wdata,
  output logic          done
);

  logic          busy, rv;
  logic [FW-1:0] v, v_d, acc;

  assign f2_raddr = v;
  assign f2_we    = rv;
  assign f2_waddr = v_d;
  assign f2_wdata = acc + 1'b1;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy <= 1'b0; rv <= 1'b0; v <= '0; v_d <= '0; acc <= '0; done <= 1'b0;
    end else begin
      done <= 1'b0;
      v_d  <= v;
      rv   <= busy && (v != '0);
      if (rv) acc <= acc + f2_rdata;
      if (start) begin
        busy <= 1'b1; v <= max_f; acc <= '0;
      end else if (busy) begin
        if (v != '0) v <= v - 1'b1;
        else begin busy <= 1'b0; done <= 1'b1; end
      end
    end
  end

endmodule
