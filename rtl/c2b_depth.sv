// C2b: depths of the internal nodes.
//
// After C2a, L(k) holds the parent of internal node k (k = 1..n-2), and the
// parent always has a smaller index. The loop  L(0) = 0;
// L(k) = L(L(k)) + 1  for k = 1..n-2  therefore turns parent pointers into
// depths in one ascending pass, in place.
//
// Schedule: 2 cycles per iteration, two states, as in the source design:
//   state 0 (SA): receives L(L(k-1)), registers depth(k-1) = L(L(k-1)) + 1,
//                 reads L(k);
//   state 1 (SB): receives the parent p = L(k), reads L(p) and writes the
//                 registered depth of node k-1.
// The read of L(p) and the write of node k-1 share a cycle. When p = k-1
// the RAM returns the old word, so the registered depth is bypassed to the
// next state 0 instead; this is the only hazard of the loop.
//
// Timing: 2*(n-2) + 2 cycles from start to done for n > 2, 1 otherwise.
module c2b_depth #(
  parameter int unsigned SYM_W = 8,
  parameter int unsigned FW    = 12
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             start,
  input  logic [SYM_W:0]   n,
  output logic [SYM_W-1:0] l_raddr,
  input  logic [FW-1:0]    l_rdata,
  output logic             l_we,
  output logic [SYM_W-1:0] l_waddr,
  output logic [FW-1:0]    l_wdata,
  output logic             done
);

  typedef enum logic [1:0] {IDLE, SA, SB, FIN} state_e;
  state_e state;

  logic [SYM_W:0] k;
  logic           first;     // no depth pending in the first state 1
  logic           bypass;    // L(p) read collided with the pending write
  logic [FW-1:0]  depth;     // depth of node k-1, not yet written
  logic [FW-1:0]  d_in;

  assign d_in = bypass ? depth : l_rdata;

  always_comb begin
    l_raddr = '0; l_we = 1'b0; l_waddr = '0; l_wdata = '0;
    unique case (state)
      IDLE: if (start) begin l_we = 1'b1; l_waddr = '0; l_wdata = '0; l_raddr = SYM_W'(1); end
      SA:   l_raddr = SYM_W'(k + 1'b1);
      SB:   begin
        l_raddr = SYM_W'(l_rdata);
        if (!first) begin l_we = 1'b1; l_waddr = SYM_W'(k - 1'b1); l_wdata = depth; end
      end
      FIN:  begin l_we = 1'b1; l_waddr = SYM_W'(k - 1'b1); l_wdata = depth; end
      default: ;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= IDLE; k <= '0; first <= 1'b0; bypass <= 1'b0; depth <= '0; done <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (state)
        IDLE: if (start) begin
          k     <= (SYM_W+1)'(1);
          first <= 1'b1;
          if (n > 2) state <= SB;   // L(1) read issued here
          else begin state <= IDLE; done <= 1'b1; end
        end
        SB:   begin
          bypass <= !first && (SYM_W+1)'(l_rdata) == k - 1'b1;
          first  <= 1'b0;
          state  <= SA;
        end
        SA:   begin
          depth <= d_in + 1'b1;
          k     <= k + 1'b1;
          state <= (k + 1'b1 > n - (SYM_W+1)'(2)) ? FIN : SB;
        end
        FIN:  begin state <= IDLE; done <= 1'b1; end
        default: state <= IDLE;
      endcase
    end
  end

endmodule
