// C2a, 3-cycle variant: in-place construction of the code tree with three
// cycles per iteration. Same function, interface and results as c2a_tree
// (the 4-cycle variant); the top level picks one with its C2A_CYCLES
// parameter.
//
// Input: Fs(0..n-1), the n symbol frequencies in non-increasing order.
// Output: Fs(f) holds the parent of leaf f, L(k) the parent of internal
// node k (k > 0) and L(0) the weight of the root. The loop is the same as
// in c2a_tree: node n-2 joins the two smallest leaves; then for each k from
// n-3 down to 0 two items are taken, each the smaller of the next unused
// internal node L(i) and the next unused leaf Fs(f) (a leaf wins a tie).
//
// Schedule (predicate reads, conditional writes), per iteration:
//   P0: read L(i) and Fs(f); write L(k+1) = weight of the node made in the
//       previous iteration; write the parent of a leaf taken second in the
//       previous iteration
//   P1: read L(i-1) and Fs(f-1); write the parent of a node taken second
//       in the previous iteration
//   P2: all four candidate words are present; both picks are decided in
//       this cycle, the node weight is summed, and the parent of the item
//       taken first is written
// Both candidates of each table are read ahead, so words that are not
// taken are read again in the next iteration. The read of L(i) in P0 meets
// the write of L(k+1) in the same cycle when i = k+1; the RAM then returns
// the old word and the registered node weight is used instead. No other
// read can hit a pending write: taken items are never read again.
// Deciding both picks in one cycle gives a longer path (compare, select,
// compare, add) than the 4-cycle variant; the source reports about 20%
// lower clock frequency for this scheme.
//
// This design's choices: as in c2a_tree (the leaves of node n-2 get parent
// n-2 during set-up, a single symbol gets the root as parent).
//
// Timing: n = 1: 2 cycles; n = 2: 4 cycles; n > 2: 3*(n-2) + 6 cycles from
// start to done.
module c2a_tree3 #(
  parameter int unsigned SYM_W = 8,
  parameter int unsigned FW    = 12
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             start,
  input  logic [SYM_W:0]   n,
  output logic [SYM_W-1:0] fs_raddr,
  input  logic [FW-1:0]    fs_rdata,
  output logic             fs_we,
  output logic [SYM_W-1:0] fs_waddr,
  output logic [FW-1:0]    fs_wdata,
  output logic [SYM_W-1:0] l_raddr,
  input  logic [FW-1:0]    l_rdata,
  output logic             l_we,
  output logic [SYM_W-1:0] l_waddr,
  output logic [FW-1:0]    l_wdata,
  output logic             done
);

  typedef enum logic [3:0] {IDLE, ONE, R0, R1, R2, P0, P1, P2, E0, E1} state_e;
  state_e state;

  // pointers: one extra bit so that "below 0" shows as the sign bit
  logic signed [SYM_W+1:0] k, i, f;
  logic [FW-1:0] t, sum;          // set-up weight; weight of the last node
  logic [FW-1:0] li0, ff0;        // L(i), Fs(f) captured in P1
  logic          first;           // no node weight pending in P0
  logic          byp;             // L(i) read collided with the L(k+1) write
  logic          pend_l, pend_f;  // parent write of the second pick pending
  logic [SYM_W-1:0] pend_l_addr, pend_f_addr;
  logic [FW-1:0]    pend_val;

  // P2 decisions
  logic          cond_a, cond_b;
  logic          f_neg, f1_neg;
  logic [FW-1:0] w1, w2, li1, ff1;
  logic signed [SYM_W+1:0] i_dec, f_dec;

  assign li1    = l_rdata;        // L(i-1)
  assign ff1    = fs_rdata;       // Fs(f-1)
  assign f_neg  = f[SYM_W+1];
  assign f1_neg = f_dec[SYM_W+1];
  assign i_dec  = i - 1;
  assign f_dec  = f - 1;
  assign cond_a = f_neg || (li0 < ff0);
  always_comb begin
    if (cond_a) begin           // first pick: node i; next candidates L(i-1), Fs(f)
      cond_b = f_neg || ((i_dec > k) && (li1 < ff0));
      w1     = li0;
      w2     = cond_b ? li1 : ff0;
    end else begin              // first pick: leaf f; next candidates L(i), Fs(f-1)
      cond_b = f1_neg || (li0 < ff1);
      w1     = ff0;
      w2     = cond_b ? li0 : ff1;
    end
  end

  always_comb begin
    fs_raddr = '0; fs_we = 1'b0; fs_waddr = '0; fs_wdata = '0;
    l_raddr  = '0; l_we  = 1'b0; l_waddr  = '0; l_wdata  = '0;
    unique case (state)
      IDLE: fs_raddr = SYM_W'(n - 2'd2);
      ONE:  begin fs_we = 1'b1; fs_waddr = '0; fs_wdata = '0; end
      R0:   fs_raddr = SYM_W'(n - 2'd1);
      R1:   begin
        l_we = 1'b1; l_waddr = SYM_W'(n - 2'd2); l_wdata = t + fs_rdata;
        fs_we = 1'b1; fs_waddr = SYM_W'(n - 2'd2); fs_wdata = FW'(n - 2'd2);
      end
      R2:   begin
        fs_we = 1'b1; fs_waddr = SYM_W'(n - 2'd1); fs_wdata = FW'(n - 2'd2);
      end
      P0, E0: begin
        if (state == P0) begin l_raddr = SYM_W'(i); fs_raddr = SYM_W'(f); end
        if (!first) begin l_we = 1'b1; l_waddr = SYM_W'(k + 1); l_wdata = sum; end
        if (pend_f) begin fs_we = 1'b1; fs_waddr = pend_f_addr; fs_wdata = pend_val; end
      end
      P1, E1: begin
        if (state == P1) begin l_raddr = SYM_W'(i_dec); fs_raddr = SYM_W'(f_dec); end
        if (pend_l) begin l_we = 1'b1; l_waddr = pend_l_addr; l_wdata = pend_val; end
      end
      P2:   begin
        if (cond_a) begin l_we = 1'b1; l_waddr = SYM_W'(i); l_wdata = FW'(k); end
        else begin fs_we = 1'b1; fs_waddr = SYM_W'(f); fs_wdata = FW'(k); end
      end
      default: ;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= IDLE; done <= 1'b0;
      k <= '0; i <= '0; f <= '0; t <= '0; sum <= '0; li0 <= '0; ff0 <= '0;
      first <= 1'b0; byp <= 1'b0; pend_l <= 1'b0; pend_f <= 1'b0;
      pend_l_addr <= '0; pend_f_addr <= '0; pend_val <= '0;
    end else begin
      done <= 1'b0;
      unique case (state)
        IDLE: if (start) state <= (n < 2) ? ONE : R0;
        ONE:  begin state <= IDLE; done <= 1'b1; end
        R0:   begin t <= fs_rdata; state <= R1; end           // Fs(n-2)
        R1:   begin                                           // Fs(n-1)
          i <= (SYM_W+2)'(n) - 2;
          f <= (SYM_W+2)'(n) - 3;
          k <= (SYM_W+2)'(n) - 3;
          first <= 1'b1; pend_l <= 1'b0; pend_f <= 1'b0;
          state <= R2;
        end
        R2:   if (n == 2) begin state <= IDLE; done <= 1'b1; end
              else state <= P0;
        P0:   begin
          byp    <= !first && (i == k + 1);
          first  <= 1'b0;
          pend_f <= 1'b0;
          state  <= P1;
        end
        P1:   begin
          li0    <= byp ? sum : l_rdata;
          ff0    <= fs_rdata;
          pend_l <= 1'b0;
          state  <= P2;
        end
        P2:   begin
          sum      <= w1 + w2;
          pend_val <= FW'(k);
          pend_l   <= cond_b;
          pend_f   <= !cond_b;
          if (cond_a) begin
            pend_l_addr <= SYM_W'(i_dec);
            pend_f_addr <= SYM_W'(f);
            i <= cond_b ? i - 2 : i_dec;
            f <= cond_b ? f : f_dec;
          end else begin
            pend_l_addr <= SYM_W'(i);
            pend_f_addr <= SYM_W'(f_dec);
            i <= cond_b ? i_dec : i;
            f <= cond_b ? f_dec : f - 2;
          end
          k     <= k - 1;
          state <= (k == 0) ? E0 : P0;
        end
        E0:   begin pend_f <= 1'b0; state <= E1; end
        E1:   begin pend_l <= 1'b0; state <= IDLE; done <= 1'b1; end
        default: state <= IDLE;
      endcase
    end
  end

endmodule
