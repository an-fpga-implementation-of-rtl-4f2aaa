// C2a: in-place construction of the code tree (parent pointers).
//
// Input: Fs(0..n-1), the n symbol frequencies in non-increasing order.
// The two smallest leaves form internal node n-2. Then for k = n-3 down to
// 0 two items are taken, each the smaller of the next unused internal node
// L(i) and the next unused leaf Fs(f) (a leaf wins a tie); internal node k
// gets the sum of the two weights, L(k) = T + x, and each item taken has its
// word overwritten by its parent k. Afterwards Fs(f) holds the parent of
// leaf f and L(k) the parent of internal node k (k > 0); L(0) is the root.
// These are the two predicate reads and the conditional writes of the
// source design: which table is written, and where, depends on the two
// comparisons of the iteration.
//
// Schedule: 4 cycles per iteration, the single-clock variant the source
// design selects (its 3-cycle variant is not built):
//   S0 first pick:  parent write of the item taken, read of its successor
//   S1 successor word arrives
//   S2 second pick: L(k) written with the node weight, Fs parent written if
//      a leaf was taken, read of the successor
//   S3 successor word arrives; L parent written if a node was taken (the
//      only cycle the L write port is free again)
// The words L(i) and Fs(f) at the two pointers are held in registers. When
// the node pointer reaches k, the weight of node k is forwarded from the
// register because it was written in the same cycle as it was read.
//
// This design's choices: the two leaves of node n-2 get the parent pointer
// n-2 during initialisation (so C2c can treat every leaf alike), and a
// single symbol (n = 1) gets the root as parent, i.e. a 1-bit code.
//
// Timing: n = 1: 2 cycles; n >= 2: 4 cycles of set-up plus 4 per iteration.
module c2a_tree #(
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

  typedef enum logic [3:0] {IDLE, ONE, R0, R1, R2, S0, S1, S2, S3} state_e;
  state_e state;

  // pointers: one extra bit so that "below 0" shows as the sign bit
  logic signed [SYM_W+1:0] k, i, f;
  logic [FW-1:0] li, ff, t, node_w;
  logic          pick_l;        // item taken in the last pick was a node
  logic          cond_a, cond_b;
  logic [FW-1:0] sum_b;

  wire f_neg = f[SYM_W+1];
  assign cond_a = f_neg || (li < ff);
  assign cond_b = f_neg || ((i > k) && (li < ff));
  assign sum_b  = t + (cond_b ? li : ff);

  always_comb begin
    fs_raddr = '0; fs_we = 1'b0; fs_waddr = '0; fs_wdata = '0;
    l_raddr  = '0; l_we  = 1'b0; l_waddr  = '0; l_wdata  = '0;
    unique case (state)
      IDLE: fs_raddr = SYM_W'(n - 2'd2);
      ONE:  begin fs_we = 1'b1; fs_waddr = '0; fs_wdata = '0; end
      R0:   fs_raddr = SYM_W'(n - 2'd1);
      R1:   begin
        fs_raddr = SYM_W'(n - 2'd3);
        l_we = 1'b1; l_waddr = SYM_W'(n - 2'd2); l_wdata = t + fs_rdata;
        fs_we = 1'b1; fs_waddr = SYM_W'(n - 2'd2); fs_wdata = FW'(n - 2'd2);
      end
      R2:   begin
        fs_we = 1'b1; fs_waddr = SYM_W'(n - 2'd1); fs_wdata = FW'(n - 2'd2);
      end
      S0:   begin
        if (cond_a) begin
          l_we = 1'b1; l_waddr = SYM_W'(i); l_wdata = FW'(k);
          l_raddr = SYM_W'(i - 1);
        end else begin
          fs_we = 1'b1; fs_waddr = SYM_W'(f); fs_wdata = FW'(k);
          fs_raddr = SYM_W'(f - 1);
        end
      end
      S2:   begin
        l_we = 1'b1; l_waddr = SYM_W'(k); l_wdata = sum_b;
        if (cond_b) l_raddr = SYM_W'(i - 1);
        else begin
          fs_we = 1'b1; fs_waddr = SYM_W'(f); fs_wdata = FW'(k);
          fs_raddr = SYM_W'(f - 1);
        end
      end
      S3:   if (pick_l) begin
        l_we = 1'b1; l_waddr = SYM_W'(i + 1); l_wdata = FW'(k);
      end
      default: ;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= IDLE; done <= 1'b0;
      k <= '0; i <= '0; f <= '0; li <= '0; ff <= '0; t <= '0; node_w <= '0; pick_l <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (state)
        IDLE: if (start) state <= (n < 2) ? ONE : R0;
        ONE:  begin state <= IDLE; done <= 1'b1; end
        R0:   begin t <= fs_rdata; state <= R1; end           // Fs(n-2)
        R1:   begin                                           // Fs(n-1)
          li <= t + fs_rdata;
          i  <= (SYM_W+2)'(n) - 2;
          f  <= (SYM_W+2)'(n) - 3;
          k  <= (SYM_W+2)'(n) - 3;
          state <= R2;
        end
        R2:   begin                                           // Fs(n-3)
          ff <= fs_rdata;
          if (n == 2) begin state <= IDLE; done <= 1'b1; end
          else state <= S0;
        end
        S0:   begin
          t      <= cond_a ? li : ff;
          pick_l <= cond_a;
          if (cond_a) i <= i - 1; else f <= f - 1;
          state  <= S1;
        end
        S1:   begin
          if (pick_l) li <= l_rdata; else ff <= fs_rdata;
          state <= S2;
        end
        S2:   begin
          node_w <= sum_b;
          pick_l <= cond_b;
          if (cond_b) i <= i - 1; else f <= f - 1;
          state  <= S3;
        end
        S3:   begin
          if (i == k)      li <= node_w;
          else if (pick_l) li <= l_rdata;
          if (!pick_l)     ff <= fs_rdata;
          if (k == 0) begin state <= IDLE; done <= 1'b1; end
          else begin k <= k - 1; state <= S0; end
        end
        default: state <= IDLE;
      endcase
    end
  end

endmodule
