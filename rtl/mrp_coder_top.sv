// Minimum-redundancy prefix coder: top level.
//
// Compresses blocks of NSAMP samples with a prefix code that is optimal for
// the block's own symbol statistics (a Huffman code, built in linear time
// without any priority queue). The stages run one after another over a set
// of simple dual-port RAMs, each stage pipelined to about one loop
// iteration per cycle:
//   C0   DPCM + positive mapping, 2 samples/cycle  -> MEM0, MEM1
//   C1a  frequency count, 2 symbols/cycle          -> FA0, FA1 (duplicated)
//        (C1_OPT = 0: 1 symbol/cycle               -> FA0 only)
//   C1b  frequency-of-frequency table              -> F2, n, max_f, max_sym
//   C1c  bucket start positions                    -> F2
//   C1de counting-sort placement                   -> IDX, FS
//   C1e  (C1_OPT = 0 only) FS(j) = F(IDX(j))       -> FS
//   C2a  tree build (parent pointers), 4 or 3 cyc/iter -> FS, L
//   C2b  internal node depths, 2 cyc/iter          -> L
//   C2c  leaf code lengths                         -> LEN
//   C3   canonical codewords at symbol addresses   -> CW
//   C4   map samples to codewords, pack bits       -> out_*
// The stage order, the memories, the duplicated C1a tables, the merged
// C1d/C1e pass and both C2a schedules follow the source design; the
// stage handshakes and the table clearing are this design's. C2A_CYCLES
// selects the C2a schedule: 4 (default, the source's single-clock choice)
// or 3 (fewer cycles, longer critical path). C1_OPT = 0 gives the source's
// first prototype of the frequency stage: one count table (no FA1), one
// symbol per cycle in C1a, and Fs built by a separate C1e pass.
//
// The count tables FA0/FA1 and F2 must start at zero. A clear counter
// zeroes them while C0 and C1a run (neither uses F2), so no clearing time
// is added at the default sizes; with very small NSAMP C1a or C1b waits
// for it.
//
// Interface: pulse start while idle, then feed NSAMP/2 beats of two samples
// (in_d0 = sample 2j, in_d1 = sample 2j+1) with in_valid/in_ready. The
// compressed block leaves as OUT_W-bit words on out_valid (no back-
// pressure); the last word has out_last set and out_nbits valid bits
// (0 = none). done pulses with out_last. n_symbols gives the number of
// distinct symbols of the last block. A new block may start once done has
// pulsed. At the default sizes a block takes at most 8,226 cycles
// (C1_OPT = 0: 9,510; C1_OPT = 0 with C2A_CYCLES = 3: 9,258).
module mrp_coder_top
  import mrp_pkg::*;
#(
  parameter int unsigned NSAMP = NSAMP_DEF,
  parameter int unsigned NSYM  = NSYM_DEF,
  parameter int unsigned C2A_CYCLES = 4,   // C2a schedule: 4 or 3 cycles/iteration
  parameter bit          C1_OPT     = 1'b1  // 1: duplicated count tables, C1d+C1e merged
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                start,
  input  logic                in_valid,
  output logic                in_ready,
  input  logic [SAMPLE_W-1:0] in_d0,
  input  logic [SAMPLE_W-1:0] in_d1,
  output logic                out_valid,
  output logic [OUT_W-1:0]    out_word,
  output logic                out_last,
  output logic [$clog2(OUT_W)-1:0] out_nbits,
  output logic [$clog2(NSYM):0] n_symbols,
  output logic                busy,
  output logic                done
);

  localparam int unsigned SW  = $clog2(NSYM);
  localparam int unsigned FW  = $clog2(NSAMP + 1);
  localparam int unsigned MA  = $clog2(NSAMP/2);
  localparam int unsigned CWW = LEN_W + CODE_W;
  localparam int unsigned CLR_N = (NSYM > NSAMP + 1) ? NSYM : NSAMP + 1;

  stage_e state;
  logic   launched;          // the current stage has had its start pulse
  logic   st_start;          // start pulse of the current stage
  logic   ready_to_launch;

  // ---------------- RAM ports ----------------
  logic [MA-1:0]  m_raddr, m_waddr;   logic m_we;
  logic [SW-1:0]  m0_rdata, m1_rdata, m0_wdata, m1_wdata;
  logic [SW-1:0]  fa0_raddr, fa0_waddr, fa1_raddr, fa1_waddr;
  logic           fa0_we, fa1_we;
  logic [FW-1:0]  fa0_rdata, fa0_wdata, fa1_rdata, fa1_wdata;
  logic [FW-1:0]  f2_raddr, f2_waddr, f2_rdata, f2_wdata;   logic f2_we;
  logic [SW-1:0]  idx_raddr, idx_waddr, idx_rdata, idx_wdata; logic idx_we;
  logic [SW-1:0]  fs_raddr, fs_waddr;  logic fs_we;
  logic [FW-1:0]  fs_rdata, fs_wdata;
  logic [SW-1:0]  l_raddr, l_waddr;    logic l_we;
  logic [FW-1:0]  l_rdata, l_wdata;
  logic [SW-1:0]  len_raddr, len_waddr; logic len_we;
  logic [LEN_W-1:0] len_rdata, len_wdata;
  logic [SW-1:0]  cw_raddr, cw_waddr;  logic cw_we;
  logic [CWW-1:0] cw_rdata, cw_wdata;

  sdp_ram #(.AW(MA), .DW(SW)) u_mem0 (.clk, .raddr(m_raddr), .rdata(m0_rdata), .we(m_we), .waddr(m_waddr), .wdata(m0_wdata));
  sdp_ram #(.AW(MA), .DW(SW)) u_mem1 (.clk, .raddr(m_raddr), .rdata(m1_rdata), .we(m_we), .waddr(m_waddr), .wdata(m1_wdata));
  sdp_ram #(.AW(SW), .DW(FW)) u_fa0  (.clk, .raddr(fa0_raddr), .rdata(fa0_rdata), .we(fa0_we), .waddr(fa0_waddr), .wdata(fa0_wdata));
  if (C1_OPT) begin : g_fa1
    sdp_ram #(.AW(SW), .DW(FW)) u_fa1 (.clk, .raddr(fa1_raddr), .rdata(fa1_rdata), .we(fa1_we), .waddr(fa1_waddr), .wdata(fa1_wdata));
  end else begin : g_no_fa1
    assign fa1_rdata = '0;   // single count table: the second term of every sum is 0
  end
  sdp_ram #(.AW(FW), .DW(FW)) u_f2   (.clk, .raddr(f2_raddr), .rdata(f2_rdata), .we(f2_we), .waddr(f2_waddr), .wdata(f2_wdata));
  sdp_ram #(.AW(SW), .DW(SW)) u_idx  (.clk, .raddr(idx_raddr), .rdata(idx_rdata), .we(idx_we), .waddr(idx_waddr), .wdata(idx_wdata));
  sdp_ram #(.AW(SW), .DW(FW)) u_fs   (.clk, .raddr(fs_raddr), .rdata(fs_rdata), .we(fs_we), .waddr(fs_waddr), .wdata(fs_wdata));
  sdp_ram #(.AW(SW), .DW(FW)) u_l    (.clk, .raddr(l_raddr), .rdata(l_rdata), .we(l_we), .waddr(l_waddr), .wdata(l_wdata));
  sdp_ram #(.AW(SW), .DW(LEN_W)) u_len (.clk, .raddr(len_raddr), .rdata(len_rdata), .we(len_we), .waddr(len_waddr), .wdata(len_wdata));
  sdp_ram #(.AW(SW), .DW(CWW)) u_cw  (.clk, .raddr(cw_raddr), .rdata(cw_rdata), .we(cw_we), .waddr(cw_waddr), .wdata(cw_wdata));

  // ---------------- stages ----------------
  logic s_c0, s_c1a, s_c1b, s_c1c, s_c1de, s_c1e, s_c2a, s_c2b, s_c2c, s_c3, s_c4;
  logic d_c0, d_c1a, d_c1b, d_c1c, d_c1de, d_c1e, d_c2a, d_c2b, d_c2c, d_c3, d_c4;
  assign s_c0   = st_start && state == ST_C0;
  assign s_c1a  = st_start && state == ST_C1A;
  assign s_c1b  = st_start && state == ST_C1B;
  assign s_c1c  = st_start && state == ST_C1C;
  assign s_c1de = st_start && state == ST_C1DE;
  assign s_c1e  = st_start && state == ST_C1E;
  assign s_c2a  = st_start && state == ST_C2A;
  assign s_c2b  = st_start && state == ST_C2B;
  assign s_c2c  = st_start && state == ST_C2C;
  assign s_c3   = st_start && state == ST_C3;
  assign s_c4   = st_start && state == ST_C4;

  logic [SW:0]   n_nz;
  logic [FW-1:0] max_f;
  logic [SW-1:0] max_sym;

  c0_dpcm #(.NSAMP(NSAMP), .SAMPLE_W(SAMPLE_W), .SYM_W(SW)) u_c0 (
    .clk, .rst_n, .start(s_c0), .in_valid, .in_ready, .in_d0, .in_d1,
    .m_we, .m_waddr, .m0_wdata, .m1_wdata, .done(d_c0));

  logic [MA-1:0] c1a_m_raddr, c4_m_raddr;
  logic [SW-1:0] c1a_fa0_waddr, c1a_fa1_waddr, c1a_fa0_raddr, c1a_fa1_raddr;
  logic [FW-1:0] c1a_fa0_wdata, c1a_fa1_wdata;
  logic          c1a_fa0_we, c1a_fa1_we;
  if (C1_OPT) begin : g_c1a2
    c1a_count #(.NSAMP(NSAMP), .SYM_W(SW), .FW(FW)) u_c1a (
      .clk, .rst_n, .start(s_c1a), .m_raddr(c1a_m_raddr), .m0_rdata, .m1_rdata,
      .fa0_raddr(c1a_fa0_raddr), .fa0_rdata, .fa0_we(c1a_fa0_we), .fa0_waddr(c1a_fa0_waddr), .fa0_wdata(c1a_fa0_wdata),
      .fa1_raddr(c1a_fa1_raddr), .fa1_rdata, .fa1_we(c1a_fa1_we), .fa1_waddr(c1a_fa1_waddr), .fa1_wdata(c1a_fa1_wdata),
      .done(d_c1a));
  end else begin : g_c1a1
    c1a_count1 #(.NSAMP(NSAMP), .SYM_W(SW), .FW(FW)) u_c1a (
      .clk, .rst_n, .start(s_c1a), .m_raddr(c1a_m_raddr), .m0_rdata, .m1_rdata,
      .fa_raddr(c1a_fa0_raddr), .fa_rdata(fa0_rdata), .fa_we(c1a_fa0_we), .fa_waddr(c1a_fa0_waddr), .fa_wdata(c1a_fa0_wdata),
      .done(d_c1a));
    assign c1a_fa1_raddr = '0;
    assign c1a_fa1_we    = 1'b0;
    assign c1a_fa1_waddr = '0;
    assign c1a_fa1_wdata = '0;
  end

  logic [SW-1:0] c1b_fa_raddr, c1de_fa_raddr;
  logic [FW-1:0] c1b_f2_raddr, c1b_f2_waddr, c1b_f2_wdata;  logic c1b_f2_we;
  c1b_freq2 #(.NSAMP(NSAMP), .SYM_W(SW), .FW(FW)) u_c1b (
    .clk, .rst_n, .start(s_c1b), .fa_raddr(c1b_fa_raddr), .fa0_rdata, .fa1_rdata,
    .f2_raddr(c1b_f2_raddr), .f2_rdata, .f2_we(c1b_f2_we), .f2_waddr(c1b_f2_waddr), .f2_wdata(c1b_f2_wdata),
    .n_nz, .max_f, .max_sym, .done(d_c1b));

  logic [FW-1:0] c1c_f2_raddr, c1c_f2_waddr, c1c_f2_wdata;  logic c1c_f2_we;
  c1c_bucket #(.NSAMP(NSAMP), .FW(FW)) u_c1c (
    .clk, .rst_n, .start(s_c1c), .max_f,
    .f2_raddr(c1c_f2_raddr), .f2_rdata, .f2_we(c1c_f2_we), .f2_waddr(c1c_f2_waddr), .f2_wdata(c1c_f2_wdata),
    .done(d_c1c));

  logic [FW-1:0] c1de_f2_raddr, c1de_f2_waddr, c1de_f2_wdata;  logic c1de_f2_we;
  logic [SW-1:0] c1de_fs_waddr;  logic [FW-1:0] c1de_fs_wdata;  logic c1de_fs_we;
  c1de_sort #(.NSAMP(NSAMP), .SYM_W(SW), .FW(FW)) u_c1de (
    .clk, .rst_n, .start(s_c1de), .max_sym, .fa_raddr(c1de_fa_raddr), .fa0_rdata, .fa1_rdata,
    .f2_raddr(c1de_f2_raddr), .f2_rdata, .f2_we(c1de_f2_we), .f2_waddr(c1de_f2_waddr), .f2_wdata(c1de_f2_wdata),
    .idx_we, .idx_waddr, .idx_wdata,
    .fs_we(c1de_fs_we), .fs_waddr(c1de_fs_waddr), .fs_wdata(c1de_fs_wdata), .done(d_c1de));

  logic [SW-1:0] c1e_idx_raddr, c1e_fa_raddr, c1e_fs_waddr;
  logic [FW-1:0] c1e_fs_wdata;  logic c1e_fs_we;
  if (!C1_OPT) begin : g_c1e
    c1e_gather #(.SYM_W(SW), .FW(FW)) u_c1e (
      .clk, .rst_n, .start(s_c1e), .n(n_nz), .idx_raddr(c1e_idx_raddr), .idx_rdata,
      .fa_raddr(c1e_fa_raddr), .fa0_rdata, .fa1_rdata,
      .fs_we(c1e_fs_we), .fs_waddr(c1e_fs_waddr), .fs_wdata(c1e_fs_wdata), .done(d_c1e));
  end else begin : g_no_c1e
    assign c1e_idx_raddr = '0;
    assign c1e_fa_raddr  = '0;
    assign c1e_fs_we     = 1'b0;
    assign c1e_fs_waddr  = '0;
    assign c1e_fs_wdata  = '0;
    assign d_c1e         = 1'b0;
  end

  logic [SW-1:0] c2a_fs_raddr, c2a_fs_waddr, c2a_l_raddr, c2a_l_waddr;
  logic [FW-1:0] c2a_fs_wdata, c2a_l_wdata;  logic c2a_fs_we, c2a_l_we;
  if (C2A_CYCLES == 3) begin : g_c2a3
    c2a_tree3 #(.SYM_W(SW), .FW(FW)) u_c2a (
      .clk, .rst_n, .start(s_c2a), .n(n_nz),
      .fs_raddr(c2a_fs_raddr), .fs_rdata, .fs_we(c2a_fs_we), .fs_waddr(c2a_fs_waddr), .fs_wdata(c2a_fs_wdata),
      .l_raddr(c2a_l_raddr), .l_rdata, .l_we(c2a_l_we), .l_waddr(c2a_l_waddr), .l_wdata(c2a_l_wdata),
      .done(d_c2a));
  end else begin : g_c2a4
    c2a_tree #(.SYM_W(SW), .FW(FW)) u_c2a (
      .clk, .rst_n, .start(s_c2a), .n(n_nz),
      .fs_raddr(c2a_fs_raddr), .fs_rdata, .fs_we(c2a_fs_we), .fs_waddr(c2a_fs_waddr), .fs_wdata(c2a_fs_wdata),
      .l_raddr(c2a_l_raddr), .l_rdata, .l_we(c2a_l_we), .l_waddr(c2a_l_waddr), .l_wdata(c2a_l_wdata),
      .done(d_c2a));
  end

  logic [SW-1:0] c2b_l_raddr, c2b_l_waddr;  logic [FW-1:0] c2b_l_wdata;  logic c2b_l_we;
  c2b_depth #(.SYM_W(SW), .FW(FW)) u_c2b (
    .clk, .rst_n, .start(s_c2b), .n(n_nz),
    .l_raddr(c2b_l_raddr), .l_rdata, .l_we(c2b_l_we), .l_waddr(c2b_l_waddr), .l_wdata(c2b_l_wdata),
    .done(d_c2b));

  logic [SW-1:0] c2c_fs_raddr, c2c_l_raddr;
  c2c_len #(.SYM_W(SW), .FW(FW), .LW(LEN_W)) u_c2c (
    .clk, .rst_n, .start(s_c2c), .n(n_nz), .fs_raddr(c2c_fs_raddr), .fs_rdata,
    .l_raddr(c2c_l_raddr), .l_rdata, .len_we, .len_waddr, .len_wdata, .done(d_c2c));

  logic [SW-1:0] c3_rd_addr;
  c3_codegen #(.SYM_W(SW), .LW(LEN_W), .CODE_W(CODE_W)) u_c3 (
    .clk, .rst_n, .start(s_c3), .n(n_nz), .rd_addr(c3_rd_addr), .len_rdata, .idx_rdata,
    .cw_we, .cw_waddr, .cw_wdata, .done(d_c3));

  c4_mapper #(.NSAMP(NSAMP), .SYM_W(SW), .LW(LEN_W), .CODE_W(CODE_W), .OUT_W(OUT_W)) u_c4 (
    .clk, .rst_n, .start(s_c4), .m_raddr(c4_m_raddr), .m0_rdata, .m1_rdata,
    .cw_raddr, .cw_rdata, .out_valid, .out_word, .out_last, .out_nbits, .done(d_c4));

  assign idx_raddr = (state == ST_C1E) ? c1e_idx_raddr : c3_rd_addr;
  assign len_raddr = c3_rd_addr;

  // ---------------- table clearing ----------------
  logic [FW:0] clr_cnt;
  logic        clr_run;
  wire         clr_fa = clr_run && clr_cnt < (FW+1)'(NSYM);
  wire         clr_f2 = clr_run && clr_cnt < (FW+1)'(NSAMP + 1);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      clr_cnt <= '0; clr_run <= 1'b0;
    end else if (state == ST_IDLE && start) begin
      clr_cnt <= '0; clr_run <= 1'b1;
    end else if (clr_run) begin
      if (clr_cnt == (FW+1)'(CLR_N - 1)) clr_run <= 1'b0;
      clr_cnt <= clr_cnt + 1'b1;
    end
  end

  // ---------------- port multiplexing ----------------
  always_comb begin
    m_raddr   = (state == ST_C4) ? c4_m_raddr : c1a_m_raddr;
    // FA0/FA1: read by C1a, C1b, C1de; written by the clear and by C1a
    unique case (state)
      ST_C1B:  begin fa0_raddr = c1b_fa_raddr;  fa1_raddr = c1b_fa_raddr;  end
      ST_C1DE: begin fa0_raddr = c1de_fa_raddr; fa1_raddr = c1de_fa_raddr; end
      ST_C1E:  begin fa0_raddr = c1e_fa_raddr;  fa1_raddr = c1e_fa_raddr;  end
      default: begin fa0_raddr = c1a_fa0_raddr; fa1_raddr = c1a_fa1_raddr; end
    endcase
    if (clr_fa) begin
      fa0_we = 1'b1; fa0_waddr = SW'(clr_cnt); fa0_wdata = '0;
      fa1_we = 1'b1; fa1_waddr = SW'(clr_cnt); fa1_wdata = '0;
    end else begin
      fa0_we = c1a_fa0_we; fa0_waddr = c1a_fa0_waddr; fa0_wdata = c1a_fa0_wdata;
      fa1_we = c1a_fa1_we; fa1_waddr = c1a_fa1_waddr; fa1_wdata = c1a_fa1_wdata;
    end
    // F2: clear, C1b, C1c, C1de
    unique case (state)
      ST_C1C:  begin f2_raddr = c1c_f2_raddr;  f2_we = c1c_f2_we;  f2_waddr = c1c_f2_waddr;  f2_wdata = c1c_f2_wdata;  end
      ST_C1DE: begin f2_raddr = c1de_f2_raddr; f2_we = c1de_f2_we; f2_waddr = c1de_f2_waddr; f2_wdata = c1de_f2_wdata; end
      default: begin f2_raddr = c1b_f2_raddr;  f2_we = c1b_f2_we;  f2_waddr = c1b_f2_waddr;  f2_wdata = c1b_f2_wdata;  end
    endcase
    if (clr_f2) begin
      f2_we = 1'b1; f2_waddr = FW'(clr_cnt); f2_wdata = '0;
    end
    // FS: C1de (merged) or C1e writes, C2a reads/writes, C2c reads
    if (state == ST_C1DE) begin
      fs_we = C1_OPT && c1de_fs_we; fs_waddr = c1de_fs_waddr; fs_wdata = c1de_fs_wdata;
    end else if (state == ST_C1E) begin
      fs_we = c1e_fs_we;  fs_waddr = c1e_fs_waddr;  fs_wdata = c1e_fs_wdata;
    end else begin
      fs_we = c2a_fs_we;  fs_waddr = c2a_fs_waddr;  fs_wdata = c2a_fs_wdata;
    end
    fs_raddr = (state == ST_C2C) ? c2c_fs_raddr : c2a_fs_raddr;
    // L: C2a, C2b, C2c
    unique case (state)
      ST_C2B:  begin l_raddr = c2b_l_raddr; l_we = c2b_l_we; l_waddr = c2b_l_waddr; l_wdata = c2b_l_wdata; end
      ST_C2C:  begin l_raddr = c2c_l_raddr; l_we = 1'b0;     l_waddr = '0;          l_wdata = '0;          end
      default: begin l_raddr = c2a_l_raddr; l_we = c2a_l_we; l_waddr = c2a_l_waddr; l_wdata = c2a_l_wdata; end
    endcase
  end

  // ---------------- stage sequencer ----------------
  always_comb begin
    unique case (state)
      ST_C1A:  ready_to_launch = clr_cnt >= (FW+1)'(NSYM) || !clr_run;
      ST_C1B:  ready_to_launch = !clr_run;
      default: ready_to_launch = 1'b1;
    endcase
  end
  assign st_start = (state != ST_IDLE) && !launched && ready_to_launch;

  logic stage_done;
  always_comb begin
    unique case (state)
      ST_C0:   stage_done = d_c0;
      ST_C1A:  stage_done = d_c1a;
      ST_C1B:  stage_done = d_c1b;
      ST_C1C:  stage_done = d_c1c;
      ST_C1DE: stage_done = d_c1de;
      ST_C1E:  stage_done = d_c1e;
      ST_C2A:  stage_done = d_c2a;
      ST_C2B:  stage_done = d_c2b;
      ST_C2C:  stage_done = d_c2c;
      ST_C3:   stage_done = d_c3;
      ST_C4:   stage_done = d_c4;
      default: stage_done = 1'b0;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= ST_IDLE; launched <= 1'b0;
    end else begin
      if (st_start) launched <= 1'b1;
      if (state == ST_IDLE) begin
        if (start) begin state <= ST_C0; launched <= 1'b0; end
      end else if (stage_done) begin
        launched <= 1'b0;
        if (state == ST_C4)                  state <= ST_IDLE;
        else if (state == ST_C1DE && C1_OPT) state <= ST_C2A;   // no separate C1e
        else                                 state <= stage_e'(state + 1'b1);
      end
    end
  end

  assign busy      = (state != ST_IDLE);
  assign done      = d_c4;
  assign n_symbols = n_nz;

  // The count tables are cleared before C1a counts into them.
  a_fa_clear: assert property (@(posedge clk) disable iff (!rst_n) s_c1a |-> !clr_fa);
  a_f2_clear: assert property (@(posedge clk) disable iff (!rst_n) s_c1b |-> !clr_f2);

endmodule
