// End-to-end test of the prefix coder in the source's second scheme: 4-cycle
// C2a and the unoptimised frequency stage (C1_OPT = 0: one count table, one
// symbol per cycle in C1a, separate C1e pass). Sizes are the defaults (2048
// samples, 256 symbols). Same blocks, model and checks as the
// default-configuration test.
//
// Several blocks are coded back to back: a smooth random walk, uniform
// noise (almost all 256 symbols), a constant block (one symbol), a constant block
// with a non-zero DC value (two symbols), a skewed block whose code lengths jump by more than one, and a
// worst-case block (all 256 symbols, one of them dominant).
// For each block a behavioural model computes the mapped symbols, the
// frequency-sorted order, the code lengths with the same in-place tree
// algorithm, the canonical codes and the packed output; every output word
// is compared with it. Independently of that model, the total code length
// is compared with the cost of a plain Huffman construction (repeatedly
// merging the two lightest weights), which proves the code optimal, and
// the codeword table is checked for the Kraft equality.
//
// The testbench also checks the cycle counts of the stages against the
// schedule (C1a: NSAMP+4, C1e: n+3, C2a: 4 cycles per iteration, C4: NSAMP+4) and
// counts the mechanisms of the design: both forwarding paths of the
// read-modify-write pipelines, the node-weight forward of C2a, the depth
// bypass of C2b, both pick kinds of C2a, the equal-length, +1 and longer length steps of C3, and the
// one- and two-symbol cases. A mechanism that never happens is a failure.
module tb_mrp_coder_top2;
  import mrp_pkg::*;

  localparam int NSAMP = NSAMP_DEF;
  localparam int NSYM  = NSYM_DEF;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic start = 1'b0, in_valid = 1'b0, in_ready;
  logic [SAMPLE_W-1:0] in_d0 = '0, in_d1 = '0;
  logic out_valid, out_last, busy, done;
  logic [OUT_W-1:0] out_word;
  logic [$clog2(OUT_W)-1:0] out_nbits;
  logic [$clog2(NSYM):0] n_symbols;

  mrp_coder_top #(.C1_OPT(1'b0)) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // ---------------- watchdog ----------------
  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- reference model ----------------
  int samp [NSAMP];
  int sym  [NSAMP];
  int freq [NSYM];
  int order[NSYM];     // sorted position -> symbol
  int lens [NSYM];     // per symbol
  int codes[NSYM];
  int nz;
  logic [OUT_W-1:0] exp_words[$];
  int exp_last_bits;

  function automatic int pmap(int p, int x);
    int d, th;
    d  = x - p;
    th = (p < 255 - p) ? p : 255 - p;
    if (d >= 0 && d <= th)  return 2 * d;
    if (d < 0 && -d <= th)  return -2 * d - 1;
    return th + ((d < 0) ? -d : d);
  endfunction

  task automatic build_reference();
    int F[NSYM+2], L[NSYM+2], plen[NSYM+2];
    int n, n1, n2, i, f, T, pos, maxf;
    int pc, pl;
    bit acc[$];
    for (int s = 0; s < NSYM; s++) freq[s] = 0;
    for (int j = 0; j < NSAMP; j++) begin
      sym[j] = (j == 0) ? samp[0] : pmap(samp[j-1], samp[j]);
      freq[sym[j]]++;
    end
    maxf = 0; nz = 0;
    for (int s = 0; s < NSYM; s++) begin
      if (freq[s] > maxf) maxf = freq[s];
      if (freq[s] > 0) nz++;
    end
    pos = 0;
    for (int v = maxf; v >= 1; v--)
      for (int s = 0; s < NSYM; s++)
        if (freq[s] == v) begin order[pos] = s; pos++; end
    n = nz;
    // 1-based copy of the algorithm on sorted weights
    for (int k = 1; k <= n; k++) F[k] = freq[order[k-1]];
    if (n == 1) begin
      plen[1] = 1;
    end else begin
      n1 = n - 1; n2 = n - 2;
      for (int k = 0; k <= NSYM+1; k++) L[k] = 0;
      L[n1] = F[n1] + F[n]; F[n1] = n1; F[n] = n1;
      i = n1; f = n2;
      for (int k = n2; k >= 1; k--) begin
        if (f < 1 || L[i] < F[f]) begin T = L[i]; L[i] = k; i--; end
        else begin T = F[f]; F[f] = k; f--; end
        if (f < 1 || (i > k && L[i] < F[f])) begin L[k] = T + L[i]; L[i] = k; i--; end
        else begin L[k] = T + F[f]; F[f] = k; f--; end
      end
      L[1] = 0;
      for (int k = 2; k <= n1; k++) L[k] = L[L[k]] + 1;
      for (int k = 1; k <= n; k++) plen[k] = L[F[k]] + 1;
    end
    pc = -1; pl = plen[1];
    for (int k = 1; k <= n; k++) begin
      int c;
      c = (k == 1) ? 0 : (pc + 1) << (plen[k] - pl);
      lens[order[k-1]]  = plen[k];
      codes[order[k-1]] = c;
      pc = c; pl = plen[k];
    end
    exp_words.delete();
    for (int j = 0; j < NSAMP; j++)
      for (int b = lens[sym[j]] - 1; b >= 0; b--) acc.push_back(codes[sym[j]][b]);
    exp_last_bits = acc.size() % OUT_W;
    while (acc.size() % OUT_W != 0) acc.push_back(1'b0);
    for (int w = 0; w < acc.size() / OUT_W; w++) begin
      logic [OUT_W-1:0] wd;
      for (int b = 0; b < OUT_W; b++) wd[OUT_W-1-b] = acc[w*OUT_W + b];
      exp_words.push_back(wd);
    end
    if (exp_last_bits == 0) exp_words.push_back('0);
  endtask

  // cost of a plain Huffman code: sum of all merged weights
  function automatic longint huffman_cost();
    int w[$];
    longint cost = 0;
    for (int s = 0; s < NSYM; s++) if (freq[s] > 0) w.push_back(freq[s]);
    if (w.size() == 1) return w[0];
    while (w.size() > 1) begin
      int a, b;
      w.sort();
      a = w.pop_front(); b = w.pop_front();
      cost += a + b;
      w.push_back(a + b);
    end
    return cost;
  endfunction

  // ---------------- mechanism counters ----------------
  int fwd_w = 0, fwd_x = 0, node_fwd = 0, depth_byp = 0, pick_leaf = 0, pick_node = 0;
  int len_eq = 0, len_p1 = 0, len_big = 0, n_one = 0, n_two = 0, words_out = 0;
  always @(posedge clk) if (rst_n) begin
    if (dut.g_c1a1.u_c1a.u_p.d_valid && dut.g_c1a1.u_c1a.u_p.w_valid && dut.g_c1a1.u_c1a.u_p.w_addr == dut.g_c1a1.u_c1a.u_p.d_addr) fwd_w++;
    if (dut.u_c1de.u_pipe.d_valid && dut.u_c1de.u_pipe.w_valid && dut.u_c1de.u_pipe.w_addr == dut.u_c1de.u_pipe.d_addr) fwd_w++;
    if (dut.g_c1a1.u_c1a.u_p.d_valid && dut.g_c1a1.u_c1a.u_p.x_valid && dut.g_c1a1.u_c1a.u_p.x_addr == dut.g_c1a1.u_c1a.u_p.d_addr &&
        !(dut.g_c1a1.u_c1a.u_p.w_valid && dut.g_c1a1.u_c1a.u_p.w_addr == dut.g_c1a1.u_c1a.u_p.d_addr)) fwd_x++;
    if (dut.g_c2a4.u_c2a.state == dut.g_c2a4.u_c2a.S3 && dut.g_c2a4.u_c2a.i == dut.g_c2a4.u_c2a.k) node_fwd++;
    if (dut.u_c2b.state == dut.u_c2b.SA && dut.u_c2b.bypass) depth_byp++;
    if (dut.g_c2a4.u_c2a.state == dut.g_c2a4.u_c2a.S0 || dut.g_c2a4.u_c2a.state == dut.g_c2a4.u_c2a.S2) begin
      if ((dut.g_c2a4.u_c2a.state == dut.g_c2a4.u_c2a.S0) ? dut.g_c2a4.u_c2a.cond_a : dut.g_c2a4.u_c2a.cond_b) pick_node++;
      else pick_leaf++;
    end
    if (dut.u_c3.v1 && !dut.u_c3.first) begin
      if (dut.u_c3.len_rdata == dut.u_c3.prev_len) len_eq++;
      else if (dut.u_c3.len_rdata == dut.u_c3.prev_len + 1) len_p1++;
      else len_big++;
    end
  end

  // stage cycle counts
  int st_cyc [16];
  always @(posedge clk) if (rst_n && dut.state != ST_IDLE) st_cyc[dut.state]++;

  // ---------------- one block ----------------
  logic [OUT_W-1:0] got_words[$];
  int got_last_bits;
  always @(posedge clk) if (out_valid) begin
    got_words.push_back(out_word);
    if (out_last) got_last_bits = out_nbits;
  end

  task automatic run_block(input string name);
    int total;
    longint bits_model, cost;
    for (int s = 0; s < 16; s++) st_cyc[s] = 0;
    build_reference();
    got_words.delete();
    @(negedge clk); start = 1'b1; @(negedge clk); start = 1'b0;
    total = 1;
    fork
      begin
        for (int j = 0; j < NSAMP / 2; j++) begin
          in_valid = 1'b1; in_d0 = SAMPLE_W'(samp[2*j]); in_d1 = SAMPLE_W'(samp[2*j+1]);
          @(posedge clk);
          while (!in_ready) @(posedge clk);
          @(negedge clk);
        end
        in_valid = 1'b0;
      end
      begin
        while (!done) begin @(posedge clk); total++; end
      end
    join
    @(posedge clk);
    $display("%s: n=%0d cycles=%0d (C0 %0d C1a %0d C1b %0d C1c %0d C1de %0d C1e %0d C2a %0d C2b %0d C2c %0d C3 %0d C4 %0d)",
      name, nz, total, st_cyc[ST_C0], st_cyc[ST_C1A], st_cyc[ST_C1B], st_cyc[ST_C1C], st_cyc[ST_C1DE],
      st_cyc[ST_C1E], st_cyc[ST_C2A], st_cyc[ST_C2B], st_cyc[ST_C2C], st_cyc[ST_C3], st_cyc[ST_C4]);
    check(n_symbols == ($clog2(NSYM)+1)'(nz), $sformatf("%s: symbol count %0d vs %0d", name, n_symbols, nz));
    check(got_words.size() == exp_words.size(),
          $sformatf("%s: %0d words vs %0d expected", name, got_words.size(), exp_words.size()));
    for (int w = 0; w < got_words.size() && w < exp_words.size(); w++)
      check(got_words[w] == exp_words[w], $sformatf("%s: word %0d %h vs %h", name, w, got_words[w], exp_words[w]));
    check(got_last_bits == exp_last_bits, $sformatf("%s: last bits %0d vs %0d", name, got_last_bits, exp_last_bits));
    // optimality and prefix property, from the design's own codeword table
    bits_model = 0;
    begin
      real kraft = 0.0;
      for (int s = 0; s < NSYM; s++) if (freq[s] > 0) begin
        int l;
        l = int'(dut.u_cw.mem[s][LEN_W+CODE_W-1:CODE_W]);
        bits_model += longint'(l) * freq[s];
        kraft += 1.0 / real'(longint'(1) << l);
      end
      cost = huffman_cost();
      check(bits_model == cost, $sformatf("%s: code cost %0d, Huffman cost %0d", name, bits_model, cost));
      check((nz == 1) ? kraft == 0.5 : kraft == 1.0, $sformatf("%s: Kraft sum %f", name, kraft));
    end
    // schedule
    check(st_cyc[ST_C1A] == NSAMP + 5, $sformatf("%s: C1a %0d cycles", name, st_cyc[ST_C1A]));
    check(st_cyc[ST_C1E] == nz + 4, $sformatf("%s: C1e %0d cycles", name, st_cyc[ST_C1E]));
    check(st_cyc[ST_C4] == NSAMP + 5, $sformatf("%s: C4 %0d cycles", name, st_cyc[ST_C4]));
    if (nz > 2) check(st_cyc[ST_C2A] == 4 * (nz - 2) + 5, $sformatf("%s: C2a %0d cycles", name, st_cyc[ST_C2A]));
    if (nz == 1) n_one++;
    if (nz == 2) n_two++;
    words_out += got_words.size();
  endtask

  initial begin
    int x;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    repeat (2) @(posedge clk);
    // smooth random walk
    x = 128;
    for (int j = 0; j < NSAMP; j++) begin
      x += int'($urandom_range(6)) - 3;
      if (x < 0) x = 0;
      if (x > 255) x = 255;
      samp[j] = x;
    end
    run_block("walk");
    for (int j = 0; j < NSAMP; j++) samp[j] = int'($urandom_range(255));
    run_block("noise");
    for (int j = 0; j < NSAMP; j++) samp[j] = 0;
    run_block("constant");
    for (int j = 0; j < NSAMP; j++) samp[j] = 77;
    run_block("constant, non-zero DC");
    for (int j = 0; j < NSAMP; j++) samp[j] = (j % 2 == 0) ? 10 : 11;
    run_block("two-level");
    // skewed: mostly flat, a few rare large jumps -> long rare codes
    for (int j = 0; j < NSAMP; j++) samp[j] = (j % 97 == 5) ? 200 : ((j % 331 == 7) ? 30 + j % 50 : 100);
    run_block("skewed");
    x = 50;
    for (int j = 0; j < NSAMP; j++) begin
      x += int'($urandom_range(40)) - 20;
      if (x < 0) x = 0;
      if (x > 255) x = 255;
      samp[j] = x;
    end
    run_block("rough walk");
    // worst case: every one of the 256 symbols occurs and symbol 0 fills the
    // rest of the block, so both the frequency walk of C1c and the tree
    // build of C2a are at their longest together
    for (int j = 0; j < NSAMP; j++) samp[j] = 128;
    for (int s = 1, j = 2; s < NSYM; s++) begin
      for (int d = -128; d <= 127; d++)
        if (pmap(128, 128 + d) == s) begin samp[j] = 128 + d; break; end
      j += 2;
    end
    run_block("worst case");

    $display("mechanisms: fwd_w=%0d fwd_x=%0d node_fwd=%0d depth_byp=%0d pick_leaf=%0d pick_node=%0d len_eq=%0d len_p1=%0d len_big=%0d n1=%0d n2=%0d words=%0d",
             fwd_w, fwd_x, node_fwd, depth_byp, pick_leaf, pick_node, len_eq, len_p1, len_big, n_one, n_two, words_out);
    check(fwd_w > 0, "forwarding from stage W never used");
    check(fwd_x > 0, "forwarding from the previous write never used");
    check(node_fwd > 0, "C2a node-weight forward never used");
    check(depth_byp > 0, "C2b depth bypass never used");
    check(pick_leaf > 0 && pick_node > 0, "C2a pick kinds not both seen");
    check(len_eq > 0 && len_p1 > 0 && len_big > 0, "C3 length steps not all seen");
    check(n_one > 0 && n_two > 0, "one- and two-symbol blocks not both seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
