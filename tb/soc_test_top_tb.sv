// soc_test_top_tb -- end-to-end test of the decompression test architecture
// at its default size (W = 32, N = 8 blocks of b = 28 bits, K = 4 chains,
// M = 16 reserved words, 8 tester channels).
//
// The testbench plays the tester and the cores under test. For each
// session it generates random test cubes for a circuit whose scan size is
// at most N*b bits, fills every unspecified bit with the previous vector's
// value (so few blocks change), compresses the sequence into replacement
// words (one per changed block, last flag on the final one, all blocks for
// the first vector) and streams them 8 bits per cycle of a tester clock
// that is slower than, and drifts against, the system clock. The cores
// are modelled as a fixed function of the chain contents.
//
// Checks:
//   * at every capture the K chains hold exactly the next vector, block j,
//     j+K, ... in chain j (first block at the scan-out end);
//   * the MISR signature equals one computed from a model of the chains
//     fed with the expected vectors and responses;
//   * with the tester slowed to satisfy the no-overflow condition
//     M*u + e*A < (W*M/n)*T_T (A: cycles to apply one vector) no overflow
//     occurs, both for the worst case e = M and, in one session, for the
//     largest e found in any M consecutive words of the stream (a faster
//     tester); with the tester at about twice the system period it
//     overflows;
//   * each mechanism happens at least once: serializer wait, controller
//     waiting for the tester, reuse of the reserved area modulo M,
//     single-word and multi-word vectors, response compaction, overflow.
// A first, directed session applies two vectors over all 224 bits: the
// second differs from the first in blocks 001, 010, 101 and 111, each
// replaced by the pattern 1011010011010011010001101010, so it is sent as
// exactly four replacement words, the last flag set on the fourth.
// Further sessions run the scan sizes of three benchmark circuits that fit
// the default block layout: 178, 207 and 199 bits, with 139, 303 and 150
// vectors (original test-data size over scan length).
// Each session builds its whole word stream before sending it.
module soc_test_top_tb;
  import tdc_pkg::*;
  localparam int W = 32, N_BLK = 8, K = 4, M = 16, NCH = 8;
  localparam int B    = block_bits(W, N_BLK);
  localparam int NB   = blk_num_bits(N_BLK);
  localparam int LMAX = blocks_in_chain(0, N_BLK, K) * B;
  localparam int U    = 2;                        // controller cycles per word
  localparam int APPLY = ((N_BLK + K - 1) / K) * B + 2 * K + 4;   // bound per vector
  localparam logic [B-1:0] EX_PAT = 28'b1011010011010011010001101010;
  localparam int EX_BLKS [4] = '{1, 2, 5, 7};

  logic clk = 0, tck = 0, rst_n = 0, start = 0, end_of_test = 0, tst_valid = 0;
  logic [NCH-1:0] tst_data = '0;
  logic [K-1:0][LMAX-1:0] cut_resp, chain_q;
  logic [K-1:0] scan_shift;
  logic capture, overflow, done, busy;
  logic [15:0] signature;
  logic [31:0] vec_count, ser_wait_cycles, starve_cycles;
  logic [$clog2(M+1)-1:0] fill;

  int checks = 0, failures = 0;
  int tt = 20;                 // system clocks per tester clock (about)

  soc_test_top dut (.*);

  always #5 clk = ~clk;
  // tester clock: a little slower than tt system clocks, so the two
  // clocks drift against each other
  always #(tt * 5 + 1) tck = ~tck;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // ---- cores under test: response is a fixed function of the stimulus
  function automatic logic [LMAX-1:0] core_fn(int j, logic [LMAX-1:0] q);
    logic [63:0] key;
    key = 64'h9E37_79B9_7F4A_7C15 >> j;
    return {q[LMAX-2:0], q[LMAX-1]} ^ LMAX'(key) ^ (q >> 3);
  endfunction
  always_comb for (int j = 0; j < K; j++) cut_resp[j] = core_fn(j, chain_q[j]);

  // ---- expected chain layout of a vector
  typedef logic [B-1:0] blocks_t [N_BLK];
  function automatic logic [LMAX-1:0] layout(blocks_t v, int j);
    logic [LMAX-1:0] r;
    r = '0;
    for (int i = j; i < N_BLK; i += K) r = (r << B) | LMAX'(v[i]);
    return r;
  endfunction

  // ---- reference MISR step, x^16 + x^14 + x^13 + x^11 + 1
  function automatic logic [15:0] misr_step(logic [15:0] s, logic [K-1:0] in);
    logic [15:0] n;
    n = {s[14:0], 1'b0};
    if (s[15]) n = n ^ 16'b0110_1000_0000_0001;
    for (int i = 0; i < K; i++) n[i] = n[i] ^ in[i];
    return n;
  endfunction

  // ---- monitor
  blocks_t vec_q [$];
  bit check_vectors = 1;
  logic [LMAX-1:0] model [K];
  int in_idx [K];
  logic [15:0] ref_sig = '0;
  int captures = 0, compactions = 0, ser_waits_seen = 0;
  int apply_start = -1, cyc = 0, apply_max = 0;

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (rst_n && !start) begin
      if (scan_shift != '0) begin
        logic [K-1:0] in;
        if (apply_start < 0) apply_start = cyc;
        for (int j = 0; j < K; j++) begin
          in[j] = 1'b0;
          if (scan_shift[j]) begin
            logic [LMAX-1:0] lay;
            lay   = (vec_q.size() != 0) ? layout(vec_q[0], j) : '0;
            in[j] = model[j][LMAX-1];
            model[j] = {model[j][LMAX-2:0], lay[in_idx[j]]};
            in_idx[j]--;
          end
        end
        if (in != '0) compactions++;
        ref_sig = misr_step(ref_sig, in);
      end
      if (capture) begin
        captures++;
        if (apply_start >= 0 && cyc - apply_start > apply_max) apply_max = cyc - apply_start;
        apply_start = -1;
        if (vec_q.size() != 0) begin
          if (check_vectors)
            for (int j = 0; j < K; j++)
              check(chain_q[j] == layout(vec_q[0], j),
                    $sformatf("vector %0d chain %0d: %h, expected %h", captures, j, chain_q[j], layout(vec_q[0], j)));
          void'(vec_q.pop_front());
        end
        for (int j = 0; j < K; j++) begin
          model[j]  = core_fn(j, model[j]);
          in_idx[j] = LMAX - 1;
        end
      end
    end
  end

  // ---- tester
  int words_sent = 0, single_word_vecs = 0, multi_word_vecs = 0;
  int bits_original = 0, bits_compressed = 0;
  bit example_done = 0;
  int last_e = 0;

  task automatic send_word(logic [W-1:0] w);
    for (int c = W / NCH - 1; c >= 0; c--) begin
      tst_valid = 1;
      tst_data  = w[c*NCH +: NCH];
      @(negedge tck);
    end
    words_sent++;
  endtask

  task automatic session(int scan, int nvec, int period, bit vectors_checked, bit expect_overflow,
                         bit example = 0);
    blocks_t cur, nxt;
    int changed [$];
    int sent0;
    logic [W-1:0] wq [$];
    int e_max;
    check_vectors = vectors_checked;
    vec_q.delete();
    sent0 = words_sent;
    // build the whole word stream first
    for (int v = 0; v < nvec; v++) begin
      // test cube: about 8% of the scan bits specified, rest taken from
      // the previous vector; bits past the scan size stay 0
      for (int i = 0; i < N_BLK; i++) begin
        for (int t = 0; t < B; t++) begin
          int p;
          p = i * B + (B - 1 - t);
          if (p >= scan)                            nxt[i][t] = 1'b0;
          else if (v == 0 || $urandom_range(0, 99) < 8) nxt[i][t] = 1'($urandom);
          else                                      nxt[i][t] = cur[i][t];
        end
      end
      if (example && v == 1) begin
        nxt = cur;
        foreach (EX_BLKS[c]) nxt[EX_BLKS[c]] = EX_PAT;
      end
      changed.delete();
      for (int i = 0; i < N_BLK; i++) if (v == 0 || nxt[i] != cur[i]) changed.push_back(i);
      if (changed.size() == 0) changed.push_back(0);
      if (example && v == 1) begin
        check(changed.size() == 4, $sformatf("example vector sent as %0d words, expected 4", changed.size()));
        foreach (changed[c])
          check(c < 4 && changed[c] == EX_BLKS[c], $sformatf("example word %0d replaces block %0d", c, changed[c]));
      end
      if (changed.size() == 1) single_word_vecs++;
      else                     multi_word_vecs++;
      vec_q.push_back(nxt);
      for (int c = 0; c < changed.size(); c++)
        wq.push_back({c == changed.size() - 1, NB'(changed[c]), nxt[changed[c]]});
      bits_original   += scan;
      bits_compressed += changed.size() * W;
      cur = nxt;
    end
    // e: the most last flags in any M consecutive words
    e_max = 0;
    for (int s0 = 0; s0 + M <= wq.size(); s0++) begin
      int e;
      e = 0;
      for (int c = s0; c < s0 + M; c++) e += int'(wq[c][W-1]);
      if (e > e_max) e_max = e;
    end
    // period 0: the slowest tester the no-overflow condition allows for
    // this stream's e
    tt = (period != 0) ? period : (M * U + e_max * APPLY) / (W * M / NCH) + 1;
    last_e = e_max;
    // reset the chip, then start decompression
    rst_n = 0;
    end_of_test = 0;
    repeat (2) @(negedge tck);   // both clock domains see the reset
    @(negedge clk);
    rst_n = 1;
    for (int j = 0; j < K; j++) begin
      model[j]  = '0;
      in_idx[j] = LMAX - 1;
    end
    ref_sig = '0;
    @(negedge clk);
    start = 1;
    @(negedge clk);
    start = 0;
    @(negedge tck);
    foreach (wq[c]) send_word(wq[c]);
    tst_valid = 0;
    end_of_test = 1;
    wait (done);
    @(negedge clk);
    @(negedge clk);
    if (expect_overflow) begin
      check(overflow, $sformatf("tester at period %0d overflows the reserved area", tt));
    end else begin
      check(!overflow, $sformatf("no overflow at tester period %0d", tt));
      check(vec_q.size() == 0, $sformatf("%0d vectors not applied", vec_q.size()));
      check(vec_count == nvec, $sformatf("vec_count %0d, expected %0d", vec_count, nvec));
      check(signature == ref_sig, $sformatf("signature %h, expected %h", signature, ref_sig));
    end
    if (example) begin
      // both vectors were compared with the chains at their captures
      check(words_sent - sent0 == N_BLK + 4, $sformatf("example: %0d words sent", words_sent - sent0));
      example_done = 1;
    end else if (!expect_overflow) begin
      check(words_sent - sent0 > M, "reserved area reused modulo M");
      check(ser_wait_cycles > 0, "waited for a busy serializer");
      check(starve_cycles > 0, "waited for the tester");
      check(apply_max <= APPLY, $sformatf("apply phase %0d cycles over %0d", apply_max, APPLY));
      if (ser_wait_cycles > 0) ser_waits_seen++;
    end
    $display("session scan=%0d vectors=%0d period=%0d e=%0d: words=%0d overflow=%0d signature=%h serializer waits=%0d tester waits=%0d longest apply=%0d",
             scan, nvec, tt, last_e, words_sent - sent0, overflow, signature, ser_wait_cycles, starve_cycles, apply_max);
  endtask

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int tt_safe;
    // Slowest case for the no-overflow condition: every word a last word
    // (e = M), each costing u cycles plus one apply phase.
    tt_safe = (M * U + M * APPLY) / (W * M / NCH) + 1;
    $display("tester period for no overflow: %0d system clocks", tt_safe);
    repeat (2) @(negedge clk);
    session(N_BLK * B, 2, tt_safe, 1, 0, 1);  // the four-word example
    session(178, 139, tt_safe, 1, 0);  // c5315: scan size, vector count
    session(207, 303, tt_safe, 1, 0);  // c7552
    session(199, 150, tt_safe, 1, 0);  // s5378
    session(207, 303, 0, 1, 0);        // c7552, tester period from the stream's e
    check(tt < tt_safe, $sformatf("period %0d from e = %0d is faster than the worst case", tt, last_e));
    session(199, 40, 2, 0, 1);         // fast tester: overflow
    $display("compression %0d%% (%0d of %0d bits)", 100 - (100 * bits_compressed) / bits_original,
             bits_compressed, bits_original);
    check(captures > 0, "vectors captured");
    check(compactions > 0, "responses compacted");
    check(single_word_vecs > 0, "vector with a single replacement word");
    check(multi_word_vecs > 0, "vector with several replacement words");
    check(ser_waits_seen > 0, "serializer wait");
    check(example_done, "four-word example applied");
    $display("mechanisms: captures=%0d compaction cycles=%0d single-word vectors=%0d multi-word vectors=%0d",
             captures, compactions, single_word_vecs, multi_word_vecs);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
