// workload_runner -- testbench helper: one scan-test session of the
// decompression architecture, sized for one benchmark circuit.
//
// Instantiates soc_test_top with the given block count and memory size,
// plays the tester (random test cubes of SCAN bits, X bits filled from
// the previous vector, one replacement word per changed block) at the
// slowest tester period that can never overflow the reserved area, and
// plays the cores under test as a fixed function of the chain contents.
// It checks every chain at every capture, the final MISR signature
// against a model, the vector count and the absence of overflow, and
// reports its check and failure counts when `finished` rises.
// Chains may differ in length when N_BLK is not a multiple of K.
module workload_runner #(
  parameter string NAME  = "circuit",
  parameter int    N_BLK = 9,
  parameter int    DEPTH = 64,
  parameter int    SCAN  = 233,
  parameter int    NVEC  = 20,
  parameter int    SPEC_PCT = 8,      // percent of scan bits specified per cube
  parameter int    U_CYCLES = 2,      // controller cycles per replacement word
  parameter int    K        = 4       // scan chains
) (
  output logic finished,
  output int   checks,
  output int   failures,
  output int   period          // tester period used, in system clocks
);
  import tdc_pkg::*;
  localparam int W = 32, M = 16, NCH = 8;
  localparam int B     = block_bits(W, N_BLK);
  localparam int NB    = blk_num_bits(N_BLK);
  localparam int LMAX  = blocks_in_chain(0, N_BLK, K) * B;
  localparam int APPLY = ((N_BLK + K - 1) / K) * B + 2 * K + 4;
  localparam int TT    = (M * U_CYCLES + M * APPLY) / (W * M / NCH) + 1;

  logic clk = 0, tck = 0, rst_n = 0, start = 0, end_of_test = 0, tst_valid = 0;
  logic [NCH-1:0] tst_data = '0;
  logic [K-1:0][LMAX-1:0] cut_resp, chain_q;
  logic [K-1:0] scan_shift;
  logic capture, overflow, done, busy;
  logic [15:0] signature;
  logic [31:0] vec_count, ser_wait_cycles, starve_cycles;
  logic [$clog2(M+1)-1:0] fill;

  soc_test_top #(.N_BLK(N_BLK), .K(K), .DEPTH(DEPTH), .U_CYCLES(U_CYCLES)) dut (.*);

  always #5 clk = ~clk;
  // tester clock: a little slower than TT system clocks, so the two
  // clocks drift against each other
  always #(TT * 5 + 1) tck = ~tck;

  initial begin
    finished = 0;
    period   = TT;
    checks   = 0;
    failures = 0;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s: %s", NAME, what);
    end
  endtask

  function automatic int chain_len(int j);
    return blocks_in_chain(j, N_BLK, K) * B;
  endfunction

  // cores under test
  function automatic logic [LMAX-1:0] core_fn(int j, logic [LMAX-1:0] q);
    logic [LMAX-1:0] m, r;
    m = (LMAX'(1) << chain_len(j)) - 1;
    r = ((q << 1) | (q >> (chain_len(j) - 1))) ^ (q >> 3) ^ LMAX'(64'hC2B2_AE3D_27D4_EB4F >> j);
    return r & m;
  endfunction
  always_comb for (int j = 0; j < K; j++) cut_resp[j] = core_fn(j, chain_q[j]);

  typedef logic [B-1:0] blocks_t [N_BLK];
  function automatic logic [LMAX-1:0] layout(blocks_t v, int j);
    logic [LMAX-1:0] r;
    r = '0;
    for (int i = j; i < N_BLK; i += K) r = (r << B) | LMAX'(v[i]);
    return r;
  endfunction

  function automatic logic [15:0] misr_step(logic [15:0] s, logic [K-1:0] in);
    logic [15:0] n;
    n = {s[14:0], 1'b0};
    if (s[15]) n = n ^ 16'b0110_1000_0000_0001;
    for (int i = 0; i < K; i++) n[i] = n[i] ^ in[i];
    return n;
  endfunction

  // monitor: chain model, MISR model, capture checks
  blocks_t vec_q [$];
  logic [LMAX-1:0] model [K];
  int in_idx [K];
  logic [15:0] ref_sig = '0;
  int captures = 0;

  always @(posedge clk) begin
    if (rst_n && !start) begin
      if (scan_shift != '0) begin
        logic [K-1:0] in;
        for (int j = 0; j < K; j++) begin
          in[j] = 1'b0;
          if (scan_shift[j]) begin
            logic [LMAX-1:0] lay;
            lay   = (vec_q.size() != 0) ? layout(vec_q[0], j) : '0;
            in[j] = model[j][chain_len(j) - 1];
            model[j] = ((model[j] << 1) | LMAX'(lay[in_idx[j]])) & ((LMAX'(1) << chain_len(j)) - 1);
            in_idx[j]--;
          end
        end
        ref_sig = misr_step(ref_sig, in);
      end
      if (capture) begin
        captures++;
        if (vec_q.size() != 0) begin
          for (int j = 0; j < K; j++)
            check(chain_q[j] == layout(vec_q[0], j),
                  $sformatf("vector %0d chain %0d: %h, expected %h", captures, j, chain_q[j], layout(vec_q[0], j)));
          void'(vec_q.pop_front());
        end
        for (int j = 0; j < K; j++) begin
          model[j]  = core_fn(j, model[j]);
          in_idx[j] = chain_len(j) - 1;
        end
      end
    end
  end

  int words = 0;
  task automatic send_word(logic [W-1:0] w);
    for (int c = W / NCH - 1; c >= 0; c--) begin
      tst_valid = 1;
      tst_data  = w[c*NCH +: NCH];
      @(negedge tck);
    end
    words++;
  endtask

  initial begin
    blocks_t cur, nxt;
    int changed [$];
    int cycles0;
    repeat (2) @(negedge tck);   // both clock domains see the reset
    @(negedge clk);
    rst_n = 1;
    for (int j = 0; j < K; j++) begin
      model[j]  = '0;
      in_idx[j] = chain_len(j) - 1;
    end
    @(negedge clk);
    start = 1;
    @(negedge clk);
    start = 0;
    @(negedge tck);
    for (int v = 0; v < NVEC; v++) begin
      for (int i = 0; i < N_BLK; i++)
        for (int t = 0; t < B; t++) begin
          int p;
          p = i * B + (B - 1 - t);
          if (p >= SCAN)                                       nxt[i][t] = 1'b0;
          else if (v == 0 || $urandom_range(0, 99) < SPEC_PCT) nxt[i][t] = 1'($urandom);
          else                                                 nxt[i][t] = cur[i][t];
        end
      changed.delete();
      for (int i = 0; i < N_BLK; i++) if (v == 0 || nxt[i] != cur[i]) changed.push_back(i);
      if (changed.size() == 0) changed.push_back(0);
      vec_q.push_back(nxt);
      for (int c = 0; c < changed.size(); c++)
        send_word({c == changed.size() - 1, NB'(changed[c]), nxt[changed[c]]});
      cur = nxt;
    end
    tst_valid = 0;
    end_of_test = 1;
    wait (done);
    @(negedge clk);
    @(negedge clk);
    check(!overflow, "no overflow");
    check(vec_q.size() == 0, $sformatf("%0d vectors not applied", vec_q.size()));
    check(vec_count == NVEC, $sformatf("vec_count %0d, expected %0d", vec_count, NVEC));
    check(signature == ref_sig, $sformatf("signature %h, expected %h", signature, ref_sig));
    $display("%s: k=%0d u=%0d N=%0d b=%0d scan=%0d vectors=%0d words=%0d tester period=%0d system clocks compression=%0d%%",
             NAME, K, U_CYCLES, N_BLK, B, SCAN, NVEC, words, TT, 100 - (100 * words * W) / (NVEC * SCAN));
    finished = 1;
  end
endmodule
