// decomp_ctrl_check -- testbench helper: one self-checking run of the
// decompression controller with a given number of cycles per word.
//
// The controller runs against the on-chip memory and behavioural
// serializers that stay busy for B cycles after each load. The helper
// plays the tester: it builds random test vectors, encodes each one as
// replacement words for the blocks that changed (every block for the
// first vector), and writes them into the reserved area modulo M,
// sometimes faster and sometimes slower than the controller reads.
// Checks:
//   * every vector is downloaded as blocks 0..N-1 in order, block i into
//     serializer (i mod K), with the rebuilt block values;
//   * no serializer is loaded while busy, and capture comes once per
//     vector, only when all serializers are idle;
//   * words are consumed one per U_CYCLES cycles when available;
//   * the apply phase lasts ceil(N/K)*B cycles plus a bounded overhead;
//   * waiting for a busy serializer and for the tester both happen;
//   * done rises after end_of_test once every word is processed.
// Its check and failure counts are valid when `finished` rises.
module decomp_ctrl_check #(
  parameter int U_CYCLES = 2
) (
  output logic finished,
  output int   checks,
  output int   failures
);
  import tdc_pkg::*;
  localparam int W = 32, N_BLK = 8, K = 4, M = 16, REPL_BASE = 0, BLK_BASE = 32, AW = 6, DEPTH = 64;
  localparam int B  = block_bits(W, N_BLK);
  localparam int NB = blk_num_bits(N_BLK);
  localparam int NVEC = 40;

  logic clk = 0, rst_n = 0, start = 0, end_of_test = 0;
  logic words_avail, consume;
  logic mem_en, mem_we;
  logic [AW-1:0] mem_addr;
  logic [W-1:0] mem_wdata, mem_rdata;
  logic [K-1:0] ser_busy, ser_load;
  logic [B-1:0] ser_data;
  logic capture, busy, done;
  logic [31:0] vec_count, ser_wait_cycles, starve_cycles;

  // tester write port into memory
  logic a_we = 0;
  logic [AW-1:0] a_addr = '0;
  logic [W-1:0] a_wdata = '0;

  initial begin
    finished = 0;
    checks   = 0;
    failures = 0;
  end

  decomp_ctrl #(.W(W), .N_BLK(N_BLK), .K(K), .M(M), .REPL_BASE(REPL_BASE), .BLK_BASE(BLK_BASE), .AW(AW),
                .U_CYCLES(U_CYCLES)) dut (.*);

  onchip_mem #(.W(W), .DEPTH(DEPTH), .AW(AW)) u_mem (
    .clk, .a_we, .a_addr, .a_wdata,
    .b_en(mem_en), .b_we(mem_we), .b_addr(mem_addr), .b_wdata(mem_wdata), .b_rdata(mem_rdata));

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL (u=%0d): %s", U_CYCLES, what);
    end
  endtask

  // ---- behavioural serializers: busy for B cycles after a load
  int ser_cnt [K];
  always_comb for (int j = 0; j < K; j++) ser_busy[j] = (ser_cnt[j] != 0);

  // ---- expected vectors, in the order they are applied
  logic [B-1:0] vec_q [$][N_BLK];
  logic [B-1:0] cur [N_BLK];
  int load_i = 0;         // next block expected in this vector
  int vecs_seen = 0;
  int words_sent = 0, words_consumed = 0;
  int last_consume = -100, cyc = 0;
  int consume_gap_u = 0;
  int apply_start = 0, apply_max = 0, apply_min = 1 << 30;
  bit in_apply = 0;

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (!rst_n) begin
      for (int j = 0; j < K; j++) ser_cnt[j] <= 0;
    end else begin
      for (int j = 0; j < K; j++) if (ser_cnt[j] != 0) ser_cnt[j] <= ser_cnt[j] - 1;
      if (consume) begin
        words_consumed++;
        if (cyc - last_consume == U_CYCLES) consume_gap_u++;
        check(cyc - last_consume >= U_CYCLES, $sformatf("at most one word every %0d cycles", U_CYCLES));
        last_consume = cyc;
      end
      if (ser_load != '0) begin
        int j;
        j = load_i % K;
        check($onehot(ser_load), "one serializer loaded at a time");
        check(ser_load[j], $sformatf("block %0d loaded into serializer %b, expected %0d", load_i, ser_load, j));
        check(!ser_busy[j], "serializer not busy when loaded");
        if (vec_q.size() != 0)
          check(ser_data == vec_q[0][load_i], $sformatf("vector %0d block %0d: %h, expected %h",
                vecs_seen, load_i, ser_data, vec_q[0][load_i]));
        else check(0, "load with no vector expected");
        if (load_i == 0) begin
          in_apply = 1;
          apply_start = cyc;
        end
        for (int jj = 0; jj < K; jj++) if (ser_load[jj]) ser_cnt[jj] <= B;
        load_i++;
      end
      if (capture) begin
        int d;
        check(ser_busy == '0, "capture only with all serializers idle");
        check(load_i == N_BLK, $sformatf("capture after %0d of %0d blocks", load_i, N_BLK));
        d = cyc - apply_start;
        if (d > apply_max) apply_max = d;
        if (d < apply_min) apply_min = d;
        load_i = 0;
        in_apply = 0;
        vecs_seen++;
        if (vec_q.size() != 0) void'(vec_q.pop_front());
      end
    end
  end

  // ---- tester: words_avail from a simple count, writes via port A
  int pending = 0;
  always @(posedge clk) begin
    pending <= pending + (a_we ? 1 : 0) - (consume ? 1 : 0);
  end
  assign words_avail = (pending != 0);

  int wr_slot = 0;
  task automatic send(logic [W-1:0] w, int gap);
    while (pending >= M - 1) @(negedge clk);  // never overflow in this test
    a_we = 1; a_addr = AW'(REPL_BASE + wr_slot); a_wdata = w;
    @(negedge clk);
    a_we = 0;
    wr_slot = (wr_slot + 1) % M;
    words_sent++;
    repeat (gap) @(negedge clk);
  endtask

  initial begin
    logic [B-1:0] nxt [N_BLK];
    int changed [$];
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    start = 1;
    @(negedge clk);
    start = 0;
    for (int v = 0; v < NVEC; v++) begin
      // next vector: a few blocks change (all for the first)
      for (int i = 0; i < N_BLK; i++) nxt[i] = (v == 0) ? B'($urandom) : cur[i];
      if (v != 0) begin
        int nchg;
        nchg = $urandom_range(1, N_BLK);
        for (int c = 0; c < nchg; c++) nxt[$urandom_range(0, N_BLK - 1)] = B'($urandom);
      end
      changed.delete();
      for (int i = 0; i < N_BLK; i++) if (v == 0 || nxt[i] != cur[i]) changed.push_back(i);
      if (changed.size() == 0) changed.push_back(0);   // vector repeats: resend block 0
      vec_q.push_back(nxt);
      for (int c = 0; c < changed.size(); c++) begin
        logic last;
        last = (c == changed.size() - 1);
        // fast bursts in the first half, slow tester in the second
        send({last, NB'(changed[c]), nxt[changed[c]]}, (v < NVEC / 2) ? 0 : $urandom_range(0, 12));
      end
      cur = nxt;
    end
    end_of_test = 1;
    wait (done);
    @(negedge clk);
    check(vecs_seen == NVEC, $sformatf("%0d vectors applied, expected %0d", vecs_seen, NVEC));
    check(vec_count == NVEC, $sformatf("vec_count %0d", vec_count));
    check(words_consumed == words_sent, $sformatf("%0d of %0d words consumed", words_consumed, words_sent));
    check(consume_gap_u > 0, $sformatf("back-to-back words taken every %0d cycles", U_CYCLES));
    check(ser_wait_cycles > 0, "controller waited for a busy serializer");
    check(starve_cycles > 0, "controller waited for the tester");
    check(apply_min >= ((N_BLK + K - 1) / K) * B, $sformatf("apply phase %0d cycles, shorter than the shifting", apply_min));
    check(apply_max <= ((N_BLK + K - 1) / K) * B + 2 * K + 4, $sformatf("apply phase %0d cycles, too long", apply_max));
    $display("u=%0d: apply phase %0d..%0d cycles, serializer waits %0d, tester waits %0d",
             U_CYCLES, apply_min, apply_max, ser_wait_cycles, starve_cycles);
    finished = 1;
  end
endmodule
