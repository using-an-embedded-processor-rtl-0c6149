// mem_io_ctrl_tb -- self-checking test of the memory I/O controller.
//
// A tester model on its own clock (not a multiple of the system clock)
// sends random 32-bit words as 8-bit chunks, most significant first, with
// random no-operation cycles in between, while a consumer model takes
// words at random. The testbench checks every memory write
// (slot cycling modulo M from REPL_BASE, and data), the count of
// unprocessed words, and that the overflow flag stays low while the
// consumer keeps up. It then stops consuming, writes M+1 words and checks
// that overflow is raised exactly on the (M+1)-th, and that clear resets
// it. A watchdog ends a hung run.
module mem_io_ctrl_tb;
  localparam int W = 32, NCH = 8, M = 16, REPL_BASE = 4, AW = 6;
  localparam int CHUNKS = W / NCH;

  logic clk = 0, tck = 0, rst_n = 0, clear = 0, tst_valid = 0, consume = 0;
  logic [NCH-1:0] tst_data = '0;
  logic mem_we, words_avail, overflow;
  logic [AW-1:0] mem_addr;
  logic [W-1:0] mem_wdata;
  logic [$clog2(M+1)-1:0] fill;
  int checks = 0, failures = 0;

  logic [W-1:0] sent_q [$];   // words sent, not yet written
  int exp_slot = 0;
  int exp_fill = 0;
  int writes = 0;

  mem_io_ctrl #(.W(W), .NCH(NCH), .M(M), .REPL_BASE(REPL_BASE), .AW(AW)) dut (.*);

  always #5 clk = ~clk;
  always #23 tck = ~tck;     // tester clock, 4.6 system clocks per cycle

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // observe writes and the count at every edge
  always @(posedge clk) if (rst_n && !clear) begin
    if (mem_we) begin
      logic [W-1:0] e;
      e = (sent_q.size() != 0) ? sent_q.pop_front() : '0;
      check(int'(mem_addr) == REPL_BASE + exp_slot, $sformatf("write slot %0d, expected %0d", mem_addr, REPL_BASE + exp_slot));
      check(mem_wdata == e, $sformatf("write data %h, expected %h", mem_wdata, e));
      exp_slot = (exp_slot + 1) % M;
      writes++;
    end
    exp_fill = exp_fill + (mem_we && !(exp_fill == M && !consume) ? 1 : 0) - (consume ? 1 : 0);
  end

  task automatic send_word(logic [W-1:0] w, bit gaps);
    sent_q.push_back(w);
    @(negedge tck);
    for (int c = CHUNKS - 1; c >= 0; c--) begin
      tst_valid = 1;
      tst_data  = w[c*NCH +: NCH];
      @(negedge tck);
      tst_valid = 0;
      if (gaps) repeat ($urandom_range(0, 2)) @(negedge tck);
    end
  endtask

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // consumer: takes a word now and then while running
  bit consuming = 1;
  always @(negedge clk) consume <= consuming && words_avail && ($urandom_range(0, 2) == 0);

  // the word announced last must have reached memory
  task automatic settle();
    repeat (5) @(negedge clk);
  endtask

  initial begin
    repeat (2) @(negedge tck);   // both clock domains see the reset
    @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    check(!words_avail && fill == 0 && !overflow, "empty after reset");
    for (int i = 0; i < 60; i++) begin
      send_word($urandom, 1);
      settle();
      check(int'(fill) == exp_fill, $sformatf("fill %0d, expected %0d", fill, exp_fill));
      check(!overflow, "no overflow while the consumer keeps up");
    end
    // drain
    while (words_avail) @(negedge clk);
    consuming = 0;
    @(negedge clk);
    @(negedge clk);
    check(fill == 0, "drained");
    check(writes == 60, $sformatf("%0d writes", writes));
    // fill the area completely, then one more word
    for (int i = 0; i < M; i++) send_word($urandom, 0);
    settle();
    check(int'(fill) == M, $sformatf("full: fill %0d", fill));
    check(!overflow, "exactly M words do not overflow");
    send_word($urandom, 0);
    settle();
    check(overflow, "word M+1 overflows");
    check(int'(fill) == M, "count saturates at M");
    // clear
    clear = 1;
    @(negedge clk);
    clear = 0;
    sent_q.delete();
    exp_slot = 0;
    exp_fill = 0;
    @(negedge clk);
    check(!overflow && fill == 0, "clear resets flag and count");
    send_word(32'hA5A5_0F0F, 0);
    settle();
    check(fill == 1, "counting again after clear");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
