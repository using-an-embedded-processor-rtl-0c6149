// serializer_tb -- self-checking test of the block serializer.
//
// Loads random blocks, records the bit stream the serializer presents on
// each shifting edge and compares it, bit by bit and most significant bit
// first, with the loaded value. Also checks that shifting lasts exactly B
// cycles, that busy drops afterwards and that a block can be loaded right
// after the previous one finishes. A watchdog ends a hung run.
module serializer_tb;
  localparam int B = 28;

  logic clk = 0, rst_n = 0, load = 0;
  logic [B-1:0] din = '0;
  logic busy, so, shift_en;
  int checks = 0, failures = 0;

  serializer #(.B(B)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [B-1:0] pat, got;
    int n;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    check(!busy && !shift_en, "idle after reset");
    for (int t = 0; t < 50; t++) begin
      pat  = B'({$urandom, $urandom});
      din  = pat;
      load = 1;
      @(negedge clk);
      load = 0;
      din  = '0;
      got  = '0;
      n    = 0;
      while (shift_en) begin
        got = {got[B-2:0], so};
        n++;
        @(negedge clk);
      end
      check(n == B, $sformatf("shift length %0d, expected %0d", n, B));
      check(got == pat, $sformatf("stream %h, expected %h", got, pat));
      check(!busy, "busy low after shifting");
      // a load while busy is not exercised: the controller never does it
      if (t % 5 == 4) repeat ($urandom_range(1, 4)) @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
