// scan_chain_tb -- self-checking test of the scan chain.
//
// Shifts random bits in with gaps, checks the parallel contents and the
// scan output against a reference queue kept in the testbench, then
// captures a random response and checks that it is loaded and shifted out
// most significant bit first. A watchdog ends a hung run.
module scan_chain_tb;
  localparam int LEN = 56;

  logic clk = 0, rst_n = 0, shift_en = 0, si = 0, capture = 0;
  logic [LEN-1:0] resp = '0, q;
  logic so;
  logic [LEN-1:0] ref_q;
  int checks = 0, failures = 0;

  scan_chain #(.LEN(LEN)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    ref_q = '0;
    @(negedge clk);
    check(q == '0, "cleared by reset");
    for (int r = 0; r < 10; r++) begin
      for (int i = 0; i < 3 * LEN; i++) begin
        shift_en = ($urandom_range(0, 3) != 0);
        si       = $urandom_range(0, 1);
        @(negedge clk);
        if (shift_en) ref_q = {ref_q[LEN-2:0], si};
        check(q == ref_q, $sformatf("contents %h, expected %h", q, ref_q));
        check(so == ref_q[LEN-1], "scan out is the top bit");
      end
      shift_en = 0;
      resp     = LEN'({$urandom, $urandom});
      capture  = 1;
      @(negedge clk);
      capture  = 0;
      ref_q    = resp;
      check(q == resp, "capture loads the response");
      // capture wins over shift
      shift_en = 1;
      capture  = 1;
      resp     = ~resp;
      @(negedge clk);
      capture  = 0;
      shift_en = 0;
      ref_q    = resp;
      check(q == resp, "capture has priority over shift");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
