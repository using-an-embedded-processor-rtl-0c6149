// misr_tb -- self-checking test of the signature register.
//
// Drives random inputs with random enables and compares the signature
// every cycle with a reference computed in the testbench from the
// polynomial x^16 + x^14 + x^13 + x^11 + 1, bit by bit. Also checks clear
// and that two streams differing in one bit give different signatures.
module misr_tb;
  localparam int WIDTH = 16;
  localparam int NIN   = 4;

  logic clk = 0, rst_n = 0, clear = 0, en = 0;
  logic [NIN-1:0] d = '0;
  logic [WIDTH-1:0] sig;
  logic [WIDTH-1:0] ref_sig;
  int checks = 0, failures = 0;

  misr #(.WIDTH(WIDTH), .NIN(NIN), .POLY(16'h6801)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // reference: one step of the polynomial division, written per bit
  function automatic logic [WIDTH-1:0] step(logic [WIDTH-1:0] s, logic [NIN-1:0] in);
    logic [WIDTH-1:0] n;
    logic top;
    top = s[15];
    for (int i = WIDTH - 1; i >= 1; i--) n[i] = s[i-1];
    n[0] = top;                    // x^0 term
    n[11] = n[11] ^ top;           // x^11
    n[13] = n[13] ^ top;           // x^13
    n[14] = n[14] ^ top;           // x^14
    for (int i = 0; i < NIN; i++) n[i] = n[i] ^ in[i];
    return n;
  endfunction

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [WIDTH-1:0] s1;
    repeat (3) @(posedge clk);
    rst_n = 1;
    ref_sig = '0;
    for (int i = 0; i < 2000; i++) begin
      en = ($urandom_range(0, 4) != 0);
      d  = NIN'($urandom);
      @(negedge clk);
      if (en) ref_sig = step(ref_sig, d);
      check(sig == ref_sig, $sformatf("cycle %0d: sig %h, expected %h", i, sig, ref_sig));
    end
    // clear
    clear = 1;
    en    = 1;
    @(negedge clk);
    clear = 0;
    check(sig == '0, "clear");
    // with no input the register runs as an LFSR; from state 1 the
    // sequence of a primitive degree-16 polynomial returns after 65535 steps
    d  = 4'b0001;
    @(negedge clk);
    d  = '0;
    s1 = sig;
    check(s1 == 16'h0001, "load of one");
    begin
      int period;
      period = 0;
      do begin
        @(negedge clk);
        period++;
      end while (sig != s1 && period < 70000);
      check(period == 65535, $sformatf("LFSR period %0d", period));
    end
    en = 0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
