// onchip_mem_tb -- self-checking test of the two-port on-chip memory.
//
// Writes every word through one of the two ports at random, reads each
// back through the processor port one cycle later and compares with a
// model array; also writes through both ports in the same cycle to
// different addresses.
module onchip_mem_tb;
  localparam int W = 32, DEPTH = 64, AW = 6;

  logic clk = 0;
  logic a_we = 0, b_en = 0, b_we = 0;
  logic [AW-1:0] a_addr = '0, b_addr = '0;
  logic [W-1:0] a_wdata = '0, b_wdata = '0, b_rdata;
  logic [W-1:0] model [DEPTH];
  int checks = 0, failures = 0;

  onchip_mem #(.W(W), .DEPTH(DEPTH), .AW(AW)) dut (.*);

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

  task automatic read_check(int addr);
    b_en = 1; b_we = 0; b_addr = AW'(addr);
    @(negedge clk);
    b_en = 0;
    check(b_rdata == model[addr], $sformatf("addr %0d: %h, expected %h", addr, b_rdata, model[addr]));
  endtask

  initial begin
    @(negedge clk);
    // fill: even addresses through port A, odd through port B, same cycle
    for (int i = 0; i < DEPTH; i += 2) begin
      a_we = 1; a_addr = AW'(i);     a_wdata = $urandom;
      b_en = 1; b_we = 1; b_addr = AW'(i + 1); b_wdata = $urandom;
      model[i] = a_wdata; model[i+1] = b_wdata;
      @(negedge clk);
    end
    a_we = 0; b_en = 0; b_we = 0;
    for (int i = 0; i < DEPTH; i++) read_check(i);
    // random traffic
    for (int t = 0; t < 500; t++) begin
      int a;
      a = $urandom_range(0, DEPTH - 1);
      if ($urandom_range(0, 1)) begin
        a_we = 1; a_addr = AW'(a); a_wdata = $urandom;
        model[a] = a_wdata;
      end else begin
        b_en = 1; b_we = 1; b_addr = AW'(a); b_wdata = $urandom;
        model[a] = b_wdata;
      end
      @(negedge clk);
      a_we = 0; b_en = 0; b_we = 0;
      read_check($urandom_range(0, DEPTH - 1));
      read_check(a);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
