// table1_workloads_tb -- runs the architecture in the configurations
// needed by the ISCAS benchmark circuits whose scan length exceeds the
// default 8 x 28-bit block layout, at W = 32.
//
// For each circuit the block count is N = ceil(scan / b) with
// 1 + ceil(log2 N) + b = 32, and the number of vectors is the original
// test-data size divided by the scan length. The test cubes themselves
// are random (about 8% specified bits), so the printed compression
// depends on that choice, not on the circuits' real test sets.
// Circuits: c2670 (233 bits, 151 vectors, N = 9), s9234 (247, 198, 10),
// s15850 (611, 141, 24), s13207 (700, 266, 27), s38417 (1664, 149, 70,
// with a 128-word memory), plus c2670 again with u = 6 controller cycles
// per replacement word, as for a slower processor, and s15850 again with
// k = 8 scan chains instead of 4, which must allow a faster tester. All
// run in parallel; each checks every capture, its signature, its vector
// count and that it never overflows.
module table1_workloads_tb;
  logic fin [7];
  int   chk [7];
  int   fl  [7];
  int   per [7];
  int   checks, failures;

  workload_runner #(.NAME("c2670"),  .N_BLK(9),  .SCAN(233),  .NVEC(151)) r0 (fin[0], chk[0], fl[0], per[0]);
  workload_runner #(.NAME("s9234"),  .N_BLK(10), .SCAN(247),  .NVEC(198)) r1 (fin[1], chk[1], fl[1], per[1]);
  workload_runner #(.NAME("s15850"), .N_BLK(24), .SCAN(611),  .NVEC(141)) r2 (fin[2], chk[2], fl[2], per[2]);
  workload_runner #(.NAME("s13207"), .N_BLK(27), .SCAN(700),  .NVEC(266)) r3 (fin[3], chk[3], fl[3], per[3]);
  workload_runner #(.NAME("s38417"), .N_BLK(70), .DEPTH(128), .SCAN(1664), .NVEC(149)) r4 (fin[4], chk[4], fl[4], per[4]);
  workload_runner #(.NAME("c2670"),  .N_BLK(9),  .SCAN(233),  .NVEC(151), .U_CYCLES(6)) r5 (fin[5], chk[5], fl[5], per[5]);
  workload_runner #(.NAME("s15850"), .N_BLK(24), .SCAN(611),  .NVEC(141), .K(8)) r6 (fin[6], chk[6], fl[6], per[6]);

  task automatic report();
    checks = 0;
    failures = 0;
    for (int i = 0; i < 7; i++) begin
      checks   += chk[i];
      failures += fl[i];
    end
  endtask

  // watchdog, in simulation time (10 time units per clock)
  initial begin
    #(100_000_000);
    report();
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1;
    wait (fin[0] && fin[1] && fin[2] && fin[3] && fin[4] && fin[5] && fin[6]);
    #20;
    report();
    // more scan chains: shorter apply phase, so a faster tester keeps up
    checks++;
    if (per[6] >= per[2]) begin
      failures++;
      $display("FAIL: tester period %0d with 8 chains, not below %0d with 4", per[6], per[2]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
