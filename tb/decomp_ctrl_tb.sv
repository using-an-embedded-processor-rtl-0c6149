// decomp_ctrl_tb -- self-checking test of the decompression controller.
//
// Runs decomp_ctrl_check twice in parallel: with u = 2 cycles per
// replacement word (the default, a read and a write) and with u = 5, as
// for a processor whose instruction set needs more cycles per word.
module decomp_ctrl_tb;
  logic [1:0] fin;
  int chk [2], fail [2];

  decomp_ctrl_check #(.U_CYCLES(2)) u_fast (.finished(fin[0]), .checks(chk[0]), .failures(fail[0]));
  decomp_ctrl_check #(.U_CYCLES(5)) u_slow (.finished(fin[1]), .checks(chk[1]), .failures(fail[1]));

  initial begin
    #8_000_000;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", chk[0] + chk[1], fail[0] + fail[1] + 1);
    $finish;
  end

  initial begin
    #1;                           // helpers clear their outputs at time 0
    wait (fin[0] && fin[1]);
    #1;
    $display("TB_RESULT checks=%0d failures=%0d", chk[0] + chk[1], fail[0] + fail[1]);
    $finish;
  end
endmodule
