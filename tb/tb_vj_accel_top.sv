// tb_vj_accel_top: end-to-end test of the accelerator at its default
// parameters on small images (64x40 then 40x30 for the face detector,
// 40x6 for the Sobel filter), with a watchdog.
module tb_vj_accel_top;
  tb_vj_accel_run #(.FW0(64), .FH0(40), .FW1(40), .FH1(30), .SW(40), .SH(6), .NST(5), .GPS(2), .GAPS(1)) run ();
  initial begin
    #50000000;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", run.checks, run.failures + 1);
    $finish;
  end
endmodule
