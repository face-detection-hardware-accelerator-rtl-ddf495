// tb_vj_accel_full: one complete operation at full size, the accelerator at
// its default parameters: a 320x240 frame and then a 640x480 frame through
// the face detector with a 10-stage cascade, and a 640x8 frame through the
// Sobel filter, every result checked. Has a watchdog.
module tb_vj_accel_full;
  tb_vj_accel_run #(.FW0(320), .FH0(240), .FW1(640), .FH1(480), .SW(640), .SH(8), .NST(10), .GPS(3), .GAPS(0)) run ();
  initial begin
    #2000000000;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", run.checks, run.failures + 1);
    $finish;
  end
endmodule
