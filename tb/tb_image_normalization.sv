// tb_image_normalization: starts the normalization on random and corner-case
// windows and checks the factor against floor(sqrt(N*sqsum - sum^2)) found by
// binary search, and the start-to-done latency of STD_W+2 cycles.
module tb_image_normalization;
  import fd_pkg::*;
  import fd_ref_pkg::isqrt;
  logic clk = 0, rst = 1;
  logic start, busy, done;
  logic [II_W-1:0] sum;
  logic [SQ_W-1:0] sqsum;
  logic [STD_W-1:0] stddev;
  int checks = 0, failures = 0;

  image_normalization dut (.*);
  always #5 clk = ~clk;

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    start = 0; sum = 0; sqsum = 0;
    repeat (3) @(negedge clk);
    rst = 0;
    for (int t = 0; t < 300; t++) begin
      automatic longint s = 0, q = 0;
      automatic longint unsigned e;
      automatic int lat = 0;
      // a window of pixels: flat, two-level, or random with random spread
      automatic int mode = t % 3;
      automatic int base = $urandom_range(0, 255);
      for (int i = 0; i < AREA; i++) begin
        int p;
        if (t == 0) p = 255;
        else if (t == 1) p = (i % 2) ? 255 : 0;
        else if (mode == 0) p = base;
        else if (mode == 1) p = (i % 5 == 0) ? 255 : base;
        else p = $urandom_range(0, 255);
        s += p;
        q += p * p;
      end
      e = isqrt(longint'(AREA) * q - s * s);
      sum = II_W'(s);
      sqsum = SQ_W'(q);
      start = 1;
      @(negedge clk);
      start = 0;
      while (!done) begin @(negedge clk); lat++; end
      checks++;
      if (stddev != STD_W'(e)) begin
        failures++;
        if (failures < 10) $display("t%0d sum=%0d sq=%0d std=%0d exp %0d", t, s, q, stddev, e);
      end
      checks++;
      if (lat != STD_W + 1) begin failures++; $display("latency %0d", lat + 1); end
      checks++;
      if (busy) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
