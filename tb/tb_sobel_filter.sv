// tb_sobel_filter: two random frames (the second with large edges so the
// magnitude saturates) through the Sobel filter with input gaps and output
// stalls; every output is compared with the 3x3 Sobel magnitude computed
// directly from the frame. Also checks the two-cycle latency when the
// stream runs freely and that saturation and stalls occurred.
module tb_sobel_filter;
  localparam int W = 13, H = 7, NF = 2;
  logic clk = 0, rst = 1;
  logic [9:0] img_w = 10'(W);
  logic [8:0] img_h = 9'(H);
  logic in_valid, in_ready, out_valid, out_ready;
  logic [7:0] in_pix, out_pix;
  int checks = 0, failures = 0, sat = 0, stalls = 0, got = 0;
  int unsigned img [NF][H][W];
  int cycle = 0;
  int sent [NF*H*W];

  sobel_filter #(.MAX_W(16)) dut (.*);
  always #5 clk = ~clk;
  always @(posedge clk) cycle++;

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int expect_at(int f, int y, int x);  // centre (y,x)
    int gx, gy, m;
    gx = (img[f][y-1][x+1] + 2 * img[f][y][x+1] + img[f][y+1][x+1])
       - (img[f][y-1][x-1] + 2 * img[f][y][x-1] + img[f][y+1][x-1]);
    gy = (img[f][y+1][x-1] + 2 * img[f][y+1][x] + img[f][y+1][x+1])
       - (img[f][y-1][x-1] + 2 * img[f][y-1][x] + img[f][y-1][x+1]);
    m = (gx < 0 ? -gx : gx) + (gy < 0 ? -gy : gy);
    return m > 255 ? 255 : m;
  endfunction

  initial begin
    in_valid = 0; in_pix = 0;
    for (int f = 0; f < NF; f++)
      for (int y = 0; y < H; y++)
        for (int x = 0; x < W; x++)
          img[f][y][x] = (f == 0) ? $urandom_range(0, 255) : (((x / 3 + y / 2) % 2) ? 255 : 0);
    repeat (3) @(negedge clk);
    rst = 0;
    for (int f = 0; f < NF; f++)
      for (int y = 0; y < H; y++)
        for (int x = 0; x < W; x++) begin
          if (f == 1) while ($urandom_range(0, 3) == 0) @(negedge clk);
          in_valid = 1;
          in_pix = 8'(img[f][y][x]);
          #1;
          while (!in_ready) begin @(negedge clk); #1; end
          sent[(f * H + y) * W + x] = cycle;
          @(negedge clk);
          in_valid = 0;
        end
  end

  always @(negedge clk) begin
    out_ready = (got < (W - 2) * (H - 2)) ? 1'b1 : ($urandom_range(0, 2) != 0);
    if (!rst && out_valid && !out_ready) stalls++;
    if (!rst && out_valid && out_ready) begin
      automatic int f = got / ((W - 2) * (H - 2));
      automatic int k = got % ((W - 2) * (H - 2));
      automatic int e = expect_at(f, k / (W - 2) + 1, k % (W - 2) + 1);
      checks++;
      if (int'(out_pix) != e) begin
        failures++;
        if (failures < 10) $display("frame %0d out %0d: %0d exp %0d", f, k, out_pix, e);
      end
      if (e == 255) sat++;
      if (f == 0) begin
        automatic int src = (k / (W - 2) + 2) * W + k % (W - 2) + 2;
        checks++;
        if (cycle - sent[src] != 2) begin
          failures++;
          $display("latency %0d", cycle - sent[src]);
        end
      end
      got++;
      if (got == NF * (W - 2) * (H - 2)) begin
        checks += 2;
        if (sat == 0) begin failures++; $display("no saturation"); end
        if (stalls == 0) begin failures++; $display("no stall"); end
        $display("outputs=%0d saturated=%0d stalls=%0d", got, sat, stalls);
        $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
        $finish;
      end
    end
  end
endmodule
