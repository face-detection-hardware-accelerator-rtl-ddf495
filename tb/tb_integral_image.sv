// tb_integral_image: feeds a strip of random image columns, with random
// input gaps and output stalls, and checks every window's integral image,
// sum, squared sum and position against sums formed directly from the
// pixels. Without stalls the window must appear two cycles after its last
// column.
module tb_integral_image;
  import fd_pkg::*;
  localparam int NCOL = 90;
  logic clk = 0, rst = 1;
  logic in_valid, in_ready, in_win_ok, out_valid, out_ready;
  pix_t in_col [WIN];
  logic [X_W-1:0] in_x, out_x;
  logic [Y_W-1:0] in_y, out_y;
  ii_t ii [WIN][WIN];
  logic [II_W-1:0] sum;
  logic [SQ_W-1:0] sqsum;
  int checks = 0, failures = 0, stalls = 0;
  int unsigned strip [WIN][NCOL];
  int sent_cycle [NCOL];
  int cycle = 0;

  integral_image dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycle++;

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // source
  initial begin
    in_valid = 0; in_win_ok = 0; in_x = 0; in_y = 0;
    for (int r = 0; r < WIN; r++) in_col[r] = 0;
    for (int c = 0; c < NCOL; c++)
      for (int r = 0; r < WIN; r++) strip[r][c] = (c < 45) ? $urandom_range(0, 255) : 255 - (c % 2);
    repeat (3) @(negedge clk);
    rst = 0;
    for (int c = 0; c < NCOL; c++) begin
      while ($urandom_range(0, 4) == 0 && c > 60) @(negedge clk);
      in_valid = 1;
      for (int r = 0; r < WIN; r++) in_col[r] = 8'(strip[r][c]);
      in_win_ok = (c >= WIN - 1);
      in_x = X_W'(c - (WIN - 1));
      in_y = Y_W'(7);
      #1;
      while (!in_ready) begin @(negedge clk); #1; end
      sent_cycle[c] = cycle;
      @(negedge clk);
      in_valid = 0;
    end
  end

  // sink
  initial begin
    int got = 0;
    out_ready = 0;
    @(negedge rst);
    while (got < NCOL - WIN + 1) begin
      @(negedge clk);
      out_ready = (got < 20) ? 1'b1 : ($urandom_range(0, 2) != 0);
      #1;
      if (out_valid && !out_ready) stalls++;
      if (out_valid && out_ready) begin
        automatic int c_last = got + WIN - 1;
        automatic longint sq = 0;
        for (int r = 0; r < WIN; r++)
          for (int c = 0; c < WIN; c++) begin
            automatic longint s = 0;
            for (int rr = 0; rr <= r; rr++) for (int cc = 0; cc <= c; cc++) s += strip[rr][got + cc];
            checks++;
            if (ii[r][c] != II_W'(s)) begin
              failures++;
              if (failures < 10) $display("win %0d ii[%0d][%0d]=%0d exp %0d", got, r, c, ii[r][c], s);
            end
            sq += strip[r][got + c] * strip[r][got + c];
          end
        checks++;
        if (sqsum != SQ_W'(sq)) begin failures++; $display("win %0d sqsum %0d exp %0d", got, sqsum, sq); end
        checks++;
        if (sum != ii[WIN-1][WIN-1]) failures++;
        checks++;
        if (out_x != X_W'(got) || out_y != Y_W'(7)) begin failures++; $display("win %0d pos %0d,%0d", got, out_x, out_y); end
        if (got < 20) begin
          checks++;
          if (cycle - sent_cycle[c_last] != 2) begin
            failures++;
            $display("win %0d latency %0d", got, cycle - sent_cycle[c_last]);
          end
        end
        got++;
      end
    end
    checks++;
    if (stalls == 0) begin failures++; $display("no stall exercised"); end
    $display("stalls=%0d", stalls);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
