// tb_line_buffer: checks the column output of line_buffer against a stored
// image for three frames of random pixels, at a width below the maximum.
module tb_line_buffer;
  localparam int ROWS = 3, MAX_W = 8, W = 6, H = 7;
  logic clk = 0;
  logic push;
  logic [2:0] col;
  logic [7:0] pix;
  logic [7:0] column [ROWS+1];
  int checks = 0, failures = 0;
  int unsigned img [H][W];

  line_buffer #(.ROWS(ROWS), .MAX_W(MAX_W), .PIX_W(8)) dut (.clk, .push, .col, .pix, .column);

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    push = 0; col = 0; pix = 0;
    @(negedge clk);
    for (int f = 0; f < 3; f++)
      for (int y = 0; y < H; y++)
        for (int x = 0; x < W; x++) begin
          img[y][x] = $urandom_range(0, 255);
          push = ($urandom_range(0, 3) != 0);
          while (!push) begin   // idle cycles do not disturb the rows
            @(negedge clk);
            push = ($urandom_range(0, 1) == 1);
          end
          col = 3'(x);
          pix = 8'(img[y][x]);
          #1;
          if (y >= ROWS) begin
            for (int r = 0; r <= ROWS; r++) begin
              checks++;
              if (column[r] != 8'(img[y - ROWS + r][x])) begin
                failures++;
                if (failures < 10) $display("mismatch f%0d y%0d x%0d r%0d: %0d vs %0d", f, y, x, r, column[r], img[y-ROWS+r][x]);
              end
            end
          end
          @(negedge clk);
          push = 0;
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
