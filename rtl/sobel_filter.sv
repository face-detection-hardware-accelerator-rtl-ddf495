// sobel_filter: streaming 3x3 Sobel edge detector.
//
// The window-based example of the design flow. Pixels arrive in raster
// order; a two-row line_buffer supplies the 3-pixel image column of each
// pixel, and a 3x3 register window shifts one column per pixel. For every
// pixel at row >= 2 and column >= 2 the filter produces the gradient
// magnitude of the window centred one row up and one column left:
//   Gx = (p02 + 2 p12 + p22) - (p00 + 2 p10 + p20)
//   Gy = (p20 + 2 p21 + p22) - (p00 + 2 p01 + p02)
//   out = min(255, |Gx| + |Gy|)
// (p<row><col>, row 0 oldest). Border pixels produce no output, so an image
// of W x H gives (W-2) x (H-2) results in raster order.
// Interface: valid/ready in and out; img_w (3..MAX_W) and img_h (>= 3) give the
// image size and must stay constant within a frame. Timing: one pixel per cycle, the result
// for a pixel two cycles after it is accepted; a stalled output holds the
// whole pipeline.
// The Sobel kernels are the standard ones; the |Gx|+|Gy| magnitude, the
// border rule and the handshakes are this design's choices.
module sobel_filter #(
  parameter int unsigned MAX_W = 640,
  parameter int unsigned X_W   = 10,
  parameter int unsigned Y_W   = 9
) (
  input  logic           clk,
  input  logic           rst,
  input  logic [X_W-1:0] img_w,
  input  logic [Y_W-1:0] img_h,
  input  logic           in_valid,
  output logic           in_ready,
  input  logic [7:0]     in_pix,
  output logic           out_valid,
  input  logic           out_ready,
  output logic [7:0]     out_pix
);
  localparam int unsigned LB_AW = $clog2(MAX_W);

  logic adv, push;
  assign adv      = !out_valid || out_ready;
  assign in_ready = adv;
  assign push     = in_valid && adv;

  logic [X_W-1:0] col;
  logic [Y_W-1:0] row;
  always_ff @(posedge clk) begin
    if (rst) begin
      col <= '0;
      row <= '0;
    end else if (push) begin
      if (col == img_w - 1'b1) begin
        col <= '0;
        row <= (row == img_h - 1'b1) ? '0 : row + 1'b1;
      end else begin
        col <= col + 1'b1;
      end
    end
  end

  logic [7:0] column [3];
  line_buffer #(.ROWS(2), .MAX_W(MAX_W), .PIX_W(8)) u_lb (
    .clk, .push, .col(LB_AW'(col)), .pix(in_pix), .column
  );

  // 3x3 window, w[r][c], column 2 newest
  logic [7:0] w [3][3];
  logic       w_ok;
  always_ff @(posedge clk) begin
    if (rst) begin
      w_ok <= 1'b0;
      for (int r = 0; r < 3; r++) for (int c = 0; c < 3; c++) w[r][c] <= '0;
    end else if (adv) begin
      w_ok <= push && (col >= 2) && (row >= 2);
      if (push) begin
        for (int r = 0; r < 3; r++) begin
          w[r][0] <= w[r][1];
          w[r][1] <= w[r][2];
          w[r][2] <= column[r];
        end
      end
    end
  end

  logic signed [11:0] gx, gy;
  logic        [11:0] mag;
  always_comb begin
    gx = (12'(w[0][2]) + 12'(w[1][2]) * 2 + 12'(w[2][2]))
       - (12'(w[0][0]) + 12'(w[1][0]) * 2 + 12'(w[2][0]));
    gy = (12'(w[2][0]) + 12'(w[2][1]) * 2 + 12'(w[2][2]))
       - (12'(w[0][0]) + 12'(w[0][1]) * 2 + 12'(w[0][2]));
    mag = 12'(gx < 0 ? -gx : gx) + 12'(gy < 0 ? -gy : gy);
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      out_valid <= 1'b0;
      out_pix   <= '0;
    end else if (adv) begin
      out_valid <= w_ok;
      if (w_ok) out_pix <= (mag > 12'd255) ? 8'd255 : mag[7:0];
    end
  end

  a_out_hold: assert property (@(posedge clk) disable iff (rst)
    out_valid && !out_ready |=> out_valid && $stable(out_pix));
endmodule
