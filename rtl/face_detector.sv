// face_detector: streaming Viola-Jones face detection accelerator.
//
// Grayscale pixels arrive in raster order on a valid/ready stream. The
// sub-modules form a pipeline whose tasks run concurrently:
//   line_buffer          keeps the last WIN-1 rows and yields, per pixel,
//                        the image column of WIN pixels ending there;
//   integral_image       vertical then horizontal accumulation: the integral
//                        image, sum and squared sum of the WINxWIN window
//                        whose bottom-right corner is the newest pixel;
//   image_normalization  fixed-point factor sqrt(N*sqsum - sum^2) of a window;
//   cascade_classifier   parallel Haar cascade on a held window snapshot.
// While the classifier works on one window, pixels keep flowing, the
// integral image moves on to the next window and the normalization unit
// works out that window's factor; the stream stalls only when a new window
// is complete and either the classifier has not finished the last one or
// the new window's factor is not ready yet.
// Every window position inside the image is examined (step 1 pixel) at one
// scale; for other scales the host streams a resized image.
//
// Interface: img_w/img_h give the image size (WIN..MAX_W, WIN..MAX_H) and
// must stay constant during a frame; frames follow one another directly.
// Detections come out as window top-left corners on det_valid/det_ready;
// done_* report every finished window; `idle` is high when no pixel or
// window is in flight. Cascade tables are written through cfg_*.
// Timing: a window is complete two cycles after its last pixel; its factor
// takes STD_W+2 cycles (overlapping the previous window's classification);
// the classifier then needs 2 cycles to take it and G+2 cycles per stage of
// G groups. A window stream is therefore sustained at one window per
// max(STD_W+3, classification time) cycles.
// The partitioning into these sub-modules and their concurrency follow the
// document; stream handshakes, the stall rule and run-time sizes are this
// design's choices.
module face_detector
  import fd_pkg::*;
#(
  parameter int unsigned MAX_W      = 640,
  parameter int unsigned MAX_H      = 480,
  parameter int unsigned PAR        = 4,
  parameter int unsigned MAX_GROUPS = 1024,
  parameter int unsigned MAX_STAGES = 32,
  localparam int unsigned LANE_W = (PAR > 1) ? $clog2(PAR) : 1,
  localparam int unsigned GA_W   = $clog2(MAX_GROUPS),
  localparam int unsigned SA_W   = $clog2(MAX_STAGES),
  localparam int unsigned NS_W   = SA_W + 1
) (
  input  logic              clk,
  input  logic              rst,
  input  logic [X_W-1:0]    img_w,
  input  logic [Y_W-1:0]    img_h,
  input  logic              pix_valid,
  output logic              pix_ready,
  input  pix_t              pix,
  input  logic [NS_W-1:0]   num_stages,
  input  logic              cfg_weak_we,
  input  logic [LANE_W-1:0] cfg_lane,
  input  logic [GA_W-1:0]   cfg_group,
  input  weak_t             cfg_weak,
  input  logic              cfg_stage_we,
  input  logic [SA_W-1:0]   cfg_stage_addr,
  input  stage_t            cfg_stage,
  output logic              det_valid,
  input  logic              det_ready,
  output logic [X_W-1:0]    det_x,
  output logic [Y_W-1:0]    det_y,
  output logic              done_valid,
  output logic              done_face,
  output logic [NS_W-1:0]   done_stages,
  output logic              idle
);
  localparam int unsigned LB_AW = $clog2(MAX_W);

  // raster position of the incoming pixel
  logic [X_W-1:0] col;
  logic [Y_W-1:0] row;
  logic           push;
  assign push = pix_valid && pix_ready;

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

  pix_t column [WIN];
  line_buffer #(.ROWS(WIN - 1), .MAX_W(MAX_W), .PIX_W(PIX_W)) u_lb (
    .clk, .push, .col(LB_AW'(col)), .pix, .column
  );

  logic            win_ok;
  assign win_ok = (col >= X_W'(WIN - 1)) && (row >= Y_W'(WIN - 1));

  logic            ii_valid, ii_ready;
  ii_t             ii [WIN][WIN];
  logic [II_W-1:0] sum;
  logic [SQ_W-1:0] sqsum;
  logic [X_W-1:0]  ii_x;
  logic [Y_W-1:0]  ii_y;

  integral_image u_ii (
    .clk, .rst,
    .in_valid(pix_valid), .in_ready(pix_ready), .in_col(column),
    .in_win_ok(win_ok), .in_x(col - X_W'(WIN - 1)), .in_y(row - Y_W'(WIN - 1)),
    .out_valid(ii_valid), .out_ready(ii_ready),
    .ii, .sum, .sqsum, .out_x(ii_x), .out_y(ii_y)
  );

  // The factor of the window waiting at the integral-image output is worked
  // out while the classifier is still busy with the previous window.
  logic             norm_busy, norm_done, std_ok;
  logic [STD_W-1:0] stddev;
  image_normalization u_norm (
    .clk, .rst, .start(ii_valid && !norm_busy && !norm_done && !std_ok), .sum, .sqsum,
    .busy(norm_busy), .done(norm_done), .stddev
  );

  always_ff @(posedge clk) begin
    if (rst) std_ok <= 1'b0;
    else if (norm_done) std_ok <= 1'b1;
    else if (ii_valid && ii_ready) std_ok <= 1'b0;
  end

  logic cc_busy, cc_win_ready;
  assign ii_ready = cc_win_ready && std_ok;
  cascade_classifier #(.PAR(PAR), .MAX_GROUPS(MAX_GROUPS), .MAX_STAGES(MAX_STAGES)) u_cc (
    .clk, .rst,
    .win_valid(ii_valid && std_ok), .win_ready(cc_win_ready), .win_ii(ii), .win_x(ii_x), .win_y(ii_y),
    .std_valid(1'b1), .std_in(stddev),
    .num_stages, .cfg_weak_we, .cfg_lane, .cfg_group, .cfg_weak,
    .cfg_stage_we, .cfg_stage_addr, .cfg_stage,
    .det_valid, .det_ready, .det_x, .det_y,
    .done_valid, .done_face, .done_stages, .busy(cc_busy)
  );

  // pixels accepted in the last two cycles are still in the integral image
  logic [1:0] recent;
  always_ff @(posedge clk) begin
    if (rst) recent <= '0;
    else if (pix_ready) recent <= {recent[0], push};
  end
  assign idle = !cc_busy && !norm_busy && !ii_valid && (recent == '0);

  a_size: assert property (@(posedge clk) disable iff (rst)
    pix_valid |-> img_w >= X_W'(WIN) && img_w <= X_W'(MAX_W) && img_h >= Y_W'(WIN) && img_h <= Y_W'(MAX_H));
  a_std_first: assert property (@(posedge clk) disable iff (rst)
    ii_valid && ii_ready |-> std_ok && !norm_busy);
endmodule
