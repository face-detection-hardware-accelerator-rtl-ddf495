// vj_accel_top: the face detection accelerator with the Sobel filter beside it.
//
// Two independent stream engines share only clock and reset:
//   fd_*  the Viola-Jones face detector (pixel stream in, detections out,
//         cascade table write port, image size and stage count registers);
//   sb_*  the 3x3 Sobel edge filter, the window-based example design.
// The host side (processor, memory-mapped registers, DMA) is outside this
// RTL; its connections are the plain ports below. All parameters default to
// the sizes of the main configuration: images up to 640x480, four weak
// classifiers evaluated per cycle, room for 4096 weak classifiers in 32
// stages.
module vj_accel_top
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
  // face detector
  input  logic [X_W-1:0]    fd_img_w,
  input  logic [Y_W-1:0]    fd_img_h,
  input  logic              fd_pix_valid,
  output logic              fd_pix_ready,
  input  pix_t              fd_pix,
  input  logic [NS_W-1:0]   fd_num_stages,
  input  logic              fd_cfg_weak_we,
  input  logic [LANE_W-1:0] fd_cfg_lane,
  input  logic [GA_W-1:0]   fd_cfg_group,
  input  weak_t             fd_cfg_weak,
  input  logic              fd_cfg_stage_we,
  input  logic [SA_W-1:0]   fd_cfg_stage_addr,
  input  stage_t            fd_cfg_stage,
  output logic              fd_det_valid,
  input  logic              fd_det_ready,
  output logic [X_W-1:0]    fd_det_x,
  output logic [Y_W-1:0]    fd_det_y,
  output logic              fd_done_valid,
  output logic              fd_done_face,
  output logic [NS_W-1:0]   fd_done_stages,
  output logic              fd_idle,
  // Sobel filter
  input  logic [X_W-1:0]    sb_img_w,
  input  logic [Y_W-1:0]    sb_img_h,
  input  logic              sb_in_valid,
  output logic              sb_in_ready,
  input  logic [7:0]        sb_in_pix,
  output logic              sb_out_valid,
  input  logic              sb_out_ready,
  output logic [7:0]        sb_out_pix
);
  face_detector #(
    .MAX_W(MAX_W), .MAX_H(MAX_H), .PAR(PAR), .MAX_GROUPS(MAX_GROUPS), .MAX_STAGES(MAX_STAGES)
  ) u_fd (
    .clk, .rst,
    .img_w(fd_img_w), .img_h(fd_img_h),
    .pix_valid(fd_pix_valid), .pix_ready(fd_pix_ready), .pix(fd_pix),
    .num_stages(fd_num_stages),
    .cfg_weak_we(fd_cfg_weak_we), .cfg_lane(fd_cfg_lane), .cfg_group(fd_cfg_group),
    .cfg_weak(fd_cfg_weak), .cfg_stage_we(fd_cfg_stage_we),
    .cfg_stage_addr(fd_cfg_stage_addr), .cfg_stage(fd_cfg_stage),
    .det_valid(fd_det_valid), .det_ready(fd_det_ready), .det_x(fd_det_x), .det_y(fd_det_y),
    .done_valid(fd_done_valid), .done_face(fd_done_face), .done_stages(fd_done_stages),
    .idle(fd_idle)
  );

  sobel_filter #(.MAX_W(MAX_W), .X_W(X_W), .Y_W(Y_W)) u_sobel (
    .clk, .rst,
    .img_w(sb_img_w), .img_h(sb_img_h),
    .in_valid(sb_in_valid), .in_ready(sb_in_ready), .in_pix(sb_in_pix),
    .out_valid(sb_out_valid), .out_ready(sb_out_ready), .out_pix(sb_out_pix)
  );
endmodule
