// cascade_classifier: parallel, early-exit cascade of Haar classifiers.
//
// The classifier takes a snapshot of one window's integral image, waits for
// that window's normalization factor and then runs the cascade stage by
// stage. A stage's weak classifiers are stored in groups of PAR; one group is
// read per cycle and its PAR classifiers are evaluated side by side (the
// classifiers of a stage do not depend on each other), their votes summed
// into the stage accumulator. After the last group the sum is compared with
// the stage threshold: below it the window is rejected at once, otherwise
// the next stage starts. A window that passes all `num_stages` stages is a
// detection.
//
// Tables, written by the host through the cfg_* ports (the trained cascade
// is data, not logic):
//   weak table  PAR banks x MAX_GROUPS words of weak_t; a stage whose size
//               is not a multiple of PAR is padded with zero-vote entries;
//   stage table MAX_STAGES words of stage_t (first group, group count,
//               stage threshold).
// Interface: win_valid/win_ready loads a window (ready only when idle);
// std_valid/std_in deliver its normalization factor; det_valid/det_ready
// hand out a detection. done_valid pulses once per finished window with the
// number of stages it passed and whether it is a face.
// Timing: a stage of G groups takes G + 2 cycles (one read latency, one
// decision); a window costs 1 cycle to load plus the wait for the factor.
// Parallel evaluation and the early-exit cascade follow the document; the
// table layout, PAR = 4 and the stage timing are this design's choices.
module cascade_classifier
  import fd_pkg::*;
#(
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
  // window in
  input  logic              win_valid,
  output logic              win_ready,
  input  ii_t               win_ii [WIN][WIN],
  input  logic [X_W-1:0]    win_x,
  input  logic [Y_W-1:0]    win_y,
  // normalization factor of the loaded window
  input  logic              std_valid,
  input  logic [STD_W-1:0]  std_in,
  // host tables
  input  logic [NS_W-1:0]   num_stages,
  input  logic              cfg_weak_we,
  input  logic [LANE_W-1:0] cfg_lane,
  input  logic [GA_W-1:0]   cfg_group,
  input  weak_t             cfg_weak,
  input  logic              cfg_stage_we,
  input  logic [SA_W-1:0]   cfg_stage_addr,
  input  stage_t            cfg_stage,
  // results
  output logic              det_valid,
  input  logic              det_ready,
  output logic [X_W-1:0]    det_x,
  output logic [Y_W-1:0]    det_y,
  output logic              done_valid,
  output logic              done_face,
  output logic [NS_W-1:0]   done_stages,
  output logic              busy
);
  localparam int unsigned ACC_W = FX_W + 10;

  typedef enum logic [2:0] {S_IDLE, S_NORM, S_ISSUE, S_DRAIN, S_DECIDE, S_DET} state_e;
  state_e state;

  // tables
  weak_t  weak_mem  [PAR][MAX_GROUPS];
  stage_t stage_mem [MAX_STAGES];
  weak_t  rd_q [PAR];
  logic   rd_v;

  // window snapshot
  ii_t              ii_q [WIN][WIN];
  logic [STD_W-1:0] std_q;
  logic [X_W-1:0]   x_q;
  logic [Y_W-1:0]   y_q;

  logic [SA_W-1:0]  stage;
  logic [15:0]      k;
  logic signed [ACC_W-1:0] acc;
  stage_t           cur;
  assign cur = stage_mem[stage];

  // PAR weak classifiers in parallel
  logic signed [FX_W-1:0] votes [PAR];
  logic signed [ACC_W-1:0] group_sum;
  for (genvar l = 0; l < PAR; l++) begin : g_lane
    logic unused_left;
    haar_classifier u_haar (
      .ii(ii_q), .stddev(std_q), .wc(rd_q[l]), .vote(votes[l]), .take_left(unused_left)
    );
  end
  always_comb begin
    group_sum = '0;
    for (int l = 0; l < PAR; l++) group_sum = group_sum + ACC_W'(votes[l]);
  end

  logic [GA_W-1:0] rd_addr;
  assign rd_addr = GA_W'(cur.first + k);

  always_ff @(posedge clk) begin
    for (int l = 0; l < PAR; l++) begin
      if (cfg_weak_we && cfg_lane == LANE_W'(l)) weak_mem[l][cfg_group] <= cfg_weak;
      if (state == S_ISSUE) rd_q[l] <= weak_mem[l][rd_addr];
    end
    if (cfg_stage_we) stage_mem[cfg_stage_addr] <= cfg_stage;
  end

  assign win_ready = (state == S_IDLE);
  assign det_valid = (state == S_DET);
  assign det_x     = x_q;
  assign det_y     = y_q;
  assign busy      = (state != S_IDLE);

  logic pass;
  assign pass = acc >= ACC_W'(cur.thr);

  always_ff @(posedge clk) begin
    if (win_valid && win_ready) begin
      ii_q <= win_ii;
      x_q  <= win_x;
      y_q  <= win_y;
    end
    if (state == S_NORM && std_valid) std_q <= std_in;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      state <= S_IDLE;
      stage <= '0;
      k     <= '0;
      acc   <= '0;
      rd_v  <= 1'b0;
      done_valid  <= 1'b0;
      done_face   <= 1'b0;
      done_stages <= '0;
    end else begin
      done_valid <= 1'b0;
      rd_v <= (state == S_ISSUE) && (cur.ngroups != 0);
      if (rd_v) acc <= acc + group_sum;
      unique case (state)
        S_IDLE: if (win_valid) state <= S_NORM;
        S_NORM: if (std_valid) begin
          stage <= '0;
          k     <= '0;
          acc   <= '0;
          state <= (num_stages == 0) ? S_DET : S_ISSUE;
        end
        S_ISSUE: begin
          if (cur.ngroups == 0) state <= S_DECIDE;
          else if (k == cur.ngroups - 1) state <= S_DRAIN;
          k <= k + 1'b1;
        end
        S_DRAIN: state <= S_DECIDE;
        S_DECIDE: begin
          k   <= '0;
          acc <= '0;
          if (!pass) begin
            done_valid  <= 1'b1;
            done_face   <= 1'b0;
            done_stages <= NS_W'(stage);
            state       <= S_IDLE;
          end else if (NS_W'(stage) + 1'b1 == num_stages) begin
            state <= S_DET;
          end else begin
            stage <= stage + 1'b1;
            state <= S_ISSUE;
          end
        end
        S_DET: if (det_ready) begin
          done_valid  <= 1'b1;
          done_face   <= 1'b1;
          done_stages <= num_stages;
          state       <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  a_det_hold: assert property (@(posedge clk) disable iff (rst)
    det_valid && !det_ready |=> det_valid && $stable(det_x) && $stable(det_y));
endmodule
