// tb_face_detector: streams two frames through a reduced-size face detector
// (random gaps on the pixel stream, random back-pressure on detections) and
// checks, window by window in raster order, the number of cascade stages
// passed and every detection's position against the pixel-level reference.
// It counts the mechanisms of the design - stream stalls while the
// classifier is busy, rejection at each stage, full-cascade detections,
// held detections and flat (zero-variance) windows - and fails if one never
// occurred.
module tb_face_detector;
  import fd_pkg::*;
  import fd_ref_pkg::*;
  localparam int MAX_W = 64, MAX_H = 48, PAR = 4, MAX_GROUPS = 32, MAX_STAGES = 8;
  localparam int NST = 4, FW = 52, FH = 34, NFRAMES = 2;
  localparam int NWX = FW - WIN + 1, NWY = FH - WIN + 1, NWIN = NWX * NWY;

  logic clk = 0, rst = 1;
  logic [X_W-1:0] img_w = X_W'(FW), det_x;
  logic [Y_W-1:0] img_h = Y_W'(FH), det_y;
  logic pix_valid, pix_ready, cfg_weak_we, cfg_stage_we, det_valid, det_ready;
  logic done_valid, done_face, idle;
  pix_t pix;
  logic [3:0] num_stages = 4'(NST), done_stages;
  logic [1:0] cfg_lane;
  logic [4:0] cfg_group;
  weak_t cfg_weak;
  logic [2:0] cfg_stage_addr;
  stage_t cfg_stage;

  int checks = 0, failures = 0;
  int exp_stages [NFRAMES][NWIN];
  int n_done = 0, n_det = 0, stalls = 0, det_holds = 0, flat = 0;
  int exit_at [NST+1];
  int unsigned frames [NFRAMES][FW*FH];

  face_detector #(.MAX_W(MAX_W), .MAX_H(MAX_H), .PAR(PAR), .MAX_GROUPS(MAX_GROUPS),
                  .MAX_STAGES(MAX_STAGES)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    #20000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    pix_valid = 0; pix = 0; cfg_weak_we = 0; cfg_stage_we = 0; cfg_lane = 0; cfg_group = 0;
    cfg_weak = '0; cfg_stage_addr = 0; cfg_stage = '0;
    foreach (exit_at[i]) exit_at[i] = 0;
    gen_cascade(PAR, NST, 2);
    for (int f = 0; f < NFRAMES; f++) begin
      gen_image(FW, FH);
      if (f == 0) tune_cascade(150, 60);
      for (int i = 0; i < FW * FH; i++) frames[f][i] = img[i];
      for (int wy = 0; wy < NWY; wy++)
        for (int wx = 0; wx < NWX; wx++) begin
          automatic longint sd = longint'(window_std(wx, wy));
          exp_stages[f][wy * NWX + wx] = cascade_stages(wx, wy, sd);
          if (sd == 0) flat++;
        end
    end
    repeat (3) @(negedge clk);
    rst = 0;
    for (int g = 0; g < ref_ngroups; g++)
      for (int l = 0; l < PAR; l++) begin
        cfg_weak_we = 1; cfg_lane = 2'(l); cfg_group = 5'(g); cfg_weak = ref_weak[l][g];
        @(negedge clk);
      end
    cfg_weak_we = 0;
    for (int s = 0; s < NST; s++) begin
      cfg_stage_we = 1; cfg_stage_addr = 3'(s); cfg_stage = ref_stage[s];
      @(negedge clk);
    end
    cfg_stage_we = 0;
    for (int f = 0; f < NFRAMES; f++)
      for (int i = 0; i < FW * FH; i++) begin
        while ($urandom_range(0, 7) == 0) @(negedge clk);
        pix_valid = 1;
        pix = pix_t'(frames[f][i]);
        #1;
        while (!pix_ready) begin stalls++; @(negedge clk); #1; end
        @(negedge clk);
        pix_valid = 0;
      end
    repeat (4) @(negedge clk);
    while (!idle) @(negedge clk);
    repeat (4) @(negedge clk);
    checks++;
    if (n_done != NFRAMES * NWIN) begin failures++; $display("windows done %0d exp %0d", n_done, NFRAMES * NWIN); end
    $display("windows=%0d detections=%0d stalls=%0d held detections=%0d flat windows=%0d",
             n_done, n_det, stalls, det_holds, flat);
    for (int s = 0; s <= NST; s++) begin
      $display("windows leaving after %0d stages: %0d", s, exit_at[s]);
      checks++;
      if (exit_at[s] == 0) begin failures++; $display("exit point %0d never reached", s); end
    end
    checks += 3;
    if (stalls == 0) begin failures++; $display("no stall"); end
    if (det_holds == 0) begin failures++; $display("no held detection"); end
    if (flat == 0) begin failures++; $display("no flat window"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // results monitor
  always @(negedge clk) begin
    det_ready = ($urandom_range(0, 3) == 0);
    if (!rst && done_valid) begin
      automatic int f = n_done / NWIN, k = n_done % NWIN;
      checks += 2;
      if (f < NFRAMES) begin
        if (int'(done_stages) != exp_stages[f][k]) begin
          failures++;
          if (failures < 10) $display("frame %0d window %0d: stages %0d exp %0d", f, k, done_stages, exp_stages[f][k]);
        end
        if (done_face != (exp_stages[f][k] == NST)) failures++;
        exit_at[exp_stages[f][k]]++;
      end else failures++;
      n_done++;
    end
    if (!rst && det_valid && !det_ready) det_holds++;
    if (!rst && det_valid && det_ready) begin
      automatic int f = n_done / NWIN, k = n_done % NWIN;
      checks++;
      if (f >= NFRAMES || exp_stages[f][k] != NST || int'(det_x) != k % NWX || int'(det_y) != k / NWX) begin
        failures++;
        if (failures < 10) $display("unexpected detection at (%0d,%0d), window %0d", det_x, det_y, k);
      end
      n_det++;
    end
  end
endmodule
