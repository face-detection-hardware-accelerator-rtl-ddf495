// tb_vj_accel_run: end-to-end test body for vj_accel_top at its default
// parameters. It loads a pseudo-random cascade of NST stages (thresholds
// tuned on the first image so that windows leave at every stage), streams
// two frames of sizes FW0 x FH0 and FW1 x FH1 through the face detector
// and, at the same time, one SW x SH frame through the Sobel filter. Every
// window's stage count, every detection and every Sobel output is checked
// against the pixel-level reference. Counted mechanisms: pixel-stream stalls
// while the classifier is busy, rejection after each stage, full-cascade
// detections, held detections, flat windows, the frame-size change between
// frames, Sobel saturation and Sobel output stalls; any that never happens
// is a failure.
module tb_vj_accel_run #(
  parameter int FW0 = 64, FH0 = 40, FW1 = 40, FH1 = 30, SW = 40, SH = 6,
  parameter int NST = 5, GPS = 2, GAPS = 1
);
  import fd_pkg::*;
  import fd_ref_pkg::*;
  localparam int PAR = 4;
  localparam int FW [2] = '{FW0, FW1};
  localparam int FH [2] = '{FH0, FH1};

  logic clk = 0, rst = 1;
  logic [X_W-1:0] fd_img_w, fd_det_x, sb_img_w = X_W'(SW);
  logic [Y_W-1:0] fd_img_h, fd_det_y, sb_img_h = Y_W'(SH);
  logic fd_pix_valid, fd_pix_ready, fd_cfg_weak_we, fd_cfg_stage_we, fd_det_valid, fd_det_ready;
  logic fd_done_valid, fd_done_face, fd_idle;
  pix_t fd_pix;
  logic [5:0] fd_num_stages = 6'(NST), fd_done_stages;
  logic [1:0] fd_cfg_lane;
  logic [9:0] fd_cfg_group;
  weak_t fd_cfg_weak;
  logic [4:0] fd_cfg_stage_addr;
  stage_t fd_cfg_stage;
  logic sb_in_valid, sb_in_ready, sb_out_valid, sb_out_ready;
  logic [7:0] sb_in_pix, sb_out_pix;

  int checks = 0, failures = 0;
  int unsigned frame0 [], frame1 [], sframe [];
  int exp0 [], exp1 [];
  int nwin [2];
  int n_done = 0, n_det = 0, stalls = 0, det_holds = 0, flat = 0, size_changes = 0;
  int sb_got = 0, sb_sat = 0, sb_stalls = 0;
  bit fd_finished = 0, sb_finished = 0;
  int exit_at [NST+1];
  longint cycle = 0, frame_start [2], frame_end [2];
  always @(posedge clk) cycle++;

  vj_accel_top dut (.*);
  always #5 clk = ~clk;

  function automatic int exp_of(int f, int k);
    return (f == 0) ? exp0[k] : exp1[k];
  endfunction

  initial begin
    fd_pix_valid = 0; fd_pix = 0; fd_cfg_weak_we = 0; fd_cfg_stage_we = 0; fd_cfg_lane = 0;
    fd_cfg_group = 0; fd_cfg_weak = '0; fd_cfg_stage_addr = 0; fd_cfg_stage = '0;
    fd_img_w = X_W'(FW0); fd_img_h = Y_W'(FH0);
    foreach (exit_at[i]) exit_at[i] = 0;
    gen_cascade(PAR, NST, GPS);
    for (int f = 0; f < 2; f++) begin
      automatic int nwx = FW[f] - WIN + 1, nwy = FH[f] - WIN + 1;
      gen_image(FW[f], FH[f]);
      if (f == 0) tune_cascade(200, 60);
      nwin[f] = nwx * nwy;
      if (f == 0) begin frame0 = img; exp0 = new[nwin[f]]; end
      else begin frame1 = img; exp1 = new[nwin[f]]; end
      for (int wy = 0; wy < nwy; wy++)
        for (int wx = 0; wx < nwx; wx++) begin
          automatic longint sd = longint'(window_std(wx, wy));
          if (f == 0) exp0[wy * nwx + wx] = cascade_stages(wx, wy, sd);
          else exp1[wy * nwx + wx] = cascade_stages(wx, wy, sd);
          if (sd == 0) flat++;
        end
    end
    repeat (3) @(negedge clk);
    rst = 0;
    for (int g = 0; g < ref_ngroups; g++)
      for (int l = 0; l < PAR; l++) begin
        fd_cfg_weak_we = 1; fd_cfg_lane = 2'(l); fd_cfg_group = 10'(g); fd_cfg_weak = ref_weak[l][g];
        @(negedge clk);
      end
    fd_cfg_weak_we = 0;
    for (int s = 0; s < NST; s++) begin
      fd_cfg_stage_we = 1; fd_cfg_stage_addr = 5'(s); fd_cfg_stage = ref_stage[s];
      @(negedge clk);
    end
    fd_cfg_stage_we = 0;
    for (int f = 0; f < 2; f++) begin
      if (f == 1) begin
        while (!fd_idle) @(negedge clk);   // size registers change between frames
        frame_end[0] = cycle;
        fd_img_w = X_W'(FW1); fd_img_h = Y_W'(FH1);
        size_changes++;
      end
      frame_start[f] = cycle;
      for (int i = 0; i < FW[f] * FH[f]; i++) begin
        if (GAPS != 0) while ($urandom_range(0, 7) == 0) @(negedge clk);
        fd_pix_valid = 1;
        fd_pix = pix_t'((f == 0) ? frame0[i] : frame1[i]);
        #1;
        while (!fd_pix_ready) begin stalls++; @(negedge clk); #1; end
        @(negedge clk);
        fd_pix_valid = 0;
      end
    end
    repeat (4) @(negedge clk);
    while (!fd_idle) @(negedge clk);
    frame_end[1] = cycle;
    repeat (4) @(negedge clk);
    for (int f = 0; f < 2; f++)
      $display("frame %0d (%0dx%0d): %0d cycles, %0.1f frames/s at 125 MHz (one scale)", f, FW[f], FH[f],
               frame_end[f] - frame_start[f], 125.0e6 / real'(frame_end[f] - frame_start[f]));
    checks++;
    if (n_done != nwin[0] + nwin[1]) begin failures++; $display("windows done %0d exp %0d", n_done, nwin[0] + nwin[1]); end
    $display("face detector: windows=%0d detections=%0d stalls=%0d held detections=%0d flat windows=%0d size changes=%0d",
             n_done, n_det, stalls, det_holds, flat, size_changes);
    for (int s = 0; s <= NST; s++) begin
      $display("windows leaving after %0d stages: %0d", s, exit_at[s]);
      checks++;
      if (exit_at[s] == 0) begin failures++; $display("exit point %0d never reached", s); end
    end
    checks += 4;
    if (stalls == 0) begin failures++; $display("no stall"); end
    if (det_holds == 0) begin failures++; $display("no held detection"); end
    if (flat == 0) begin failures++; $display("no flat window"); end
    if (size_changes == 0) failures++;
    fd_finished = 1;
  end

  // face detector results
  always @(negedge clk) begin
    fd_det_ready = ($urandom_range(0, 3) == 0);
    if (!rst && fd_done_valid) begin
      automatic int f = (n_done < nwin[0]) ? 0 : 1;
      automatic int k = (f == 0) ? n_done : n_done - nwin[0];
      checks += 2;
      if (n_done < nwin[0] + nwin[1]) begin
        if (int'(fd_done_stages) != exp_of(f, k)) begin
          failures++;
          if (failures < 10) $display("frame %0d window %0d: stages %0d exp %0d", f, k, fd_done_stages, exp_of(f, k));
        end
        if (fd_done_face != (exp_of(f, k) == NST)) failures++;
        exit_at[exp_of(f, k)]++;
      end else failures++;
      n_done++;
    end
    if (!rst && fd_det_valid && !fd_det_ready) det_holds++;
    if (!rst && fd_det_valid && fd_det_ready) begin
      automatic int f = (n_done < nwin[0]) ? 0 : 1;
      automatic int k = (f == 0) ? n_done : n_done - nwin[0];
      automatic int nwx = FW[f] - WIN + 1;
      checks++;
      if (n_done >= nwin[0] + nwin[1] || exp_of(f, k) != NST || int'(fd_det_x) != k % nwx || int'(fd_det_y) != k / nwx) begin
        failures++;
        if (failures < 10) $display("unexpected detection at (%0d,%0d)", fd_det_x, fd_det_y);
      end
      n_det++;
    end
  end

  // Sobel filter, running beside the face detector
  function automatic int sobel_ref(int y, int x);
    int gx, gy, m;
    gx = (sframe[(y-1)*SW+x+1] + 2 * sframe[y*SW+x+1] + sframe[(y+1)*SW+x+1])
       - (sframe[(y-1)*SW+x-1] + 2 * sframe[y*SW+x-1] + sframe[(y+1)*SW+x-1]);
    gy = (sframe[(y+1)*SW+x-1] + 2 * sframe[(y+1)*SW+x] + sframe[(y+1)*SW+x+1])
       - (sframe[(y-1)*SW+x-1] + 2 * sframe[(y-1)*SW+x] + sframe[(y-1)*SW+x+1]);
    m = (gx < 0 ? -gx : gx) + (gy < 0 ? -gy : gy);
    return m > 255 ? 255 : m;
  endfunction

  initial begin
    sb_in_valid = 0; sb_in_pix = 0;
    sframe = new[SW * SH];
    foreach (sframe[i]) sframe[i] = ((i / 5) % 3 == 0) ? 255 : $urandom_range(0, 120);
    @(negedge rst);
    for (int i = 0; i < SW * SH; i++) begin
      sb_in_valid = 1;
      sb_in_pix = 8'(sframe[i]);
      #1;
      while (!sb_in_ready) begin @(negedge clk); #1; end
      @(negedge clk);
      sb_in_valid = 0;
    end
  end

  always @(negedge clk) begin
    sb_out_ready = ($urandom_range(0, 2) != 0);
    if (!rst && sb_out_valid && !sb_out_ready) sb_stalls++;
    if (!rst && sb_out_valid && sb_out_ready) begin
      automatic int e = sobel_ref(sb_got / (SW - 2) + 1, sb_got % (SW - 2) + 1);
      checks++;
      if (int'(sb_out_pix) != e) begin
        failures++;
        if (failures < 10) $display("sobel output %0d: %0d exp %0d", sb_got, sb_out_pix, e);
      end
      if (e == 255) sb_sat++;
      sb_got++;
      if (sb_got == (SW - 2) * (SH - 2)) begin
        checks += 2;
        if (sb_sat == 0) begin failures++; $display("sobel never saturated"); end
        if (sb_stalls == 0) begin failures++; $display("sobel output never stalled"); end
        $display("sobel: outputs=%0d saturated=%0d stalls=%0d", sb_got, sb_sat, sb_stalls);
        sb_finished = 1;
      end
    end
  end

  initial begin
    wait (fd_finished && sb_finished);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
