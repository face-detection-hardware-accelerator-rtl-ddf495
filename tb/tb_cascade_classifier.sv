// tb_cascade_classifier: loads a random cascade into the tables, presents
// windows of a test image one at a time with their normalization factor and
// checks the number of stages passed, the face decision, the detection
// handshake and the cycle count (1 + G + 2 per stage of G groups after the
// factor arrives).
module tb_cascade_classifier;
  import fd_pkg::*;
  import fd_ref_pkg::*;
  localparam int PAR = 4, MAX_GROUPS = 32, MAX_STAGES = 8, NST = 4;
  logic clk = 0, rst = 1;
  logic win_valid, win_ready, std_valid, cfg_weak_we, cfg_stage_we;
  ii_t win_ii [WIN][WIN];
  logic [X_W-1:0] win_x, det_x;
  logic [Y_W-1:0] win_y, det_y;
  logic [STD_W-1:0] std_in;
  logic [3:0] num_stages, done_stages;
  logic [1:0] cfg_lane;
  logic [4:0] cfg_group;
  weak_t cfg_weak;
  logic [2:0] cfg_stage_addr;
  stage_t cfg_stage;
  logic det_valid, det_ready, done_valid, done_face, busy;
  int checks = 0, failures = 0, faces = 0;
  int reached [NST+1];
  int cycle = 0;

  cascade_classifier #(.PAR(PAR), .MAX_GROUPS(MAX_GROUPS), .MAX_STAGES(MAX_STAGES)) dut (.*);
  always #5 clk = ~clk;
  always @(posedge clk) cycle++;

  initial begin
    #5000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    win_valid = 0; std_valid = 0; cfg_weak_we = 0; cfg_stage_we = 0; det_ready = 0;
    std_in = 0; win_x = 0; win_y = 0; cfg_lane = 0; cfg_group = 0; cfg_weak = '0;
    cfg_stage_addr = 0; cfg_stage = '0; num_stages = 4'(NST);
    foreach (reached[i]) reached[i] = 0;
    gen_image(64, 40);
    gen_cascade(PAR, NST, 2);
    tune_cascade(120, 60);
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
    for (int t = 0; t < 160; t++) begin
      automatic int wx = $urandom_range(0, img_w - WIN), wy = $urandom_range(0, img_h - WIN);
      automatic longint sd = longint'(window_std(wx, wy));
      automatic int es = cascade_stages(wx, wy, sd);
      automatic int exp_cycles = 0, c0, dly;
      exp_cycles = 0;
      for (int s = 0; s <= es && s < NST; s++) exp_cycles += int'(ref_stage[s].ngroups) + 2;
      for (int r = 0; r < WIN; r++)
        for (int c = 0; c < WIN; c++) win_ii[r][c] = II_W'(window_sum_part(wx, wy, r, c));
      win_x = X_W'(wx); win_y = Y_W'(wy);
      win_valid = 1;
      #1;
      checks++;
      if (!win_ready) failures++;
      @(negedge clk);
      win_valid = 0;
      dly = $urandom_range(0, 5);
      repeat (dly) @(negedge clk);
      std_in = STD_W'(sd); std_valid = 1;
      c0 = cycle;
      @(negedge clk);
      std_valid = 0;
      det_ready = 0;
      while (!done_valid) begin
        @(negedge clk);
        if (det_valid) begin
          checks++;
          if (det_x != X_W'(wx) || det_y != Y_W'(wy)) failures++;
          det_ready = ($urandom_range(0, 2) == 0);
        end
      end
      checks += 3;
      if (int'(done_stages) != es) begin
        failures++;
        if (failures < 10) $display("win (%0d,%0d) stages %0d exp %0d", wx, wy, done_stages, es);
      end
      if (done_face != (es == NST)) failures++;
      if (es < NST && (cycle - c0) != exp_cycles + 1) begin
        failures++;
        $display("win (%0d,%0d) cycles %0d exp %0d", wx, wy, cycle - c0, exp_cycles + 1);
      end
      reached[es]++;
      if (es == NST) faces++;
      det_ready = 0;
      @(negedge clk);
    end
    for (int s = 0; s <= NST; s++) begin
      $display("windows leaving after %0d stages: %0d", s, reached[s]);
      checks++;
      if (reached[s] == 0) begin failures++; $display("exit point %0d never reached", s); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic longint window_sum_part(int wx, int wy, int r, int c);
    longint s = 0;
    for (int y = 0; y <= r; y++) for (int x = 0; x <= c; x++) s += px(wx + x, wy + y);
    return s;
  endfunction
endmodule
