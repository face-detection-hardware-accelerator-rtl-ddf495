// tb_haar_classifier: random windows and random two- and three-rectangle
// weak classifiers; the vote and branch are compared with the feature summed
// pixel by pixel. The integral image fed to the unit is built in the
// testbench from the same pixels.
module tb_haar_classifier;
  import fd_pkg::*;
  import fd_ref_pkg::*;
  ii_t ii [WIN][WIN];
  logic [STD_W-1:0] stddev;
  weak_t wc;
  logic signed [FX_W-1:0] vote;
  logic take_left;
  int checks = 0, failures = 0, lefts = 0, rights = 0;

  haar_classifier dut (.*);

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    gen_image(WIN, WIN);
    for (int t = 0; t < 400; t++) begin
      longint sd;
      int ev;
      bit el;
      if (t % 50 == 0)
        for (int i = 0; i < AREA; i++) img[i] = (t % 100 == 0) ? $urandom_range(0, 255) : ((i % WIN) < 12 ? 40 : 200);
      for (int r = 0; r < WIN; r++)
        for (int c = 0; c < WIN; c++) begin
          automatic longint s = 0;
          for (int rr = 0; rr <= r; rr++) for (int cc = 0; cc <= c; cc++) s += px(cc, rr);
          ii[r][c] = II_W'(s);
        end
      sd = longint'(window_std(0, 0));
      wc = rand_weak();
      if (t == 5) begin  // rectangle touching the far corner
        wc.rect[0].x = 0; wc.rect[0].y = 0; wc.rect[0].w = CRD_W'(WIN); wc.rect[0].h = CRD_W'(WIN);
      end
      stddev = STD_W'(sd);
      #1;
      ev = weak_vote(0, 0, sd, wc, el);
      checks += 2;
      if (take_left != el) failures++;
      if (int'(vote) != ev) begin
        failures++;
        if (failures < 10) $display("t%0d vote %0d exp %0d", t, vote, ev);
      end
      if (el) lefts++; else rights++;
    end
    checks++;
    if (lefts == 0 || rights == 0) begin failures++; $display("one branch never taken"); end
    $display("left=%0d right=%0d", lefts, rights);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
