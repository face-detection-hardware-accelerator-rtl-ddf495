// integral_image: pipelined integral image of a sliding 24x24 sub-window.
//
// Each accepted input is one image column of WIN pixels (oldest row first)
// coming from the line buffer. The work is split into the two accumulations
// of an integral image:
//   stage 1 (vertical)   prefix sums down the incoming column, and the sum of
//                        its squared pixels;
//   stage 2 (horizontal) the window integral image slides one column left:
//                        ii[r][c] <= ii[r][c+1] - ii[r][0], and the new last
//                        column is ii[r][WIN-1] - ii[r][0] + vprefix[r].
// After WIN columns the array holds exactly the integral image of the last
// WIN columns whatever it held before (the arithmetic is modular and each
// true value fits its word). The window's sum of squares is a sliding sum of
// the per-column square sums kept in a WIN-deep shift register.
//
// Interface: valid/ready on both sides. `in_win_ok` marks a column that
// completes a window lying fully inside the image; only those produce
// `out_valid`, with the window's top-left corner `out_x`,`out_y`. One column
// per cycle; output appears two cycles after the column is accepted. When
// `out_valid` is high and `out_ready` low, the whole pipeline holds.
// The two-stage split follows the document; the sliding update is this
// design's way of doing the horizontal stage.
module integral_image
  import fd_pkg::*;
(
  input  logic             clk,
  input  logic             rst,
  input  logic             in_valid,
  output logic             in_ready,
  input  pix_t             in_col [WIN],
  input  logic             in_win_ok,
  input  logic [X_W-1:0]   in_x,
  input  logic [Y_W-1:0]   in_y,
  output logic             out_valid,
  input  logic             out_ready,
  output ii_t              ii [WIN][WIN],
  output logic [II_W-1:0]  sum,
  output logic [SQ_W-1:0]  sqsum,
  output logic [X_W-1:0]   out_x,
  output logic [Y_W-1:0]   out_y
);
  logic adv;
  assign adv      = !out_valid || out_ready;
  assign in_ready = adv;

  // stage 1: vertical accumulation
  logic            s1_valid, s1_win_ok;
  ii_t             s1_vp [WIN];
  logic [SQ_W-1:0] s1_csq;
  logic [X_W-1:0]  s1_x;
  logic [Y_W-1:0]  s1_y;

  ii_t             vp [WIN];
  logic [SQ_W-1:0] csq;
  always_comb begin
    ii_t acc;
    acc = '0;
    csq = '0;
    for (int r = 0; r < WIN; r++) begin
      acc   = acc + ii_t'(in_col[r]);
      vp[r] = acc;
      csq   = csq + SQ_W'(in_col[r] * in_col[r]);
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      s1_valid <= 1'b0;
      s1_win_ok <= 1'b0;
    end else if (adv) begin
      s1_valid  <= in_valid;
      s1_win_ok <= in_valid && in_win_ok;
    end
  end
  always_ff @(posedge clk) begin
    if (adv && in_valid) begin
      s1_vp  <= vp;
      s1_csq <= csq;
      s1_x   <= in_x;
      s1_y   <= in_y;
    end
  end

  // stage 2: horizontal accumulation (sliding window integral image)
  logic [SQ_W-1:0] csq_sr [WIN];
  always_ff @(posedge clk) begin
    if (rst) begin
      out_valid <= 1'b0;
      sqsum     <= '0;
      for (int r = 0; r < WIN; r++) begin
        csq_sr[r] <= '0;
        for (int c = 0; c < WIN; c++) ii[r][c] <= '0;
      end
      out_x <= '0;
      out_y <= '0;
    end else if (adv) begin
      out_valid <= s1_valid && s1_win_ok;
      if (s1_valid) begin
        for (int r = 0; r < WIN; r++) begin
          for (int c = 0; c < WIN - 1; c++) ii[r][c] <= ii[r][c+1] - ii[r][0];
          ii[r][WIN-1] <= ii[r][WIN-1] - ii[r][0] + s1_vp[r];
        end
        for (int k = 0; k < WIN - 1; k++) csq_sr[k] <= csq_sr[k+1];
        csq_sr[WIN-1] <= s1_csq;
        sqsum <= sqsum - csq_sr[0] + s1_csq;
        out_x <= s1_x;
        out_y <= s1_y;
      end
    end
  end

  assign sum = ii[WIN-1][WIN-1];

  // a held output must not change until it is taken
  property p_hold;
    @(posedge clk) disable iff (rst) out_valid && !out_ready |=> out_valid && $stable(sum) && $stable(out_x);
  endproperty
  a_hold: assert property (p_hold);
endmodule
