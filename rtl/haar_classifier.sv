// haar_classifier: one weak classifier of the Viola-Jones cascade.
//
// A Haar-like feature is the weighted sum of up to NRECT rectangle sums of
// the window. Each rectangle sum takes four reads of the window integral
// image: S = I(y+h,x+w) - I(y,x+w) - I(y+h,x) + I(y,x), where I(r,c) is the
// sum of the pixels above and left of corner (r,c), zero on row 0 and column
// 0 (so I(r,c) = ii[r-1][c-1]). The feature F = sum(weight_i * S_i) is
// compared with thr * stddev, the threshold scaled by the window's
// normalization factor N*sigma; F < thr*stddev gives the `left` vote,
// otherwise the `right` vote. Weights and thresholds share the same
// fixed-point scale, so the comparison needs no shift.
//
// Purely combinational; the cascade controller registers around it.
// Rectangles must lie inside the window (x+w <= WIN, y+h <= WIN).
// Feature evaluation from the integral image follows the document; the
// three-rectangle format and the fixed-point word sizes are this design's.
module haar_classifier
  import fd_pkg::*;
(
  input  ii_t                     ii [WIN][WIN],
  input  logic [STD_W-1:0]        stddev,
  input  weak_t                   wc,
  output logic signed [FX_W-1:0]  vote,
  output logic                    take_left
);
  localparam int unsigned F_W = II_W + FX_W + 4;

  function automatic logic signed [II_W:0] corner(input ii_t a [WIN][WIN],
                                                  input logic [CRD_W-1:0] r,
                                                  input logic [CRD_W-1:0] c);
    if (r == 0 || c == 0 || r > CRD_W'(WIN) || c > CRD_W'(WIN)) return '0;
    return {1'b0, a[r-1][c-1]};
  endfunction

  logic signed [F_W-1:0] feature, limit;

  always_comb begin
    feature = '0;
    for (int i = 0; i < NRECT; i++) begin
      logic [CRD_W-1:0] x0, y0, x1, y1;
      logic signed [II_W+2:0] s;
      x0 = wc.rect[i].x;
      y0 = wc.rect[i].y;
      x1 = wc.rect[i].x + wc.rect[i].w;
      y1 = wc.rect[i].y + wc.rect[i].h;
      s = (II_W+3)'(corner(ii, y1, x1)) - (II_W+3)'(corner(ii, y0, x1))
        - (II_W+3)'(corner(ii, y1, x0)) + (II_W+3)'(corner(ii, y0, x0));
      feature = feature + F_W'(s) * F_W'(wc.rect[i].weight);
    end
    limit     = F_W'(wc.thr) * F_W'(signed'({1'b0, stddev}));
    take_left = feature < limit;
    vote      = take_left ? wc.left : wc.right;
  end
endmodule
