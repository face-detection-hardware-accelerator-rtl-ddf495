// fd_pkg: types and constants shared by the Viola-Jones face detection blocks.
//
// The detector works on a WIN x WIN sub-window (24x24, the base size of the
// Viola-Jones detector). Integral-image values, squared sums and the
// normalization factor are sized so that no value of a 24x24 window of 8-bit
// pixels can overflow. Haar weights, feature thresholds, weak-classifier votes
// and stage thresholds are 16-bit signed fixed point with Q_FRAC fraction
// bits. These word sizes are this design's choice.
package fd_pkg;
  localparam int unsigned PIX_W  = 8;
  localparam int unsigned WIN    = 24;
  localparam int unsigned AREA   = WIN * WIN;            // 576
  localparam int unsigned II_W   = 18;                   // 576*255 < 2^18
  localparam int unsigned SQ_W   = 26;                   // 576*255^2 < 2^26
  localparam int unsigned VAR_W  = 36;                   // AREA*sqsum < 2^35
  localparam int unsigned STD_W  = VAR_W / 2;            // floor(sqrt(var))
  localparam int unsigned CRD_W  = 5;                    // 0..24 rectangle coords
  localparam int unsigned FX_W   = 16;                   // fixed-point words
  localparam int unsigned Q_FRAC = 12;                   // fraction bits
  localparam int unsigned NRECT  = 3;                    // rectangles per feature
  localparam int unsigned X_W    = 10;                   // image x, up to 1023
  localparam int unsigned Y_W    = 9;                    // image y, up to 511

  typedef logic [PIX_W-1:0] pix_t;
  typedef logic [II_W-1:0]  ii_t;

  // One rectangle of a Haar feature, in window coordinates. A weight of zero
  // disables the rectangle.
  typedef struct packed {
    logic [CRD_W-1:0]        x;
    logic [CRD_W-1:0]        y;
    logic [CRD_W-1:0]        w;
    logic [CRD_W-1:0]        h;
    logic signed [FX_W-1:0]  weight;
  } rect_t;

  // One weak classifier: feature, threshold and the two votes.
  typedef struct packed {
    rect_t [NRECT-1:0]       rect;
    logic signed [FX_W-1:0]  thr;
    logic signed [FX_W-1:0]  left;    // vote when feature <  thr*stddev
    logic signed [FX_W-1:0]  right;   // vote when feature >= thr*stddev
  } weak_t;

  // One cascade stage: its weak classifiers occupy groups
  // first .. first+ngroups-1 of the classifier table.
  typedef struct packed {
    logic [15:0]             first;
    logic [15:0]             ngroups;
    logic signed [FX_W+3:0]  thr;     // stage threshold, same scale as votes
  } stage_t;
endpackage
