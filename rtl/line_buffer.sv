// line_buffer: row buffer for window-based image processing.
//
// Holds the last ROWS rows of a raster-scanned image. For the pixel at column
// `col` it returns, combinationally, the image column of ROWS+1 pixels that
// ends at that pixel: column[0] is the pixel ROWS rows above, column[ROWS] is
// the incoming pixel itself. On `push` every row memory is rewritten at `col`
// with the value of the row below it, so each memory sees one read and one
// write at the same address per pixel and the rows move up by one each time
// the image advances by a row. The image width is set at run time by the
// column addresses the caller uses, up to MAX_W.
//
// Timing: read is combinational, the write takes effect at the clock edge on
// which `push` is high. Memories are not reset; a caller must not use a
// column before ROWS rows of the frame have been pushed.
// The buffer organisation is this design's own choice.
module line_buffer #(
  parameter int unsigned ROWS  = 23,
  parameter int unsigned MAX_W = 640,
  parameter int unsigned PIX_W = 8,
  localparam int unsigned AW   = $clog2(MAX_W)
) (
  input  logic             clk,
  input  logic             push,
  input  logic [AW-1:0]    col,
  input  logic [PIX_W-1:0] pix,
  output logic [PIX_W-1:0] column [ROWS+1]
);
  logic [PIX_W-1:0] mem [ROWS][MAX_W];

  always_comb begin
    for (int r = 0; r < ROWS; r++) column[r] = mem[r][col];
    column[ROWS] = pix;
  end

  always_ff @(posedge clk) begin
    if (push) begin
      for (int r = 0; r < ROWS - 1; r++) mem[r][col] <= mem[r+1][col];
      mem[ROWS-1][col] <= pix;
    end
  end
endmodule
