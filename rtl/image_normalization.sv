// image_normalization: fixed-point lighting normalization of a sub-window.
//
// Viola-Jones compares every Haar feature with a threshold scaled by the
// standard deviation of the window. With N = WIN*WIN pixels,
//   N*sigma = sqrt(N*sqsum - sum^2),
// so the factor can be formed from integers alone: the variance term is kept
// exact in VAR_W bits and its integer square root is taken bit by bit, one
// result bit per cycle (digit-by-digit method, no multiplier in the loop).
// Fixed point in place of floating point follows the document; the exact
// integer variance and the serial root are this design's choices.
//
// Timing: `start` (while not busy) samples `sum` and `sqsum`. One cycle forms
// the variance, STD_W cycles take the root; `done` pulses for one cycle with
// `stddev` = floor(sqrt(N*sqsum - sum^2)), which stays until the next start.
// Latency from start to done: STD_W + 2 cycles (start is sampled on the first
// edge, the variance formed on the second, then one root bit per edge).
module image_normalization
  import fd_pkg::*;
(
  input  logic              clk,
  input  logic              rst,
  input  logic              start,
  input  logic [II_W-1:0]   sum,
  input  logic [SQ_W-1:0]   sqsum,
  output logic              busy,
  output logic              done,
  output logic [STD_W-1:0]  stddev
);
  typedef enum logic [1:0] {S_IDLE, S_VAR, S_ROOT} state_e;
  state_e state;

  logic [II_W-1:0]  sum_q;
  logic [SQ_W-1:0]  sqsum_q;
  logic [VAR_W-1:0] op, res, one;
  logic [$clog2(STD_W+1)-1:0] cnt;

  logic [VAR_W-1:0] trial;
  assign trial = res + one;

  assign busy = (state != S_IDLE);

  always_ff @(posedge clk) begin
    if (rst) begin
      state  <= S_IDLE;
      done   <= 1'b0;
      stddev <= '0;
      op <= '0; res <= '0; one <= '0; cnt <= '0;
      sum_q <= '0; sqsum_q <= '0;
    end else begin
      done <= 1'b0;
      unique case (state)
        S_IDLE: if (start) begin
          sum_q   <= sum;
          sqsum_q <= sqsum;
          state   <= S_VAR;
        end
        S_VAR: begin
          op    <= VAR_W'(AREA) * VAR_W'(sqsum_q) - VAR_W'(sum_q) * VAR_W'(sum_q);
          res   <= '0;
          one   <= VAR_W'(1) << (2 * (STD_W - 1));
          cnt   <= '0;
          state <= S_ROOT;
        end
        S_ROOT: begin
          if (op >= trial) begin
            op  <= op - trial;
            res <= (res >> 1) + one;
          end else begin
            res <= res >> 1;
          end
          one <= one >> 2;
          cnt <= cnt + 1'b1;
          if (cnt == $bits(cnt)'(STD_W - 1)) begin
            state  <= S_IDLE;
            done   <= 1'b1;
            stddev <= STD_W'((op >= trial) ? (res >> 1) + one : res >> 1);
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end
endmodule
