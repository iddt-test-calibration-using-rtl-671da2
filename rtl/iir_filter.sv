// iir_filter: recovers a multibit fraction from a one-bit bipolar stream.
//
// A first-order low-pass (exponential average) y <- y + (x - y) / 2^k, where
// x is +1 for a 1 bit and -1 for a 0 bit. y is kept in fixed point with FRAC
// fraction bits below the 8-bit output scale, so the output is
// round-down(y*128) saturated to an 8-bit two's complement value. k
// (shift) is set by configuration; a larger k gives less noise and a slower
// response (time constant about 2^k cycles). Each I/O register holds such
// a filter; the first-order form, the shift-based coefficient and the
// default are this design's choice.
//
// Timing: y is registered; value_o follows the state register directly.
module iir_filter
  import ppa_pkg::*;
#(
  parameter int unsigned FRAC = 12    // fraction bits, also the largest shift
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             en,
  input  logic [3:0]       shift,     // k, clamped to 1..FRAC
  input  logic             bit_i,
  output logic [VAL_W-1:0] value_o    // two's complement, value_o/128
);

  localparam int unsigned W = VAL_W + FRAC + 1;  // one guard bit

  logic signed [W-1:0] y_q, y_d, target;
  logic signed [W:0]   diff;   // target - y spans twice the range of y
  int unsigned k;

  always_comb begin
    k = int'(shift);
    if (k < 1)    k = 1;
    if (k > FRAC) k = FRAC;
    // +1.0 and -1.0 in the filter's fixed point (2^(7+FRAC) per unit).
    target = bit_i ? W'(signed'(64'(1) <<< (VAL_W - 1 + FRAC)))
                   : -W'(signed'(64'(1) <<< (VAL_W - 1 + FRAC)));
    diff   = (W+1)'(target) - (W+1)'(y_q);
    y_d    = y_q + W'(diff >>> k);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  y_q <= '0;
    else if (en) y_q <= y_d;
  end

  // Scale back to 8 bits and saturate (+1.0 does not fit in 8 bits).
  logic signed [W-FRAC-1:0] y_int;
  assign y_int = (W-FRAC)'(y_q >>> FRAC);
  always_comb begin
    if (y_int > (W-FRAC)'(127))       value_o = 8'sd127;
    else if (y_int < -(W-FRAC)'(128)) value_o = 8'h80;
    else                              value_o = y_int[VAL_W-1:0];
  end

endmodule
