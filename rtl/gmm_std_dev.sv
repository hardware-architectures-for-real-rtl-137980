// gmm_std_dev: standard deviation of a Gaussian from its variance by a
// four-segment piecewise-linear approximation of the square root.
//
// The variance code v (sigma^2 = 8*v, v = 1..2047) is split into four
// intervals; in each one sigma is approximated by q_i + m_i*v where m_i is a
// power of two, so the product is a shift and the unit is a comparator chain,
// two shifters, a multiplexer and an adder. Using four intervals with
// power-of-two slopes follows the published circuit; the interval edges and
// the q_i values below are this design's own fit (max. relative error 19%).
//
// Interface: var_in (11 bits, U13,-3) -> sigma (10 bits, sigma*4).
// Timing: purely combinational.
module gmm_std_dev
  import gmm_pkg::*;
(
  input  logic [VAR_W-1:0] var_in,
  output logic [SIG_W-1:0] sigma
);
  logic [SIG_W-1:0] y;

  always_comb begin
    if (var_in < 11'd2)        y = SIG_W'(11)  + SIG_W'(var_in >> 2);       // I1: m = 2^-2
    else if (var_in < 11'd24)  y = SIG_W'(12)  + SIG_W'({var_in, 1'b0});    // I2: m = 2
    else if (var_in < 11'd384) y = SIG_W'(47)  + SIG_W'(var_in >> 1);       // I3: m = 2^-1
    else                       y = SIG_W'(215) + SIG_W'(var_in >> 3);       // I4: m = 2^-3
    sigma = y;  // max 215 + 255 = 470 fits 10 bits
  end
endmodule
