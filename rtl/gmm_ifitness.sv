// gmm_ifitness: inverse fitness of one Gaussian,
// IF = (sigma / w)^2 = sigma^2 * 2^(2(ekt - ew)),
// where alpha_k = 2^ekt = 2^-s and alpha_w = 2^ew = 2^-ALPHA_SHIFT. Ordering
// by ascending IF equals ordering by descending fitness w/sigma, and the
// multiplication becomes a left shift by 2*(ALPHA_SHIFT - s). This
// reformulation is the published one.
//
// Interface: var_in (variance code), s (from gmm_learning_rate) -> ifit.
// Timing: combinational.
module gmm_ifitness
  import gmm_pkg::*;
#(
  parameter int unsigned ALPHA_SHIFT = 6
) (
  input  logic [VAR_W-1:0] var_in,
  input  logic [SH_W-1:0]  s,
  output logic [IF_W-1:0]  ifit
);
  logic [4:0] sh;
  always_comb begin
    sh   = 5'((ALPHA_SHIFT - int'(s)) * 2);
    ifit = IF_W'(var_in) << sh;
  end
endmodule
