// gmm_learning_rate: learning rate of one Gaussian, alpha_k = alpha_w / w_k,
// quantised to a power of two 2^-s so that the mean and variance updates and
// the inverse fitness need shifters instead of multipliers.
//
// s is the nearest integer (in the log domain) to log2(w / alpha_w), limited
// to 0..ALPHA_SHIFT so that alpha_k never exceeds 1. With w = code/256 and
// alpha_w = 2^-ALPHA_SHIFT the rounding point between s-1 and s is
// code = 2^(s-ALPHA_SHIFT+7.5), i.e. code^2 >= 2^(2s+15-2*ALPHA_SHIFT).
// The published circuit stores this function in a small ROM; here the
// same table is formed by six constant comparisons. The rounding rule is this
// design's choice.
//
// Interface: w (U-1,8) -> s (alpha_k = 2^-s). Timing: combinational.
module gmm_learning_rate
  import gmm_pkg::*;
#(
  parameter int unsigned ALPHA_SHIFT = 6
) (
  input  logic [W_W-1:0]  w,
  output logic [SH_W-1:0] s
);
  logic [2*W_W-1:0] w2;

  always_comb begin
    w2 = 16'(w) * 16'(w);
    s  = '0;
    for (int unsigned k = 1; k <= ALPHA_SHIFT; k++) begin
      // exponent 2k + 15 - 2*ALPHA_SHIFT is negative only for large ALPHA_SHIFT
      if (2*k + 15 >= 2*ALPHA_SHIFT) begin
        if (32'(w2) >= (32'd1 << (2*k + 15 - 2*ALPHA_SHIFT))) s = SH_W'(k);
      end else begin
        s = SH_W'(k);
      end
    end
  end
endmodule
