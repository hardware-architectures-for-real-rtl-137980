// gmm_match: match test of the incoming pixel against one Gaussian,
// |pixel - mu| < lambda * sigma with lambda = 2.5.
//
// The pixel is aligned to the mean's two fractional bits (pixel*4), the
// absolute difference is formed, and lambda*sigma = 2*sigma + sigma/2 is
// built with shifts and one adder. To keep everything integer both sides are
// doubled: 2*|d| < 5*sigma. Using the square-root form of the test (instead
// of squaring) follows the optimized circuit; lambda = 2.5 is the value the
// algorithm's authors use. sigma comes from gmm_std_dev.
//
// Interface: pixel (U7,0), mu (U7,2), sigma (sigma*4) -> m.
// Timing: combinational.
module gmm_match
  import gmm_pkg::*;
(
  input  logic [PIX_W-1:0] pixel,
  input  logic [MU_W-1:0]  mu,
  input  logic [SIG_W-1:0] sigma,
  output logic             m
);
  logic signed [MU_W+1:0] d;
  logic [MU_W:0]          ad;
  logic [SIG_W+2:0]       lam_sig2;   // 2*lambda*sigma = 5*sigma

  always_comb begin
    d        = $signed({2'b00, pixel, 2'b00}) - $signed({2'b00, mu});
    ad       = d[MU_W+1] ? (MU_W+1)'(-d) : (MU_W+1)'(d);
    lam_sig2 = {sigma, 2'b00} + (SIG_W+3)'(sigma);
    m        = ((SIG_W+3)'({ad, 1'b0}) < lam_sig2);
  end
endmodule
