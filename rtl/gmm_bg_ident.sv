// gmm_bg_ident: background decision of the GMM.
// With the Gaussians in decreasing fitness G1, G2, G3, the background is
// formed by the first B of them, B being the smallest b for which
// w_G1 + ... + w_Gb > T. The pixel is background (fgbg = 0) when it matched
// Gaussian GU and GU is among those B, i.e. the summed weight of the
// Gaussians ranked w_ahead GU does not exceed T; otherwise, and always when
// no Gaussian matched (NM = 1), it is foreground (fgbg = 1). The rule is the
// published one; T (fraction of 1 in U-1,8) has no published value.
//
// Interface: w[3] (weights at time t), g1, g2, gu, nm -> fgbg.
// Timing: combinational.
module gmm_bg_ident
  import gmm_pkg::*;
#(
  parameter logic [W_W-1:0] T_BG = 8'd179   // 0.70
) (
  input  logic [W_W-1:0] w [NG],
  input  logic [1:0]     g1,
  input  logic [1:0]     g2,
  input  logic [1:0]     gu,
  input  logic           nm,
  output logic           fgbg
);
  logic [W_W:0] w_ahead;   // weight of the Gaussians ranked ahead of GU

  always_comb begin
    if (gu == g1)      w_ahead = '0;
    else if (gu == g2) w_ahead = (W_W+1)'(w[g1]);
    else               w_ahead = (W_W+1)'(w[g1]) + (W_W+1)'(w[g2]);
    fgbg = nm || (w_ahead > (W_W+1)'(T_BG));
  end
endmodule
