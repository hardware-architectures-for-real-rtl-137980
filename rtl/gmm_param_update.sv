// gmm_param_update: "Parameter Update" and "Output Selection" units of the
// GMM circuit. For every Gaussian k it computes
//   matched (k = GU, NM = 0):  w' = w - w*aw + aw
//                              mu' = mu + a_k (pixel - mu)
//                              var' = var + a_k ((pixel - mu)^2 - var)
//                              matchsum' = matchsum + 1
//   otherwise:                 w' = w - w*aw, mu, var, matchsum unchanged
//   no match (NM = 1), k = G3: the Gaussian from gmm_no_match replaces it.
// aw = 2^-ALPHA_SHIFT and a_k = 2^-s_k, so all products by a learning rate are
// arithmetic shifts; the square (pixel-mu)^2 uses the truncated multiplier
// with operands 2|pixel*4 - mu| so that its 15-bit output is already in
// variance LSB units (8). These structures follow the published circuit;
// rounding by truncation (floor), saturation of w at 255 and of matchsum at
// 15, and the variance range 1..2047 are this design's choices. The new mean
// lies between the old mean and pixel*4, so the two top (sign and carry)
// bits of mu_new are never needed and are left unused.
//
// Interface: pixel, model_in, s[3], gu, g1, g2, g3, nm -> model_out.
// Timing: combinational.
module gmm_param_update
  import gmm_pkg::*;
#(
  parameter int unsigned      ALPHA_SHIFT = 6,
  parameter logic [VAR_W-1:0] VINIT       = 11'd112
) (
  input  logic [PIX_W-1:0] pixel,
  input  model_t           model_in,
  input  logic [SH_W-1:0]  s [NG],
  input  logic [1:0]       gu,
  input  logic [1:0]       g1,
  input  logic [1:0]       g2,
  input  logic [1:0]       g3,
  input  logic             nm,
  output model_t           model_out
);
  // ---------------- No_match
  logic [5:0]        msumtot;
  logic [W_W-1:0]    w_nm;
  logic [MU_W-1:0]   mu_nm;
  logic [VAR_W-1:0]  var_nm;
  logic [MSUM_W-1:0] msum_nm;

  assign msumtot = 6'(model_in[g1].msum) + 6'(model_in[g2].msum);

  gmm_no_match #(.VINIT(VINIT)) u_no_match (
    .pixel, .msumtot, .w_nm, .mu_nm, .var_nm, .msum_nm
  );

  // ---------------- Variance squarer (shared: only the GU Gaussian needs it)
  logic signed [MU_W+1:0] d_gu;
  logic [MU_W:0]          ad_gu;
  logic [14:0]            sq;

  always_comb begin
    d_gu  = $signed({2'b00, pixel, 2'b00}) - $signed({2'b00, model_in[gu].mu});
    ad_gu = d_gu[MU_W+1] ? (MU_W+1)'(-d_gu) : (MU_W+1)'(d_gu);
  end

  gmm_trunc_mult #(.N(12), .OUT_W(15)) u_sq (
    .a({ad_gu, 1'b0}), .b({ad_gu, 1'b0}), .p(sq)
  );

  // ---------------- Weight / Mean / Variance / Matchsum + Output Selection
  always_comb begin
    for (int k = 0; k < NG; k++) begin
      logic [W_W:0]            w_dec;
      logic [W_W:0]            w_new;
      logic signed [MU_W+1:0]  dmu;
      logic signed [MU_W+1:0]  mu_new;
      logic signed [15:0]      dvar;
      logic signed [15:0]      var_new;
      logic                    upd;

      upd   = !nm && (gu == 2'(k));
      // Weight: w - (w >> ALPHA_SHIFT) (+ aw when matched), aw = 256 >> ALPHA_SHIFT
      w_dec = (W_W+1)'(model_in[k].w) - (W_W+1)'(model_in[k].w >> ALPHA_SHIFT);
      w_new = w_dec + (upd ? (W_W+1)'(256 >> ALPHA_SHIFT) : '0);
      // Mean
      dmu    = $signed({2'b00, pixel, 2'b00}) - $signed({2'b00, model_in[k].mu});
      mu_new = $signed({2'b00, model_in[k].mu}) + (dmu >>> s[k]);
      // Variance
      dvar    = $signed({1'b0, sq}) - $signed(16'(model_in[k].var_));
      var_new = $signed(16'(model_in[k].var_)) + (dvar >>> s[k]);

      model_out[k] = model_in[k];
      model_out[k].w = (w_new > (W_W+1)'(255)) ? 8'd255 : W_W'(w_new);
      if (upd) begin
        model_out[k].mu   = MU_W'(mu_new);
        model_out[k].var_ = (var_new < 16'sd1)    ? 11'd1 :
                            (var_new > 16'sd2047) ? 11'd2047 : VAR_W'(var_new);
        model_out[k].msum = (model_in[k].msum == '1) ? model_in[k].msum
                                                     : model_in[k].msum + 1'b1;
      end
      if (nm && (g3 == 2'(k))) begin
        model_out[k].w    = w_nm;
        model_out[k].mu   = mu_nm;
        model_out[k].var_ = var_nm;
        model_out[k].msum = msum_nm;
      end
    end
  end
endmodule
