// fgbg_optimized: OpenCV-style Gaussian Mixture Model background
// identification for one pixel per clock, with three Gaussians per pixel.
//
// The statistical model of the pixel (3 x {weight, mean, variance, matchsum},
// 99 bits) arrives with the pixel from an external memory and the updated
// model leaves with the Fg/Bg tag. Data path (all combinational between an
// input and an output register):
//   Standard Deviation (piecewise-linear sqrt) -> Match (|pixel-mu| < 2.5 sigma)
//   Learning Rate (alpha_k = 2^-s) -> IFitness (var << 2(ALPHA_SHIFT-s))
//   Control Logic (sort by fitness, GU, NM) -> Background Identification
//                                           -> Parameter Update / Output Selection
// This block structure, the hardware-oriented inverse fitness and the
// power-of-two learning rates follow the published optimized circuit; T_BG
// and VINIT have no published values and are this design's.
//
// Interface: in_valid, pixel, model_in -> out_valid, fgbg (1 = foreground),
// model_out. Timing: input and output registers, no pipeline inside;
// latency 2 clocks, throughput one pixel per clock.
module fgbg_optimized
  import gmm_pkg::*;
#(
  parameter int unsigned      ALPHA_SHIFT = 6,
  parameter logic [W_W-1:0]   T_BG        = 8'd179,
  parameter logic [VAR_W-1:0] VINIT       = 11'd112
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_valid,
  input  logic [PIX_W-1:0] pixel,
  input  model_t           model_in,
  output logic             out_valid,
  output logic             fgbg,
  output model_t           model_out
);
  // ---------------- input register
  logic             v_q;
  logic [PIX_W-1:0] pix_q;
  model_t           mod_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v_q   <= 1'b0;
      pix_q <= '0;
      mod_q <= '0;
    end else begin
      v_q   <= in_valid;
      pix_q <= pixel;
      mod_q <= model_in;
    end
  end

  // ---------------- per-Gaussian units
  logic [SIG_W-1:0] sigma [NG];
  logic [NG-1:0]    m;
  logic [SH_W-1:0]  s     [NG];
  logic [IF_W-1:0]  ifit  [NG];
  logic [W_W-1:0]   w     [NG];

  for (genvar k = 0; k < NG; k++) begin : g_gauss
    assign w[k] = mod_q[k].w;
    gmm_std_dev u_sd (.var_in(mod_q[k].var_), .sigma(sigma[k]));
    gmm_match   u_match (.pixel(pix_q), .mu(mod_q[k].mu), .sigma(sigma[k]), .m(m[k]));
    gmm_learning_rate #(.ALPHA_SHIFT(ALPHA_SHIFT)) u_lr (.w(mod_q[k].w), .s(s[k]));
    gmm_ifitness #(.ALPHA_SHIFT(ALPHA_SHIFT)) u_if (.var_in(mod_q[k].var_), .s(s[k]), .ifit(ifit[k]));
  end

  // ---------------- control, identification, update
  logic [1:0] g1, g2, g3, gu;
  logic       nm;
  logic       fgbg_c;
  model_t     mod_c;

  gmm_control_logic u_ctrl (.ifit, .m, .g1, .g2, .g3, .gu, .nm);

  gmm_bg_ident #(.T_BG(T_BG)) u_bgid (.w, .g1, .g2, .gu, .nm, .fgbg(fgbg_c));

  gmm_param_update #(.ALPHA_SHIFT(ALPHA_SHIFT), .VINIT(VINIT)) u_upd (
    .pixel(pix_q), .model_in(mod_q), .s, .gu, .g1, .g2, .g3, .nm, .model_out(mod_c)
  );

  // ---------------- output register
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      fgbg      <= 1'b0;
      model_out <= '0;
    end else begin
      out_valid <= v_q;
      fgbg      <= fgbg_c;
      model_out <= mod_c;
    end
  end
endmodule
