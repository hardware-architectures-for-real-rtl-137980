// tb_gmm_bg_ident: random weights, orderings and matched Gaussian; the pixel
// is foreground when no Gaussian matched or when the weights ranked ahead
// of the matched one add up to more than T (179/256 = 0.70).
module tb_gmm_bg_ident;
  import gmm_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0, n_fg = 0, n_bg = 0;
  logic [W_W-1:0] w [NG];
  logic [1:0]     g1, g2, gu;
  logic           nm, fgbg;

  gmm_bg_ident #(.T_BG(8'd179)) dut (.w, .g1, .g2, .gu, .nm, .fgbg);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 10000; i++) begin
      int o[3], t, r, sum;
      bit e;
      o = '{0, 1, 2};
      for (int k = 2; k > 0; k--) begin
        r = $urandom_range(0, k);
        t = o[k]; o[k] = o[r]; o[r] = t;
      end
      for (int k = 0; k < 3; k++) w[k] = W_W'($urandom);
      g1 = 2'(o[0]); g2 = 2'(o[1]);
      r  = $urandom_range(0, 2);
      gu = 2'(o[r]);
      nm = ($urandom_range(0, 7) == 0);
      @(posedge clk);
      sum = 0;
      for (int k = 0; k < r; k++) sum += int'(w[o[k]]);
      e = nm || (real'(sum) / 256.0 > 0.70);
      checks++;
      if (fgbg) n_fg++; else n_bg++;
      if (fgbg != e) begin
        failures++;
        if (failures < 10) $display("w=%0d,%0d,%0d o=%0d%0d%0d gu=%0d nm=%0d fgbg=%0d", w[0], w[1], w[2],
                                    o[0], o[1], o[2], gu, nm, fgbg);
      end
    end
    checks++;
    if (n_fg < 100 || n_bg < 100) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
