// tb_gmm_param_update: random models, pixels, ranks, matched Gaussian and
// learning-rate shifts. The expected model is computed here with the exact
// square of (pixel - mean); the variance may differ from it by the error of
// the truncated multiplier (up to 3 codes), every other field must be exact.
// Covers the matched update, the no-match replacement of the lowest-ranked
// Gaussian and the saturation of weight and matchsum.
module tb_gmm_param_update;
  import gmm_pkg::*;
  import gmm_ref_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0, n_nm = 0, n_upd = 0;
  logic [PIX_W-1:0] p;
  model_t           mi, mo;
  logic [SH_W-1:0]  s [NG];
  logic [1:0]       g1, g2, g3, gu;
  logic             nm;

  gmm_param_update #(.ALPHA_SHIFT(6), .VINIT(11'd112)) dut (
    .pixel(p), .model_in(mi), .s, .gu, .g1, .g2, .g3, .nm, .model_out(mo)
  );

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(string what, int k, int got, int exp, int tol);
    checks++;
    if (got - exp > tol || exp - got > tol) begin
      failures++;
      if (failures < 20) $display("%s[%0d] got %0d exp %0d", what, k, got, exp);
    end
  endtask

  initial begin
    for (int i = 0; i < 10000; i++) begin
      int o[3], t, r;
      o = '{0, 1, 2};
      for (int k = 2; k > 0; k--) begin
        r = $urandom_range(0, k);
        t = o[k]; o[k] = o[r]; o[r] = t;
      end
      p = PIX_W'($urandom);
      for (int k = 0; k < NG; k++) begin
        mi[k].w    = W_W'($urandom);
        mi[k].mu   = (i % 2 == 1) ? MU_W'(int'(p) * 4 + $urandom_range(0, 120) - 60) : MU_W'($urandom);
        mi[k].var_ = VAR_W'($urandom_range(1, 2047));
        mi[k].msum = MSUM_W'($urandom);
        s[k]       = SH_W'($urandom_range(0, 6));
      end
      if (i % 50 == 0) begin mi[0].w = 8'd255; mi[0].msum = 4'd15; end
      g1 = 2'(o[0]); g2 = 2'(o[1]); g3 = 2'(o[2]);
      gu = 2'($urandom_range(0, 2));
      nm = ($urandom_range(0, 3) == 0);
      @(posedge clk);
      if (nm) n_nm++; else n_upd++;
      for (int k = 0; k < NG; k++) begin
        bit upd;
        int ew, emu, ev, ems, d, sq;
        upd = !nm && (int'(gu) == k);
        ew  = int'(mi[k].w) - (int'(mi[k].w) >> 6) + (upd ? 4 : 0);
        if (ew > 255) ew = 255;
        emu = int'(mi[k].mu); ev = int'(mi[k].var_); ems = int'(mi[k].msum);
        if (upd) begin
          d   = 4 * int'(p) - int'(mi[k].mu);
          sq  = int'($floor(real'(4 * d * d) / 512.0 + 0.5));
          emu = emu + fdiv(d, int'(s[k]));
          ev  = ev + fdiv(sq - ev, int'(s[k]));
          ev  = (ev < 1) ? 1 : (ev > 2047 ? 2047 : ev);
          ems = (ems == 15) ? 15 : ems + 1;
        end
        if (nm && k == o[2]) begin
          ew  = ref_inv(int'(mi[o[0]].msum) + int'(mi[o[1]].msum));
          emu = 4 * int'(p); ev = 112; ems = 1;
        end
        chk("w", k, int'(mo[k].w), ew, 0);
        chk("mu", k, int'(mo[k].mu), emu, 0);
        chk("var", k, int'(mo[k].var_), ev, 3);
        chk("msum", k, int'(mo[k].msum), ems, 0);
      end
    end
    checks++;
    if (n_nm == 0 || n_upd == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
