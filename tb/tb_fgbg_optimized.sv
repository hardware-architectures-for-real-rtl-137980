// tb_fgbg_optimized: streams random pixels against random three-Gaussian
// models through the registered FgBg circuit and compares the decision and
// the updated model with the behavioural reference (gmm_ref_pkg), which is
// written from the equations and not from the RTL. Also feeds one pixel
// position for many frames (each output model fed back) to see the model
// settle on a static background, and checks the 2-cycle latency and that
// out_valid follows in_valid.
module tb_fgbg_optimized;
  import gmm_pkg::*;
  import gmm_ref_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0, n_fg = 0, n_bg = 0, n_nm = 0;
  logic             rst_n, in_valid, out_valid, fgbg;
  logic [PIX_W-1:0] p;
  model_t           mi, mo;

  fgbg_optimized #(.ALPHA_SHIFT(6), .T_BG(8'd179), .VINIT(11'd112)) dut (
    .clk, .rst_n, .in_valid, .pixel(p), .model_in(mi), .out_valid, .fgbg, .model_out(mo)
  );

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // expected results, queued at the input, popped at the output
  bit      q_fg[$];
  rmodel_t q_m[$];

  function automatic rmodel_t to_r(model_t m);
    rmodel_t r;
    for (int k = 0; k < NG; k++) begin
      r.w[k] = int'(m[k].w); r.mu[k] = int'(m[k].mu); r.v[k] = int'(m[k].var_); r.ms[k] = int'(m[k].msum);
    end
    return r;
  endfunction

  function automatic model_t from_r(rmodel_t r);
    model_t m;
    for (int k = 0; k < NG; k++) begin
      m[k].w = W_W'(r.w[k]); m[k].mu = MU_W'(r.mu[k]); m[k].var_ = VAR_W'(r.v[k]); m[k].msum = MSUM_W'(r.ms[k]);
    end
    return m;
  endfunction

  int lat_cnt = 0, in_cnt = 0, out_cnt = 0;

  always @(posedge clk) begin
    if (rst_n && out_valid) begin
      bit      efg;
      rmodel_t em, gm;
      out_cnt++;
      checks++;
      if (q_fg.size() == 0) begin failures++; $display("unexpected output"); end
      else begin
        efg = q_fg.pop_front(); em = q_m.pop_front();
        gm  = to_r(mo);
        if (fgbg) n_fg++; else n_bg++;
        if (fgbg != efg) begin failures++; if (failures < 10) $display("fgbg %0d exp %0d", fgbg, efg); end
        for (int k = 0; k < NG; k++) begin
          checks++;
          if (gm.w[k] != em.w[k] || gm.mu[k] != em.mu[k] || gm.ms[k] != em.ms[k] ||
              gm.v[k] - em.v[k] > 3 || em.v[k] - gm.v[k] > 3) begin
            failures++;
            if (failures < 10)
              $display("G%0d got w%0d mu%0d v%0d ms%0d exp w%0d mu%0d v%0d ms%0d", k, gm.w[k], gm.mu[k],
                       gm.v[k], gm.ms[k], em.w[k], em.mu[k], em.v[k], em.ms[k]);
          end
        end
      end
    end
  end

  task automatic drive(input logic [7:0] pix, input model_t m);
    rmodel_t r;
    bit      f;
    in_valid <= 1'b1; p <= pix; mi <= m;
    f = ref_step(int'(pix), to_r(m), r, 6, 179, 112);
    q_fg.push_back(f); q_m.push_back(r);
    in_cnt++;
    @(posedge clk);
  endtask

  initial begin
    model_t m;
    rst_n = 0; in_valid = 0; p = '0; mi = '0;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    // latency: one pixel, then count cycles to out_valid
    drive(8'd100, '0);
    in_valid <= 1'b0;
    lat_cnt = 1;
    #1;
    while (!out_valid) begin @(posedge clk); #1; lat_cnt++; end
    checks++;
    if (lat_cnt != 2) begin failures++; $display("latency %0d, expected 2", lat_cnt); end
    @(posedge clk);
    // random stream with gaps
    for (int i = 0; i < 20000; i++) begin
      logic [7:0] px;
      px = PIX_W'($urandom);
      for (int k = 0; k < NG; k++) begin
        m[k].w    = W_W'($urandom);
        m[k].mu   = ($urandom_range(0, 1) == 1) ? MU_W'(int'(px) * 4 + $urandom_range(0, 200) - 100) : MU_W'($urandom);
        m[k].var_ = VAR_W'($urandom_range(1, 2047));
        m[k].msum = MSUM_W'($urandom);
      end
      drive(px, m);
      if ($urandom_range(0, 9) == 0) begin in_valid <= 1'b0; @(posedge clk); end
    end
    in_valid <= 1'b0;
    repeat (4) @(posedge clk);
    // one pixel position over many frames: model settles, pixel becomes background
    m = '0;
    for (int f = 0; f < 300; f++) begin
      logic [7:0] px;
      px = (f < 250) ? 8'(120 + $urandom_range(0, 4)) : 8'd250;
      drive(px, m);
      in_valid <= 1'b0;
      @(posedge clk);
      #1;
      m = mo;
      if (f == 249) begin checks++; if (fgbg) begin failures++; $display("static pixel not background"); end end
      if (f == 250) begin checks++; if (!fgbg) begin failures++; $display("new object not foreground"); end end
    end
    repeat (4) @(posedge clk);
    checks++;
    if (in_cnt != out_cnt || n_fg == 0 || n_bg == 0) begin
      failures++; $display("in %0d out %0d fg %0d bg %0d", in_cnt, out_cnt, n_fg, n_bg);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
