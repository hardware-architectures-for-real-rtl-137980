// hd_top_body.svh: body shared by the reduced-size and the full-size
// end-to-end testbenches of hd_video_top. The including module defines the
// sizes (W, H, NFG, FM, FN, FX, FY, FK, NFF, FCB, FBB, FRB, FFP,
// TIMEOUT_NS) and the range of operations to run (FIRST_MODE..LAST_MODE,
// 0 erosion, 1 dilation, 2 opening, 3 closing), instantiates the top as dut after this file, and gets the
// checks, the models, the stimulus and the TB_RESULT line from here.

  // ---------------------------------------------------------------- clocks
  logic clk = 0, fl_clk = 0, fl_clk_pix = 0;
  always #5 clk = ~clk;
  always #2 fl_clk = ~fl_clk;
  always #5 fl_clk_pix = ~fl_clk_pix;

  int checks = 0, failures = 0;

  // ---------------------------------------------------------------- top ports
  logic            rst_n, in_valid, model_valid, fgbg, sel1, sel2, bm_valid, bm;
  logic [7:0]      pix;
  model_t          model_in, model_out;
  logic [8:0]      se;
  logic            fl_rst_n, fl_rst_pix_n, fl_pix_in_valid, fl_in_overflow;
  logic [7:0]      fl_pix_in, fl_thr_addr, fl_pix_out;
  logic            fl_thr_we, fl_thr_swap, fl_thr_active, fl_pix_out_valid;
  logic [9:0]      fl_thr_data;
  logic            fl_mem_rd, fl_mem_wr, fl_mem_ready, fl_mem_rvalid;
  logic [FRB-1:0]  fl_mem_row;
  logic [FBB-1:0]  fl_mem_bank;
  logic [FCB-1:0]  fl_mem_col;
  logic [64*(FK-1)-1:0] fl_mem_wdata, fl_mem_rdata;
  logic [8*(FK-1)-1:0]  fl_mem_be;

  ddr2_model #(.K(FK), .COL_BITS(FCB), .BANK_BITS(FBB), .ROW_BITS(FRB), .RL(4), .STALL_PCT(20)) u_mem (
    .clk(fl_clk), .rst_n(fl_rst_n), .mem_rd(fl_mem_rd), .mem_wr(fl_mem_wr), .mem_row(fl_mem_row),
    .mem_bank(fl_mem_bank), .mem_col(fl_mem_col), .mem_wdata(fl_mem_wdata), .mem_be(fl_mem_be),
    .mem_ready(fl_mem_ready), .mem_rdata(fl_mem_rdata), .mem_rvalid(fl_mem_rvalid)
  );

  initial begin
    #(TIMEOUT_NS);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------------------------------------------------------- mechanism counters
  int n_match = 0, n_nomatch = 0, n_fg = 0, n_bg = 0, n_border = 0;
  int n_mode [4] = '{0, 0, 0, 0};
  int n_fl_border = 0, n_fl_early = 0, n_fl_ovf = 0, n_fl_swap = 0;

  // ================================================================ GMM chain
  model_t  mm [W*H];          // model memory
  int      q_pos [$];         // pixel position of each queued pixel (-1: flush)
  bit      q_fg  [$];
  rmodel_t q_mod [$];
  img_t    fg_img [NFG];
  int      n_gout, n_bout, mode;
  bit      bm_got [];

  function automatic rmodel_t to_r(model_t m);
    rmodel_t r;
    for (int k = 0; k < NG; k++) begin
      r.w[k] = int'(m[k].w); r.mu[k] = int'(m[k].mu); r.v[k] = int'(m[k].var_); r.ms[k] = int'(m[k].msum);
    end
    return r;
  endfunction

  function automatic int scene(int f, int y, int x);
    int v;
    v = 60 + 7 * ((x * 3 + y * 5) % 16);                    // static texture
    if (x >= 2 + 3 * f && x < 2 + 3 * f + H / 2 && y >= 2 && y < 2 + H / 2) v = 245;  // moving square
    v += $urandom_range(0, 4) - 2;
    return (v < 0) ? 0 : ((v > 255) ? 255 : v);
  endfunction

  always @(posedge clk) begin
    if (rst_n && model_valid) begin
      int      pos;
      bit      efg;
      rmodel_t em, gm;
      pos = q_pos.pop_front(); efg = q_fg.pop_front(); em = q_mod.pop_front();
      gm  = to_r(model_out);
      checks++;
      if (fgbg != efg) begin failures++; if (failures < 10) $display("GMM out %0d fgbg %0d exp %0d", n_gout, fgbg, efg); end
      for (int k = 0; k < NG; k++) begin
        checks++;
        if (gm.w[k] != em.w[k] || gm.mu[k] != em.mu[k] || gm.ms[k] != em.ms[k] ||
            gm.v[k] - em.v[k] > 3 || em.v[k] - gm.v[k] > 3) begin
          failures++;
          if (failures < 10) $display("GMM out %0d G%0d model differs", n_gout, k);
        end
      end
      if (pos >= 0) begin
        mm[pos] <= model_out;
        fg_img[n_gout / (W*H)][pos] = fgbg;
        if (fgbg) n_fg++; else n_bg++;
      end
      n_gout++;
    end
    if (rst_n && bm_valid) begin
      if (n_bout < NFG*W*H) begin
        int i;
        i = n_bout % (W*H);
        bm_got[n_bout] = bm;
        if (i / W == 0 || i / W == H-1 || i % W == 0 || i % W == W-1) n_border++;
      end
      n_bout++;
    end
  end

  task automatic gmm_pixel(input int pos, input logic [7:0] p, input model_t m);
    rmodel_t r;
    bit      f;
    f = ref_step(int'(p), to_r(m), r, 6, 179, 112);
    if (ref_nm(int'(p), to_r(m))) n_nomatch++; else n_match++;
    q_pos.push_back(pos); q_fg.push_back(f); q_mod.push_back(r);
    in_valid <= 1'b1; pix <= p; model_in <= m;
    @(posedge clk);
  endtask

  task automatic run_gmm_mode(input int md);
    mode = md;
    rst_n = 0; in_valid = 0;
    sel1 = md[0]; sel2 = md[1];
    se = (md % 2 == 0) ? 9'b010_111_010 : 9'h1ff;
    n_gout = 0; n_bout = 0;
    bm_got = new[NFG*W*H];
    foreach (mm[i]) mm[i] = '0;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    for (int f = 0; f < NFG; f++) begin
      fg_img[f] = new[W*H];
      for (int i = 0; i < W*H; i++) begin
        // a model written back two clocks ago is already in mm: W*H > 2
        gmm_pixel(i, 8'(scene(f, i / W, i % W)), mm[i]);
      end
    end
    // flush both Dilation stages with dummy pixels
    for (int i = 0; i < 2 * (W + 2); i++) gmm_pixel(-1, 8'd0, '0);
    in_valid <= 1'b0;
    repeat (6) @(posedge clk);
    checks++;
    if (n_bout < NFG*W*H) begin failures++; $display("mode %0d: %0d mask pixels", md, n_bout); end
    for (int f = 0; f < NFG; f++) begin
      img_t e;
      e = morph(fg_img[f], W, H, se, md);
      for (int i = 0; i < W*H; i++) begin
        checks++;
        if (bm_got[f*W*H + i] != e[i]) begin
          failures++;
          if (failures < 10) $display("mode %0d frame %0d pixel %0d bm %0d exp %0d", md, f, i, bm_got[f*W*H + i], e[i]);
        end
      end
    end
    n_mode[md]++;
  endtask

  // ================================================================ fluoroscopic filter
  logic [7:0] fr [(NFF+1)*FFP];
  int         tab [2][256];
  int         n_fout = 0;
  bit         last_act = 0;
  int         bank_of_frame [NFF];

  function automatic real fl_ref(int n, int t);
    int f, y, x, sum, cnt, pc;
    f = n / FFP; y = (n % FFP) / FN; x = n % FN;
    pc = int'(fr[n]);
    sum = 0; cnt = 0;
    for (int k = 0; k < FK; k++)
      for (int yy = y - FY; yy <= y + FY; yy++)
        for (int xx = x - FX; xx <= x + FX; xx++)
          if (yy >= 0 && yy < FM && xx >= 0 && xx < FN && f >= FK - 1 - k) begin
            int v;
            v = int'(fr[(f - (FK-1) + k)*FFP + yy*FN + xx]);
            if (v >= pc - t && v <= pc + t) begin sum += v; cnt++; end
          end
    return (cnt == 0) ? real'(pc) : real'(sum) / real'(cnt);
  endfunction

  always @(posedge fl_clk_pix) begin
    if (fl_rst_pix_n && fl_pix_in_valid && fl_in_overflow) n_fl_ovf++;
    if (fl_rst_pix_n && fl_pix_out_valid && n_fout < NFF*FFP) begin
      real a;
      int  b, y, x;
      b = int'(fl_thr_active);
      y = (n_fout % FFP) / FN; x = n_fout % FN;
      if (n_fout % FFP == 0) begin
        bank_of_frame[n_fout / FFP] = b;
        if (n_fout > 0 && b != int'(last_act)) n_fl_swap++;
      end
      last_act = fl_thr_active;
      if (y < FY || y >= FM - FY || x < FX || x >= FN - FX) n_fl_border++;
      if (n_fout / FFP < FK - 1) n_fl_early++;
      a = fl_ref(n_fout, tab[b][fr[n_fout]]);
      checks++;
      if (real'(fl_pix_out) - a > 0.75 || a - real'(fl_pix_out) > 0.75) begin
        failures++;
        if (failures < 10) $display("FL out %0d bank %0d got %0d exp %f", n_fout, b, fl_pix_out, a);
      end
      n_fout++;
    end
  end

  task automatic load_table(input int b, input int kind);
    for (int v = 0; v < 256; v++) begin
      tab[b][v] = (kind == 0) ? 6 + v / 16 : 30;
      fl_thr_we <= 1; fl_thr_addr <= 8'(v); fl_thr_data <= 10'(tab[b][v]);
      @(posedge fl_clk_pix);
    end
    fl_thr_we <= 0;
  endtask

  task automatic run_fluoro();
    for (int f = 0; f <= NFF; f++)
      for (int i = 0; i < FFP; i++) begin
        int v;
        v = 40 + (160 * (i % FN)) / FN + (40 * (i / FN)) / FM + $urandom_range(0, 24) - 12 + ((i % 7 == 0) ? 60 : 0);
        fr[f*FFP + i] = 8'((v > 255) ? 255 : v);
      end
    fl_rst_n = 0; fl_rst_pix_n = 0; fl_pix_in_valid = 0; fl_pix_in = 0;
    fl_thr_we = 0; fl_thr_addr = 0; fl_thr_data = 0; fl_thr_swap = 0;
    #50;
    fl_rst_n = 1; fl_rst_pix_n = 1;
    @(posedge fl_clk_pix);
    load_table(1, 0);
    fl_thr_swap <= 1; @(posedge fl_clk_pix); fl_thr_swap <= 0;
    fork
      begin
        for (int n = 0; n < NFF*FFP + FY*FN + FX + 8; n++) begin
          while ($urandom_range(0, 7) == 0) begin fl_pix_in_valid <= 0; @(posedge fl_clk_pix); end
          fl_pix_in_valid <= 1; fl_pix_in <= fr[n];
          @(posedge fl_clk_pix);
        end
        fl_pix_in_valid <= 0;
      end
      begin
        wait (n_fout >= 5);
        @(posedge fl_clk_pix);
        load_table(0, 1);
        wait (n_fout >= (NFF - 1) * FFP - FFP / 2);
        @(posedge fl_clk_pix);
        fl_thr_swap <= 1; @(posedge fl_clk_pix); fl_thr_swap <= 0;
      end
    join
    #3000;
    checks++;
    if (n_fout != NFF*FFP || n_fl_ovf != 0 || bank_of_frame[0] != 1 || bank_of_frame[NFF-1] != 0) begin
      failures++;
      $display("FL outputs %0d overflows %0d banks %0d..%0d", n_fout, n_fl_ovf, bank_of_frame[0], bank_of_frame[NFF-1]);
    end
    // memory held off: the input FIFO must overflow and say so
    u_mem.hold = 1;
    for (int n = 0; n < 64; n++) begin
      fl_pix_in_valid <= 1; fl_pix_in <= 8'(n);
      @(posedge fl_clk_pix);
    end
    fl_pix_in_valid <= 0;
    @(posedge fl_clk_pix);
  endtask

  // ================================================================ main
  initial begin
    rst_n = 0; in_valid = 0; pix = 0; model_in = '0; se = '0; sel1 = 0; sel2 = 0;
    fork
      for (int md = FIRST_MODE; md <= LAST_MODE; md++) run_gmm_mode(md);
      run_fluoro();
    join
    $display("mechanisms: match %0d no-match %0d fg %0d bg %0d erosion %0d dilation %0d opening %0d closing %0d",
             n_match, n_nomatch, n_fg, n_bg, n_mode[0], n_mode[1], n_mode[2], n_mode[3]);
    $display("            border %0d | mem rd %0d wr %0d stall %0d swap %0d fl-border %0d fl-early %0d overflow %0d",
             n_border, u_mem.n_rd, u_mem.n_wr, u_mem.n_stall, n_fl_swap, n_fl_border, n_fl_early, n_fl_ovf);
    for (int md = FIRST_MODE; md <= LAST_MODE; md++) begin checks++; if (n_mode[md] == 0) failures++; end
    checks++; if (n_match == 0)     failures++;
    checks++; if (n_nomatch == 0)   failures++;
    checks++; if (n_fg == 0)        failures++;
    checks++; if (n_bg == 0)        failures++;
    checks++; if (n_border == 0)    failures++;
    checks++; if (u_mem.n_rd == 0)  failures++;
    checks++; if (u_mem.n_wr == 0)  failures++;
    checks++; if (u_mem.n_stall == 0) failures++;
    checks++; if (n_fl_swap == 0)   failures++;
    checks++; if (n_fl_border == 0) failures++;
    checks++; if (n_fl_early == 0)  failures++;
    checks++; if (n_fl_ovf == 0)    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
