// tb_fluoro_filter: the whole fluoroscopic filter (synchroniser, threshold
// tables, filter) on 32 x 8 frames with a 5x3x3 window (X = 2, Y = 1, K = 3),
// pixel clock 10 ns, memory clock 4 ns, DDR2 model with random stalls.
// Frames are a smooth ramp plus noise. Threshold table A (T = 6 + v/16) is
// loaded and swapped in before the first frame; table B (T = 30) is loaded
// into the idle bank during frame 0 and the swap requested in mid-frame 1, so it
// must take effect at the start of frame 2. Every output is compared with a
// reference average over the accepted pixels of the window, using the table
// shown active by thr_active (within 0.75 of the real average).
module tb_fluoro_filter;
  localparam int M = 8, N = 32, X = 2, Y = 1, K = 3, NF = 4;
  localparam int FP = M*N;
  localparam int COL_BITS = 1, BANK_BITS = 1, ROW_BITS = 3;
  logic clk = 0, clk_pix = 0;
  always #2 clk = ~clk;
  always #5 clk_pix = ~clk_pix;
  int checks = 0, failures = 0, n_out = 0, n_ovf = 0, n_swap = 0;
  logic                  rst_n, rst_pix_n, pix_in_valid, in_overflow, thr_we, thr_swap, thr_active;
  logic [7:0]            pix_in, thr_addr, pix_out;
  logic [9:0]            thr_data;
  logic                  pix_out_valid;
  logic                  mem_rd, mem_wr, mem_ready, mem_rvalid;
  logic [ROW_BITS-1:0]   mem_row;
  logic [BANK_BITS-1:0]  mem_bank;
  logic [COL_BITS-1:0]   mem_col;
  logic [64*(K-1)-1:0]   mem_wdata, mem_rdata;
  logic [8*(K-1)-1:0]    mem_be;

  fluoro_filter #(.M(M), .N(N), .X(X), .Y(Y), .K(K), .COL_BITS(COL_BITS), .BANK_BITS(BANK_BITS),
                  .ROW_BITS(ROW_BITS)) dut (
    .clk, .rst_n, .clk_pix, .rst_pix_n, .pix_in, .pix_in_valid, .in_overflow,
    .thr_we, .thr_addr, .thr_data, .thr_swap,
    .mem_rd, .mem_wr, .mem_row, .mem_bank, .mem_col, .mem_wdata, .mem_be, .mem_ready, .mem_rdata, .mem_rvalid,
    .pix_out, .pix_out_valid, .thr_active
  );

  ddr2_model #(.K(K), .COL_BITS(COL_BITS), .BANK_BITS(BANK_BITS), .ROW_BITS(ROW_BITS), .RL(4), .STALL_PCT(20)) u_mem (
    .clk, .rst_n, .mem_rd, .mem_wr, .mem_row, .mem_bank, .mem_col, .mem_wdata, .mem_be, .mem_ready, .mem_rdata, .mem_rvalid
  );

  initial begin
    #400000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [7:0] fr [(NF+1)*FP];
  int         tab [2][256];
  bit         last_act = 0;
  int         bank_of_frame [NF];

  function automatic real ref_avg(int n, int t);
    int f, y, x, sum, cnt, pc;
    f = n / FP; y = (n % FP) / N; x = n % N;
    pc = int'(fr[n]);
    sum = 0; cnt = 0;
    for (int k = 0; k < K; k++)
      for (int yy = y - Y; yy <= y + Y; yy++)
        for (int xx = x - X; xx <= x + X; xx++)
          if (yy >= 0 && yy < M && xx >= 0 && xx < N && f >= K - 1 - k) begin
            int v;
            v = int'(fr[(f - (K-1) + k)*FP + yy*N + xx]);
            if (v >= pc - t && v <= pc + t) begin sum += v; cnt++; end
          end
    return (cnt == 0) ? real'(pc) : real'(sum) / real'(cnt);
  endfunction

  always @(posedge clk_pix) begin
    if (rst_pix_n && pix_in_valid && in_overflow) n_ovf++;
    if (rst_pix_n && pix_out_valid && n_out < NF*FP) begin
      real a;
      int  b;
      b = int'(thr_active);
      if (n_out % FP == 0) begin
        bank_of_frame[n_out / FP] = b;
        if (n_out > 0 && b != int'(last_act)) n_swap++;
      end
      last_act = thr_active;
      a = ref_avg(n_out, tab[b][fr[n_out]]);
      checks++;
      if (real'(pix_out) - a > 0.75 || a - real'(pix_out) > 0.75) begin
        failures++;
        if (failures < 10) $display("out %0d bank %0d got %0d exp %f", n_out, b, pix_out, a);
      end
      n_out++;
    end
  end

  task automatic load_table(input int b, input int kind);
    for (int v = 0; v < 256; v++) begin
      tab[b][v] = (kind == 0) ? 6 + v / 16 : 30;
      thr_we <= 1; thr_addr <= 8'(v); thr_data <= 10'(tab[b][v]);
      @(posedge clk_pix);
    end
    thr_we <= 0;
  endtask

  initial begin
    for (int f = 0; f <= NF; f++)
      for (int i = 0; i < FP; i++) begin
        int v;
        v = 40 + 4 * (i % N) + 5 * (i / N) + $urandom_range(0, 24) - 12 + ((i % 7 == 0) ? 60 : 0);
        fr[f*FP + i] = 8'((v > 255) ? 255 : v);
      end
    rst_n = 0; rst_pix_n = 0; pix_in_valid = 0; pix_in = 0;
    thr_we = 0; thr_addr = 0; thr_data = 0; thr_swap = 0;
    #50;
    rst_n = 1; rst_pix_n = 1;
    @(posedge clk_pix);
    // table A into bank 1 (idle after reset), swap at the first frame start
    load_table(1, 0);
    thr_swap <= 1; @(posedge clk_pix); thr_swap <= 0;
    fork
      begin
        for (int n = 0; n < NF*FP + Y*N + X + 8; n++) begin
          while ($urandom_range(0, 7) == 0) begin pix_in_valid <= 0; @(posedge clk_pix); end
          pix_in_valid <= 1; pix_in <= fr[n];
          @(posedge clk_pix);
        end
        pix_in_valid <= 0;
      end
      begin
        // table B into bank 0 during frame 1, swap requested mid-frame
        wait (n_out >= 5);
        @(posedge clk_pix);
        load_table(0, 1);
        wait (n_out >= FP + FP / 2);
        @(posedge clk_pix);
        thr_swap <= 1; @(posedge clk_pix); thr_swap <= 0;
      end
    join
    #3000;
    checks++;
    if (n_out != NF*FP || n_ovf != 0 || bank_of_frame[0] != 1 || bank_of_frame[1] != 1 ||
        bank_of_frame[2] != 0 || bank_of_frame[3] != 0 || n_swap != 1) begin
      failures++;
      $display("outputs %0d overflows %0d banks %0d%0d%0d%0d swaps %0d", n_out, n_ovf, bank_of_frame[0],
               bank_of_frame[1], bank_of_frame[2], bank_of_frame[3], n_swap);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
