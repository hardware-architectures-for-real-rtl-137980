// tb_frame_synchronizer: pixel clock 10 ns, memory clock 4 ns, DDR2 model
// with random stalls; K = 3, 3x3 window (X = Y = 1) over 16 x 4 frames,
// five frames plus enough pixels to flush the last one. For every window
// the mask (inside the frame, frame already acquired) and every unmasked
// pixel are compared with the frames that were sent, stream k of frame f
// being frame f-(K-1)+k. Checks that no pixel is lost (in_overflow never
// set at this rate) and that every pixel produces one window.
module tb_frame_synchronizer;
  localparam int M = 4, N = 16, X = 1, Y = 1, K = 3, NF = 5;
  localparam int R = 2*Y+1, C = 2*X+1, NW = K*R*C, FP = M*N;
  localparam int COL_BITS = 1, BANK_BITS = 1, ROW_BITS = 1;
  logic clk = 0, clk_pix = 0;
  always #2 clk = ~clk;
  always #5 clk_pix = ~clk_pix;
  int checks = 0, failures = 0, n_out = 0, n_ovf = 0;
  logic                  rst_n, rst_pix_n, pix_in_valid, in_overflow, out_valid, frame_start;
  logic [7:0]            pix_in, pix_cur;
  logic                  mem_rd, mem_wr, mem_ready, mem_rvalid;
  logic [ROW_BITS-1:0]   mem_row;
  logic [BANK_BITS-1:0]  mem_bank;
  logic [COL_BITS-1:0]   mem_col;
  logic [64*(K-1)-1:0]   mem_wdata, mem_rdata;
  logic [8*(K-1)-1:0]    mem_be;
  logic [7:0]            win [NW];
  logic                  mask [NW];

  frame_synchronizer #(.M(M), .N(N), .X(X), .Y(Y), .K(K), .COL_BITS(COL_BITS), .BANK_BITS(BANK_BITS),
                       .ROW_BITS(ROW_BITS)) dut (
    .clk, .rst_n, .clk_pix, .rst_pix_n, .pix_in, .pix_in_valid, .in_overflow,
    .mem_rd, .mem_wr, .mem_row, .mem_bank, .mem_col, .mem_wdata, .mem_be, .mem_ready, .mem_rdata, .mem_rvalid,
    .out_valid, .win, .mask, .pix_cur, .frame_start
  );

  ddr2_model #(.K(K), .COL_BITS(COL_BITS), .BANK_BITS(BANK_BITS), .ROW_BITS(ROW_BITS), .RL(4), .STALL_PCT(20)) u_mem (
    .clk, .rst_n, .mem_rd, .mem_wr, .mem_row, .mem_bank, .mem_col, .mem_wdata, .mem_be, .mem_ready, .mem_rdata, .mem_rvalid
  );

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [7:0] fr [(NF+1)*FP];

  always @(negedge clk_pix) begin
    if (rst_pix_n && pix_in_valid && in_overflow) n_ovf++;
    if (rst_pix_n && out_valid && n_out < NF*FP) begin
      int f, y, x;
      f = n_out / FP; y = (n_out % FP) / N; x = n_out % N;
      checks++;
      if (frame_start != (y == 0 && x == 0) || pix_cur != fr[n_out]) failures++;
      for (int k = 0; k < K; k++)
        for (int r = 0; r < R; r++)
          for (int c = 0; c < C; c++) begin
            int yy, xx, i;
            bit em;
            yy = y + r - Y; xx = x + c - X; i = k*R*C + r*C + c;
            em = yy >= 0 && yy < M && xx >= 0 && xx < N && f >= K - 1 - k;
            checks++;
            if (mask[i] != em) failures++;
            if (em) begin
              checks++;
              if (win[i] != fr[(f - (K-1) + k)*FP + yy*N + xx]) begin
                failures++;
                if (failures < 10) $display("out %0d k%0d r%0d c%0d win %0d exp %0d", n_out, k, r, c, win[i],
                                            fr[(f - (K-1) + k)*FP + yy*N + xx]);
              end
            end
          end
      n_out++;
    end
  end

  initial begin
    foreach (fr[i]) fr[i] = 8'($urandom);
    rst_n = 0; rst_pix_n = 0; pix_in_valid = 0; pix_in = 0;
    #50;
    rst_n = 1; rst_pix_n = 1;
    @(posedge clk_pix);
    for (int n = 0; n < NF*FP + Y*N + X + 8; n++) begin
      while ($urandom_range(0, 7) == 0) begin pix_in_valid <= 0; @(posedge clk_pix); end
      pix_in_valid <= 1; pix_in <= fr[n];
      @(posedge clk_pix);
    end
    pix_in_valid <= 0;
    #3000;
    checks++;
    if (n_out != NF*FP || n_ovf != 0 || u_mem.n_stall == 0) begin
      failures++;
      $display("windows %0d overflows %0d stalls %0d", n_out, n_ovf, u_mem.n_stall);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
