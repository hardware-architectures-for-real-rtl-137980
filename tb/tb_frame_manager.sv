// tb_frame_manager: K = 3 (two stored frames), 64-pixel frames, six frames
// of random pixels with random input gaps and random output backpressure,
// against the behavioural DDR2 model with random stalls. Every output must
// carry the next input pixel as cur and, as prev[i], the pixel at the same
// position of frame f-(K-1)+i (zero before such a frame exists, the model's
// reset content). Also checks one burst read and one burst write per 8
// pixels, write addresses that walk through the frame's bursts, and byte
// enables that cover only the word of the frame being written.
module tb_frame_manager;
  localparam int K = 3, NP = K - 1, FP = 64, NF = 6, NG = FP / 8;
  localparam int COL_BITS = 1, BANK_BITS = 1, ROW_BITS = 1;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0, n_out = 0, n_bp = 0;
  logic                  rst_n, pix_valid, pix_ready, mem_rd, mem_wr, mem_ready, mem_rvalid, out_valid, out_ready;
  logic [7:0]            pix, cur, prev [NP];
  logic [ROW_BITS-1:0]   mem_row;
  logic [BANK_BITS-1:0]  mem_bank;
  logic [COL_BITS-1:0]   mem_col;
  logic [64*NP-1:0]      mem_wdata, mem_rdata;
  logic [8*NP-1:0]       mem_be;

  frame_manager #(.K(K), .FRAME_PIX(FP), .COL_BITS(COL_BITS), .BANK_BITS(BANK_BITS), .ROW_BITS(ROW_BITS)) dut (
    .clk, .rst_n, .pix, .pix_valid, .pix_ready, .mem_rd, .mem_wr, .mem_row, .mem_bank, .mem_col,
    .mem_wdata, .mem_be, .mem_ready, .mem_rdata, .mem_rvalid, .cur, .prev, .out_valid, .out_ready
  );

  ddr2_model #(.K(K), .COL_BITS(COL_BITS), .BANK_BITS(BANK_BITS), .ROW_BITS(ROW_BITS), .RL(5), .STALL_PCT(30)) u_mem (
    .clk, .rst_n, .mem_rd, .mem_wr, .mem_row, .mem_bank, .mem_col, .mem_wdata, .mem_be, .mem_ready, .mem_rdata, .mem_rvalid
  );

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [7:0] fr [NF*FP];
  int         n_wr_seen = 0;

  always @(posedge clk) begin
    if (rst_n) begin
      if (out_valid && !out_ready) n_bp++;
      if (out_valid && out_ready) begin
        int f, p;
        f = n_out / FP; p = n_out % FP;
        checks++;
        if (cur != fr[n_out]) begin failures++; if (failures < 10) $display("out %0d cur %0d exp %0d", n_out, cur, fr[n_out]); end
        for (int i = 0; i < NP; i++) begin
          int src;
          logic [7:0] e;
          src = f - NP + i;
          e = (src >= 0) ? fr[src*FP + p] : 8'd0;
          checks++;
          if (prev[i] != e) begin
            failures++;
            if (failures < 10) $display("out %0d prev[%0d] %0d exp %0d", n_out, i, prev[i], e);
          end
        end
        n_out++;
      end
      if (mem_wr && mem_ready) begin
        logic [8*NP-1:0] ebe;
        checks++;
        ebe = '0;
        ebe[8*((n_wr_seen / NG) % NP) +: 8] = 8'hFF;
        if (int'({mem_row, mem_bank, mem_col}) != n_wr_seen % NG || mem_be != ebe) begin
          failures++;
          $display("write %0d to %0d be %h", n_wr_seen, {mem_row, mem_bank, mem_col}, mem_be);
        end
        n_wr_seen++;
      end
      out_ready <= ($urandom_range(0, 3) != 0);
    end
  end

  initial begin
    foreach (fr[i]) fr[i] = 8'($urandom);
    rst_n = 0; pix_valid = 0; pix = 0; out_ready = 0;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    for (int n = 0; n < NF*FP; n++) begin
      while ($urandom_range(0, 3) == 0) begin pix_valid <= 0; @(posedge clk); end
      pix_valid <= 1; pix <= fr[n];
      @(posedge clk);
      while (!pix_ready) @(posedge clk);
    end
    pix_valid <= 0;
    repeat (200) @(posedge clk);
    checks++;
    if (n_out != NF*FP || u_mem.n_rd != NF*NG || u_mem.n_wr != NF*NG || u_mem.n_stall == 0 || n_bp == 0) begin
      failures++;
      $display("out %0d reads %0d writes %0d stalls %0d bp %0d", n_out, u_mem.n_rd, u_mem.n_wr, u_mem.n_stall, n_bp);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
