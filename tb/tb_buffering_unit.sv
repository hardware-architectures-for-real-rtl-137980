// tb_buffering_unit: K = 3 independent random streams of 8 x 6 frames (3x3
// window, X = Y = 1), four frames back to back with random input gaps. For
// every window centre the testbench recomputes which positions are inside
// the frame and belong to an acquired frame (frame index >= K-1-k for stream
// k), checks the mask against that, checks every unmasked window pixel and
// the centre pixel against the stored streams, and checks frame_start.
module tb_buffering_unit;
  localparam int M = 6, N = 8, X = 1, Y = 1, K = 3, NF = 4;
  localparam int R = 2*Y+1, C = 2*X+1, NW = K*R*C;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0, n_out = 0, n_fs = 0, n_masked = 0;
  logic       rst_n, in_valid, out_valid, frame_start;
  logic [7:0] cur, prev [K-1], pix_cur;
  logic [7:0] win [NW];
  logic       mask [NW];

  buffering_unit #(.M(M), .N(N), .X(X), .Y(Y), .K(K)) dut (
    .clk, .rst_n, .in_valid, .cur, .prev, .out_valid, .win, .mask, .pix_cur, .frame_start
  );

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [7:0] s [K][NF*M*N + Y*N + X];

  // outputs are combinational: sample just before the clock edge
  always @(negedge clk) begin
    if (rst_n && out_valid && n_out < NF*M*N) begin
      int f, y, x;
      f = n_out / (M*N); y = (n_out % (M*N)) / N; x = n_out % N;
      checks++;
      if (frame_start != (y == 0 && x == 0)) failures++;
      if (frame_start) n_fs++;
      checks++;
      if (pix_cur != s[K-1][n_out]) failures++;
      for (int k = 0; k < K; k++)
        for (int r = 0; r < R; r++)
          for (int c = 0; c < C; c++) begin
            int yy, xx, i;
            bit em;
            yy = y + r - Y; xx = x + c - X; i = k*R*C + r*C + c;
            em = yy >= 0 && yy < M && xx >= 0 && xx < N && f >= K - 1 - k;
            checks++;
            if (mask[i] != em) begin
              failures++;
              if (failures < 10) $display("out %0d k%0d r%0d c%0d mask %0d exp %0d", n_out, k, r, c, mask[i], em);
            end
            if (!em) n_masked++;
            if (em) begin
              checks++;
              if (win[i] != s[k][f*M*N + yy*N + xx]) begin
                failures++;
                if (failures < 10) $display("out %0d k%0d r%0d c%0d win %0d exp %0d", n_out, k, r, c, win[i],
                                            s[k][f*M*N + yy*N + xx]);
              end
            end
          end
      n_out++;
    end
  end

  initial begin
    foreach (s[k, i]) s[k][i] = 8'($urandom);
    rst_n = 0; in_valid = 0; cur = 0;
    foreach (prev[k]) prev[k] = 0;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    for (int n = 0; n < NF*M*N + Y*N + X; n++) begin
      while ($urandom_range(0, 4) == 0) begin in_valid <= 0; @(posedge clk); end
      in_valid <= 1;
      cur <= s[K-1][n];
      for (int k = 0; k < K-1; k++) prev[k] <= s[k][n];
      @(posedge clk);
    end
    in_valid <= 0;
    repeat (3) @(posedge clk);
    checks++;
    if (n_out != NF*M*N || n_fs != NF || n_masked == 0) begin
      failures++;
      $display("outputs %0d frame starts %0d", n_out, n_fs);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
