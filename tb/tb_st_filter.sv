// tb_st_filter: random 7x7x5 windows (values spread around the current
// pixel), random masks and thresholds. The output must be within 0.75 of the
// real average of the accepted pixels (those in the mask with
// |Pix_ref - Pix_cur| <= T), which allows for the rounding and the table's
// reciprocal. Also checks the one-clock latency, that out_valid follows
// in_valid, and that T = 0 over a flat window returns the pixel unchanged.
module tb_st_filter;
  localparam int X = 3, Y = 3, K = 5, TW = 10, NW = K*(2*X+1)*(2*Y+1);
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic          rst_n, in_valid, out_valid;
  logic [7:0]    win [NW];
  logic          mask [NW];
  logic [7:0]    pix_cur, pix_out;
  logic [TW-1:0] thr;

  st_filter #(.X(X), .Y(Y), .K(K), .TW(TW)) dut (.clk, .rst_n, .in_valid, .win, .mask, .pix_cur, .thr, .out_valid, .pix_out);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 0; in_valid = 0; pix_cur = 0; thr = 0;
    foreach (win[i]) begin win[i] = 0; mask[i] = 0; end
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    for (int n = 0; n < 5000; n++) begin
      real avg;
      int  sum, cnt, spread;
      bit  v;
      spread = (n % 3 == 0) ? 255 : 40;
      pix_cur = 8'($urandom);
      thr     = (n % 7 == 0) ? TW'($urandom) : TW'($urandom_range(0, 50));
      v       = ($urandom_range(0, 4) != 0);
      in_valid = v;
      sum = 0; cnt = 0;
      for (int i = 0; i < NW; i++) begin
        int t;
        t = int'(pix_cur) + $urandom_range(0, 2*spread) - spread;
        win[i]  = 8'((t < 0) ? 0 : (t > 255 ? 255 : t));
        mask[i] = (n % 5 == 0) ? ($urandom_range(0, 1) == 1) : ($urandom_range(0, 9) != 0);
        if (mask[i] && int'(win[i]) >= int'(pix_cur) - int'(thr) && int'(win[i]) <= int'(pix_cur) + int'(thr)) begin
          sum += int'(win[i]); cnt++;
        end
      end
      avg = (cnt == 0) ? real'(pix_cur) : real'(sum) / real'(cnt);
      @(posedge clk);
      #1;
      checks++;
      if (out_valid != v) failures++;
      checks++;
      if (real'(pix_out) - avg > 0.75 || avg - real'(pix_out) > 0.75) begin
        failures++;
        if (failures < 10) $display("n=%0d cnt=%0d sum=%0d out=%0d avg=%f", n, cnt, sum, pix_out, avg);
      end
    end
    // flat window, T = 0: the output is the pixel itself
    in_valid = 1; pix_cur = 8'd77; thr = '0;
    foreach (win[i]) begin win[i] = (i % 2 == 0) ? 8'd77 : 8'd200; mask[i] = 1; end
    @(posedge clk);
    #1;
    checks++;
    if (pix_out != 8'd77) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
