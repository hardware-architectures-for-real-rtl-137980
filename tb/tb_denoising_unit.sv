// tb_denoising_unit: for each of the four operations (erosion, dilation,
// opening, closing, chosen by sel1/sel2) resets the unit, streams two random
// 16 x 8 frames and compares every output pixel with the reference
// morphology. Checks the latency of one (erosion, dilation) and two
// (opening, closing) Dilation stages: W+2 clocks per stage at one pixel per
// clock (measured from the clock before the first input is accepted).
module tb_denoising_unit;
  import morph_ref_pkg::*;
  localparam int W = 16, H = 8, NF = 2;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic       rst_n, in_valid, fgbg, sel1, sel2, out_valid, bm;
  logic [8:0] se;

  denoising_unit #(.IMG_W(W), .IMG_H(H)) dut (.clk, .rst_n, .in_valid, .fgbg, .se, .sel1, .sel2, .out_valid, .bm);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  img_t frames [NF];
  img_t expd   [NF];
  int   n_out, first_out, cyc = 0;

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (rst_n && out_valid) begin
      if (n_out == 0) first_out = cyc;
      if (n_out < NF*W*H) begin
        checks++;
        if (bm != expd[n_out / (W*H)][n_out % (W*H)]) begin
          failures++;
          if (failures < 10) $display("mode %0d%0d out %0d got %0d", sel2, sel1, n_out, bm);
        end
      end
      n_out <= n_out + 1;
    end
  end

  initial begin
    int start;
    for (int mode = 0; mode < 4; mode++) begin
      se = (mode % 2 == 0) ? 9'b010_111_010 : 9'h1ff;
      for (int f = 0; f < NF; f++) begin
        frames[f] = new[W*H];
        foreach (frames[f][i]) frames[f][i] = ($urandom_range(0, 2) == 0);
        expd[f] = morph(frames[f], W, H, se, mode);
      end
      rst_n = 0; in_valid = 0; fgbg = 0; sel1 = mode[0]; sel2 = mode[1];
      n_out = 0;
      repeat (3) @(posedge clk);
      rst_n <= 1;
      @(posedge clk);
      start = cyc;
      for (int n = 0; n < NF*W*H + 2*(W+1); n++) begin
        in_valid <= 1;
        fgbg <= (n < NF*W*H) ? frames[n / (W*H)][n % (W*H)] : 1'b0;
        @(posedge clk);
      end
      in_valid <= 0;
      repeat (5) @(posedge clk);
      checks++;
      if (n_out < NF*W*H) begin failures++; $display("mode %0d: %0d outputs", mode, n_out); end
      checks++;
      if (first_out - start != (mode >= 2 ? 2 : 1) * (W + 2) + 1) begin
        failures++; $display("mode %0d: first output after %0d clocks", mode, first_out - start);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
