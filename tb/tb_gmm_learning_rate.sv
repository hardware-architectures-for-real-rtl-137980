// tb_gmm_learning_rate: every weight code; s must be the nearest integer to
// log2(w / alpha_w) (alpha_w = 2^-6), limited to 0..6.
module tb_gmm_learning_rate;
  import gmm_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic [W_W-1:0]  w;
  logic [SH_W-1:0] s;

  gmm_learning_rate #(.ALPHA_SHIFT(6)) dut (.w, .s);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 256; i++) begin
      int e;
      real x;
      w = W_W'(i);
      @(posedge clk);
      if (i == 0) e = 0;
      else begin
        x = $ln(real'(i) / 4.0) / $ln(2.0);
        e = (x < 0) ? 0 : int'($floor(x + 0.5));
        if (e > 6) e = 6;
      end
      checks++;
      if (int'(s) != e) begin
        failures++;
        $display("w=%0d s=%0d exp=%0d", i, s, e);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
