// tb_gmm_trunc_mult: random 12-bit operands; the 15-bit result must be
// within 2 output LSBs of the exact product / 512 and the mean error must
// be below 0.25 LSB (the correction constant removes the truncation bias).
module tb_gmm_trunc_mult;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic [11:0] a, b;
  logic [14:0] p;
  real  sum_err = 0.0;

  gmm_trunc_mult #(.N(12), .OUT_W(15)) dut (.a, .b, .p);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 20000; i++) begin
      real e;
      a = 12'($urandom);
      b = (i % 2 == 1) ? a : 12'($urandom);
      @(posedge clk);
      e = real'(p) - real'(longint'(a) * longint'(b)) / 512.0;
      sum_err += e;
      checks++;
      if (e > 2.0 || e < -2.0) begin
        failures++;
        if (failures < 10) $display("a=%0d b=%0d p=%0d err=%f", a, b, p, e);
      end
    end
    checks++;
    if (sum_err / 20000.0 > 0.25 || sum_err / 20000.0 < -0.25) begin
      failures++;
      $display("mean error %f", sum_err / 20000.0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
