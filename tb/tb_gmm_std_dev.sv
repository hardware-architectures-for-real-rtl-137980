// tb_gmm_std_dev: sweeps every variance code and checks the piecewise-linear
// standard deviation against the true square root (relative error < 20%),
// that it never decreases, and that a few points hit their exact values.
module tb_gmm_std_dev;
  import gmm_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic [VAR_W-1:0] v;
  logic [SIG_W-1:0] sg, last;

  gmm_std_dev dut (.var_in(v), .sigma(sg));

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real t, e;
    last = 0;
    for (int i = 1; i < 2048; i++) begin
      v = VAR_W'(i);
      @(posedge clk);
      t = 4.0 * $sqrt(8.0 * i);
      e = (real'(sg) - t) / t;
      checks++;
      if (e > 0.2 || e < -0.2) begin
        failures++;
        $display("v=%0d sigma=%0d true=%f", i, sg, t);
      end
      checks++;
      if (sg < last) begin failures++; $display("not monotonic at %0d", i); end
      last = sg;
    end
    // exact points: v=1 -> 11, v=8 -> 28 (true 32), v=128 -> 111, v=2047 -> 470
    v = 11'd1;    #1; checks++; if (sg != 10'd11)  failures++;
    v = 11'd8;    #1; checks++; if (sg != 10'd28)  failures++;
    v = 11'd128;  #1; checks++; if (sg != 10'd111) failures++;
    v = 11'd2047; #1; checks++; if (sg != 10'd470) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
