// tb_gmm_ifitness: IF must equal var * 4^(6-s) for random variances and all
// shifts.
module tb_gmm_ifitness;
  import gmm_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic [VAR_W-1:0] v;
  logic [SH_W-1:0]  s;
  logic [IF_W-1:0]  f;

  gmm_ifitness #(.ALPHA_SHIFT(6)) dut (.var_in(v), .s, .ifit(f));

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 5000; i++) begin
      longint e;
      v = VAR_W'($urandom);
      s = SH_W'($urandom_range(0, 6));
      @(posedge clk);
      e = longint'(v) * (longint'(4) ** (6 - int'(s)));
      checks++;
      if (longint'(f) != e) begin
        failures++;
        if (failures < 10) $display("v=%0d s=%0d f=%0d exp=%0d", v, s, f, e);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
