// tb_gmm_control_logic: random inverse-fitness values (small range, so ties
// occur) and match flags; G1..G3 must be a stable ascending sort and GU the
// first matched Gaussian in that order, NM set when none matched.
module tb_gmm_control_logic;
  import gmm_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic [IF_W-1:0] f [NG];
  logic [NG-1:0]   m;
  logic [1:0]      g1, g2, g3, gu;
  logic            nm;

  gmm_control_logic dut (.ifit(f), .m, .g1, .g2, .g3, .gu, .nm);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 5000; i++) begin
      int o[3], t, egu;
      bit enm;
      for (int k = 0; k < 3; k++) f[k] = (i % 3 == 0) ? IF_W'($urandom_range(0, 3)) : IF_W'($urandom);
      m = NG'($urandom);
      @(posedge clk);
      o = '{0, 1, 2};
      for (int a = 0; a < 2; a++)
        for (int b = 0; b < 2 - a; b++)
          if (f[o[b]] > f[o[b+1]]) begin t = o[b]; o[b] = o[b+1]; o[b+1] = t; end
      enm = (m == 0);
      egu = m[o[0]] ? o[0] : (m[o[1]] ? o[1] : o[2]);
      checks++;
      if (int'(g1) != o[0] || int'(g2) != o[1] || int'(g3) != o[2] || nm != enm ||
          (!enm && int'(gu) != egu)) begin
        failures++;
        if (failures < 10)
          $display("f=%0d,%0d,%0d m=%b got %0d%0d%0d gu=%0d nm=%0d exp %0d%0d%0d gu=%0d",
                   f[0], f[1], f[2], m, g1, g2, g3, gu, nm, o[0], o[1], o[2], egu);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
