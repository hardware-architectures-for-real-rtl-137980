// tb_gmm_match: random pixels, means and sigmas; the match flag must equal
// |pixel - mu| < 2.5 sigma evaluated in real arithmetic.
module tb_gmm_match;
  import gmm_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0, hits = 0;
  logic [PIX_W-1:0] p;
  logic [MU_W-1:0]  mu;
  logic [SIG_W-1:0] sg;
  logic             m;

  gmm_match dut (.pixel(p), .mu, .sigma(sg), .m);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 20000; i++) begin
      real d;
      bit  exp_m;
      p  = PIX_W'($urandom);
      mu = (i % 2 == 1) ? MU_W'({p, 2'b00} + 10'($urandom_range(0, 80)) - 10'd40) : MU_W'($urandom);
      sg = SIG_W'($urandom_range(8, 200));
      @(posedge clk);
      d = real'(p) - real'(mu) / 4.0;
      if (d < 0) d = -d;
      exp_m = (d < 2.5 * real'(sg) / 4.0);
      checks++;
      hits += int'(m);
      if (m !== exp_m) begin
        failures++;
        if (failures < 10) $display("p=%0d mu=%0d sg=%0d m=%0d exp=%0d", p, mu, sg, m, exp_m);
      end
    end
    checks++;
    if (hits < 1000) failures++;   // both outcomes exercised
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
