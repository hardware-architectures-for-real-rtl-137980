// tb_gmm_no_match: every msumtot; the new weight must be within 25% (or 1.6
// codes, whichever is larger) of 256/msumtot (limited to 255), and the
// other fields must be pixel*4, VINIT and 1.
module tb_gmm_no_match;
  import gmm_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic [PIX_W-1:0]  p;
  logic [5:0]        x;
  logic [W_W-1:0]    w;
  logic [MU_W-1:0]   mu;
  logic [VAR_W-1:0]  v;
  logic [MSUM_W-1:0] ms;

  gmm_no_match #(.VINIT(11'd112)) dut (.pixel(p), .msumtot(x), .w_nm(w), .mu_nm(mu), .var_nm(v), .msum_nm(ms));

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 64; i++) begin
      real t, tol;
      x = 6'(i);
      p = PIX_W'($urandom);
      @(posedge clk);
      t = (i == 0) ? 255.0 : 256.0 / i;
      if (t > 255.0) t = 255.0;
      tol = (0.25 * t > 1.6) ? 0.25 * t : 1.6;
      checks++;
      if (real'(w) - t > tol || t - real'(w) > tol) begin
        failures++;
        $display("msumtot=%0d w=%0d ideal=%f", i, w, t);
      end
      checks++;
      if (mu != {p, 2'b00} || v != 11'd112 || ms != 4'd1) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
