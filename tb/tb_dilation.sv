// tb_dilation: streams several random binary frames (16 x 8, with random
// input gaps) through the dilation unit, one SE per frame, and compares
// every output pixel with the reference dilation, border pixels included.
// Also checks the latency: output n leaves one clock after input n+W+1 is
// accepted.
module tb_dilation;
  import morph_ref_pkg::*;
  localparam int W = 16, H = 8, NF = 4;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic       rst_n, in_valid, din, out_valid, dout;
  logic [8:0] se;

  dilation #(.IMG_W(W), .IMG_H(H)) dut (.clk, .rst_n, .in_valid, .din, .se, .out_valid, .dout);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  img_t      frames [NF];
  img_t      expd   [NF];
  bit [8:0]  ses    [NF];
  int        cyc = 0, n_in = 0, n_out = 0;
  int        acc_cyc [$];

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (rst_n && in_valid) begin acc_cyc.push_back(cyc); n_in <= n_in + 1; end
    if (rst_n && out_valid && n_out < NF*W*H) begin
      int f, i;
      f = n_out / (W*H); i = n_out % (W*H);
      checks++;
      if (dout != expd[f][i]) begin
        failures++;
        if (failures < 10) $display("frame %0d pixel (%0d,%0d) got %0d exp %0d", f, i / W, i % W, dout, expd[f][i]);
      end
      checks++;
      if (cyc != acc_cyc[n_out + W + 1] + 1) begin
        failures++;
        if (failures < 10) $display("output %0d at cycle %0d, input %0d accepted at %0d", n_out, cyc, n_out + W + 1,
                                    acc_cyc[n_out + W + 1]);
      end
      n_out <= n_out + 1;
    end
  end

  initial begin
    for (int f = 0; f < NF; f++) begin
      frames[f] = new[W*H];
      foreach (frames[f][i]) frames[f][i] = ($urandom_range(0, 5) == 0);
      ses[f] = (f == 0) ? 9'h1ff : ((f == 1) ? 9'b010_111_010 : 9'($urandom));
      expd[f] = dil(frames[f], W, H, ses[f]);
    end
    rst_n = 0; in_valid = 0; din = 0; se = ses[0];
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    for (int n = 0; n < NF*W*H + W + 1; n++) begin
      while ($urandom_range(0, 3) == 0) begin in_valid <= 0; @(posedge clk); end
      in_valid <= 1;
      // output m is formed while input m+W+1 is accepted: switch the SE there
      if (n >= W + 1 && (n - W - 1) % (W*H) == 0 && (n - W - 1) / (W*H) < NF) se <= ses[(n - W - 1) / (W*H)];
      din <= (n < NF*W*H) ? frames[n / (W*H)][n % (W*H)] : 1'b0;
      @(posedge clk);
    end
    in_valid <= 0;
    repeat (5) @(posedge clk);
    checks++;
    if (n_out != NF*W*H) begin failures++; $display("outputs %0d, expected %0d", n_out, NF*W*H); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
