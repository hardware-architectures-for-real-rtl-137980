// tb_line_window: pushes a counting-plus-random stream through a 3 x 3
// window over lines of 8 pixels (4-bit pixels), with random enable gaps.
// After n inputs, window row r, column c must hold input
// n-1 - ((2-r)*LINE + (2-c)), and win_nxt must show, while a pixel is being
// accepted, the window as it will be after that clock.
module tb_line_window;
  localparam int LINE = 8, PW = 4;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic          rst_n, en;
  logic [PW-1:0] din;
  logic [PW-1:0] win [3][3], nxt [3][3];

  line_window #(.PW(PW), .ROWS(3), .COLS(3), .LINE(LINE)) dut (.clk, .rst_n, .en, .din, .win, .win_nxt(nxt));

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [PW-1:0] hist [$];

  initial begin
    rst_n = 0; en = 0; din = '0;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    for (int n = 0; n < 400; n++) begin
      logic [PW-1:0] v;
      while ($urandom_range(0, 3) == 0) begin en <= 0; @(posedge clk); end
      v = PW'($urandom);
      en <= 1; din <= v;
      hist.push_back(v);
      #1;
      // before the edge: win_nxt is the window including v
      if (n >= 2*LINE + 2)
        for (int r = 0; r < 3; r++)
          for (int c = 0; c < 3; c++) begin
            checks++;
            if (nxt[r][c] != hist[n - ((2-r)*LINE + (2-c))]) failures++;
          end
      @(posedge clk);
      #1;
      if (n >= 2*LINE + 2)
        for (int r = 0; r < 3; r++)
          for (int c = 0; c < 3; c++) begin
            checks++;
            if (win[r][c] != hist[n - ((2-r)*LINE + (2-c))]) begin
              failures++;
              if (failures < 10) $display("n=%0d win[%0d][%0d]=%0d exp %0d", n, r, c, win[r][c],
                                          hist[n - ((2-r)*LINE + (2-c))]);
            end
          end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
