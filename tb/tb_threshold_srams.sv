// tb_threshold_srams: random writes, reads, swap requests and frame starts
// against a model of the two 256 x 10 banks. Writes must land in the bank
// not being read; a swap request must take effect at the next frame start
// (or at once if it comes with the frame start), and the pixel at the frame
// start must already read the new bank. Only written entries are compared.
module tb_threshold_srams;
  localparam int TW = 10;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0, n_swap = 0;
  logic          rst_n, we, swap_req, frame_start, active;
  logic [7:0]    waddr, raddr;
  logic [TW-1:0] wdata, thr;

  threshold_srams #(.TW(TW)) dut (.clk, .rst_n, .we, .waddr, .wdata, .swap_req, .frame_start, .raddr, .thr, .active);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int  b [2][256];
  bit  ok [2][256];
  bit  act, pend;

  initial begin
    rst_n = 0; we = 0; swap_req = 0; frame_start = 0; waddr = 0; raddr = 0; wdata = 0;
    act = 0; pend = 0;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    for (int i = 0; i < 20000; i++) begin
      bit sw, ebank;
      we          <= ($urandom_range(0, 1) == 1) || (i < 600);
      waddr       <= (i < 600) ? 8'(i) : 8'($urandom);
      wdata       <= TW'($urandom);
      swap_req    <= (i == 300) || ($urandom_range(0, 99) == 0);
      frame_start <= ($urandom_range(0, 19) == 0);
      raddr       <= 8'($urandom);
      #1;
      sw    = frame_start && (pend || swap_req);
      ebank = act ^ sw;
      if (ok[ebank][raddr]) begin
        checks++;
        if (int'(thr) != b[ebank][raddr]) begin
          failures++;
          if (failures < 10) $display("i=%0d bank %0d addr %0d thr %0d exp %0d", i, ebank, raddr, thr, b[ebank][raddr]);
        end
      end
      checks++;
      if (active != act) failures++;
      if (we) begin b[!act][waddr] = int'(wdata); ok[!act][waddr] = 1; end
      if (sw) begin act = !act; pend = 0; n_swap++; end
      else if (swap_req) pend = 1;
      @(posedge clk);
    end
    checks++;
    if (n_swap < 10) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
