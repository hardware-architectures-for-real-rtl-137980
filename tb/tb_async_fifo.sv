// tb_async_fifo: write clock 7 ns, read clock 10 ns (and a second phase
// with the read side faster), random write and read requests. Every word
// read must be the next one written (nothing lost, duplicated or
// reordered); a write while full must be dropped and a read while empty
// must not advance. Both the full and the empty state must be reached.
module tb_async_fifo;
  localparam int W = 8;
  logic wclk = 0, rclk = 0;
  int   wper = 7, rper = 10;
  always #(wper / 2.0) wclk = ~wclk;
  always #(rper / 2.0) rclk = ~rclk;
  int checks = 0, failures = 0, n_full = 0, n_empty = 0, n_wr = 0, n_rd = 0;
  logic         wrst_n, rrst_n, wr_en, rd_en, full, empty;
  logic [W-1:0] wdata, rdata;

  async_fifo #(.W(W), .DEPTH_LOG2(4)) dut (
    .wclk, .wrst_n, .wr_en, .wdata, .full, .rclk, .rrst_n, .rd_en, .rdata, .empty
  );

  initial begin
    #400000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [W-1:0] model [$];
  int           wprob = 2, rprob = 2;
  bit           done = 0;

  always @(posedge wclk) begin
    if (wrst_n) begin
      if (wr_en && !full) begin model.push_back(wdata); n_wr++; end
      if (wr_en && full) n_full++;
      wr_en <= !done && ($urandom_range(0, 3) < wprob);
      wdata <= W'($urandom);
    end
  end

  always @(posedge rclk) begin
    if (rrst_n) begin
      if (rd_en && empty) n_empty++;
      if (rd_en && !empty) begin
        checks++;
        n_rd++;
        if (model.size() == 0) begin failures++; $display("read from an empty model"); end
        else begin
          logic [W-1:0] e;
          e = model.pop_front();
          if (rdata != e) begin failures++; if (failures < 10) $display("read %0h exp %0h", rdata, e); end
        end
      end
      rd_en <= ($urandom_range(0, 3) < rprob);
    end
  end

  initial begin
    wrst_n = 0; rrst_n = 0; wr_en = 0; rd_en = 0; wdata = '0;
    #35;
    wrst_n = 1; rrst_n = 1;
    // phase 1: writer faster than reader -> full
    wprob = 4; rprob = 2;
    #40000;
    // phase 2: reader faster -> empty
    wprob = 1; rprob = 4; wper = 11; rper = 6;
    #40000;
    done = 1;
    #2000;
    checks++;
    if (n_full == 0 || n_empty == 0 || n_rd < 1000 || model.size() != 0) begin
      failures++;
      $display("full %0d empty %0d reads %0d left %0d", n_full, n_empty, n_rd, model.size());
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
