// async_fifo: dual-clock FIFO used at the crossings between the memory-side
// clock (frame manager) and the pixel clock (buffering unit and filter).
//
// Binary read/write pointers with one extra wrap bit are converted to Gray
// code, and each Gray pointer crosses to the other domain through two
// flip-flops. full is computed in the write domain and empty in the read
// domain, both conservatively. The read side is first-word-fall-through:
// rdata shows the head entry whenever empty is low and rd_en pops it. The
// published design places three such FIFOs but does not give their depth;
// DEPTH_LOG2 = 4 is this design's choice.
//
// Interface: write side wclk, wrst_n, wr_en, wdata, full;
//            read side  rclk, rrst_n, rd_en, rdata, empty.
// Timing: a written word becomes visible to the reader 2-3 rclk edges later.
module async_fifo #(
  parameter int unsigned W          = 8,
  parameter int unsigned DEPTH_LOG2 = 4
) (
  input  logic         wclk,
  input  logic         wrst_n,
  input  logic         wr_en,
  input  logic [W-1:0] wdata,
  output logic         full,
  input  logic         rclk,
  input  logic         rrst_n,
  input  logic         rd_en,
  output logic [W-1:0] rdata,
  output logic         empty
);
  localparam int unsigned A = DEPTH_LOG2;

  logic [W-1:0] mem [2**A];
  logic [A:0]   wbin, rbin, wgray, rgray;
  logic [A:0]   rgray_w1, rgray_w2;   // read pointer in write domain
  logic [A:0]   wgray_r1, wgray_r2;   // write pointer in read domain
  logic [A:0]   wbin_n, rbin_n;

  function automatic logic [A:0] bin2gray(input logic [A:0] b);
    return b ^ (b >> 1);
  endfunction

  // ---------------- write domain
  assign full   = (wgray == {~rgray_w2[A:A-1], rgray_w2[A-2:0]});
  assign wbin_n = wbin + (A+1)'(wr_en && !full);

  always_ff @(posedge wclk) begin
    if (wr_en && !full) mem[wbin[A-1:0]] <= wdata;
  end

  always_ff @(posedge wclk or negedge wrst_n) begin
    if (!wrst_n) begin
      wbin     <= '0;
      wgray    <= '0;
      rgray_w1 <= '0;
      rgray_w2 <= '0;
    end else begin
      wbin     <= wbin_n;
      wgray    <= bin2gray(wbin_n);
      rgray_w1 <= rgray;
      rgray_w2 <= rgray_w1;
    end
  end

  // ---------------- read domain
  assign empty  = (rgray == wgray_r2);
  assign rdata  = mem[rbin[A-1:0]];
  assign rbin_n = rbin + (A+1)'(rd_en && !empty);

  always_ff @(posedge rclk or negedge rrst_n) begin
    if (!rrst_n) begin
      rbin     <= '0;
      rgray    <= '0;
      wgray_r1 <= '0;
      wgray_r2 <= '0;
    end else begin
      rbin     <= rbin_n;
      rgray    <= bin2gray(rbin_n);
      wgray_r1 <= wgray;
      wgray_r2 <= wgray_r1;
    end
  end
endmodule
