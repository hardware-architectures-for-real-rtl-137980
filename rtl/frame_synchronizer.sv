// frame_synchronizer: aligns each incoming fluoroscopic pixel with the
// pixels at the same place in the K-1 previous frames and builds the
// spatio-temporal window around it.
//
// Pixels arrive on clk_pix and cross to the memory-side clock clk through an
// input FIFO; the frame manager stores them in, and fetches the K-1 previous
// frames from, the external memory; the current stream (8 bits) and the
// previous streams (8*(K-1) bits) return to clk_pix through two more FIFOs
// and feed the buffering unit. The three dual-clock FIFOs and the split into
// frame manager and buffering unit are the published structure. in_overflow
// reports a pixel lost because the input FIFO was full, which the published
// design avoids by FIFO sizing and this design makes visible.
//
// Interface: clk_pix side pix_in/pix_in_valid and the window outputs;
// clk side the memory port. Timing: the window for a pixel appears after the
// FIFO crossings, the memory round trip and Y*N+X further pixels.
module frame_synchronizer #(
  parameter int unsigned M         = 1024,
  parameter int unsigned N         = 1024,
  parameter int unsigned X         = 3,
  parameter int unsigned Y         = 3,
  parameter int unsigned K         = 5,
  parameter int unsigned COL_BITS  = 8,
  parameter int unsigned BANK_BITS = 3,
  parameter int unsigned ROW_BITS  = ($clog2(M*N/8) > COL_BITS + BANK_BITS) ?
                                     $clog2(M*N/8) - COL_BITS - BANK_BITS : 1
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 clk_pix,
  input  logic                 rst_pix_n,
  input  logic [7:0]           pix_in,
  input  logic                 pix_in_valid,
  output logic                 in_overflow,
  output logic                 mem_rd,
  output logic                 mem_wr,
  output logic [ROW_BITS-1:0]  mem_row,
  output logic [BANK_BITS-1:0] mem_bank,
  output logic [COL_BITS-1:0]  mem_col,
  output logic [64*(K-1)-1:0]  mem_wdata,
  output logic [8*(K-1)-1:0]   mem_be,
  input  logic                 mem_ready,
  input  logic [64*(K-1)-1:0]  mem_rdata,
  input  logic                 mem_rvalid,
  output logic                 out_valid,
  output logic [7:0]           win  [K*(2*X+1)*(2*Y+1)],
  output logic                 mask [K*(2*X+1)*(2*Y+1)],
  output logic [7:0]           pix_cur,
  output logic                 frame_start
);
  // input FIFO: clk_pix -> clk
  logic       if_full, if_empty, fm_ready;
  logic [7:0] if_data;

  async_fifo #(.W(8), .DEPTH_LOG2(4)) u_in_fifo (
    .wclk(clk_pix), .wrst_n(rst_pix_n), .wr_en(pix_in_valid), .wdata(pix_in), .full(if_full),
    .rclk(clk), .rrst_n(rst_n), .rd_en(fm_ready), .rdata(if_data), .empty(if_empty)
  );

  assign in_overflow = pix_in_valid && if_full;

  // frame manager (clk)
  logic [7:0] fm_cur;
  logic [7:0] fm_prev [K-1];
  logic       fm_valid, fm_out_ready;
  logic       cf_full, pf_full;
  logic [8*(K-1)-1:0] fm_prev_flat;

  frame_manager #(.K(K), .FRAME_PIX(M*N), .COL_BITS(COL_BITS), .BANK_BITS(BANK_BITS),
                 .ROW_BITS(ROW_BITS)) u_fm (
    .clk, .rst_n, .pix(if_data), .pix_valid(!if_empty), .pix_ready(fm_ready),
    .mem_rd, .mem_wr, .mem_row, .mem_bank, .mem_col, .mem_wdata, .mem_be,
    .mem_ready, .mem_rdata, .mem_rvalid,
    .cur(fm_cur), .prev(fm_prev), .out_valid(fm_valid), .out_ready(fm_out_ready)
  );

  assign fm_out_ready = !cf_full && !pf_full;
  always_comb for (int i = 0; i < K-1; i++) fm_prev_flat[8*i +: 8] = fm_prev[i];

  // current stream and previous streams: clk -> clk_pix
  logic       cf_empty, pf_empty, pop;
  logic [7:0] cf_data;
  logic [8*(K-1)-1:0] pf_data;
  logic [7:0] bu_prev [K-1];

  async_fifo #(.W(8), .DEPTH_LOG2(4)) u_cur_fifo (
    .wclk(clk), .wrst_n(rst_n), .wr_en(fm_valid && fm_out_ready), .wdata(fm_cur), .full(cf_full),
    .rclk(clk_pix), .rrst_n(rst_pix_n), .rd_en(pop), .rdata(cf_data), .empty(cf_empty)
  );

  async_fifo #(.W(8*(K-1)), .DEPTH_LOG2(4)) u_prev_fifo (
    .wclk(clk), .wrst_n(rst_n), .wr_en(fm_valid && fm_out_ready), .wdata(fm_prev_flat), .full(pf_full),
    .rclk(clk_pix), .rrst_n(rst_pix_n), .rd_en(pop), .rdata(pf_data), .empty(pf_empty)
  );

  assign pop = !cf_empty && !pf_empty;
  always_comb for (int i = 0; i < K-1; i++) bu_prev[i] = pf_data[8*i +: 8];

  // buffering unit (clk_pix)
  buffering_unit #(.M(M), .N(N), .X(X), .Y(Y), .K(K)) u_bu (
    .clk(clk_pix), .rst_n(rst_pix_n), .in_valid(pop), .cur(cf_data), .prev(bu_prev),
    .out_valid, .win, .mask, .pix_cur, .frame_start
  );
endmodule
