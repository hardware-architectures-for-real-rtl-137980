// fluoro_filter: real-time quantum-noise filter for fluoroscopic video
// (default 1024x1024 frames, 8-bit pixels, 7x7 spatial window over K = 5
// frames).
//
// Each output pixel is the average of those pixels of its spatio-temporal
// window whose grey level lies within +/-T of the current pixel, T being the
// noise threshold for the current grey level. Pixels across an edge or
// belonging to a moving object differ by more than T and are left out, so
// edges and motion are kept while noise is averaged away. The frame
// synchronizer fetches the K-1 previous frames from an external memory and
// builds the window, two threshold SRAMs hold T(luminance) (one in use, one
// writable), and the spatio-temporal filter forms the conditioned average.
// This partition is the published one.
//
// Interface: clk_pix domain: pix_in/pix_in_valid, thr_we/thr_addr/thr_data/
// thr_swap (threshold table update), pix_out/pix_out_valid, in_overflow, thr_active (bank in use);
// clk domain: the burst memory port (see frame_manager).
// Timing: one pixel per clk_pix; the output for a pixel appears once Y lines
// and X pixels of the following input have arrived, plus the memory and
// FIFO latency.
module fluoro_filter #(
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
  input  logic                 thr_we,
  input  logic [7:0]           thr_addr,
  input  logic [9:0]           thr_data,
  input  logic                 thr_swap,
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
  output logic [7:0]           pix_out,
  output logic                 pix_out_valid,
  output logic                 thr_active
);
  localparam int unsigned NW = K*(2*X+1)*(2*Y+1);

  logic       w_valid, frame_start;
  logic [7:0] win  [NW];
  logic       mask [NW];
  logic [7:0] pix_cur;
  logic [9:0] thr;

  frame_synchronizer #(.M(M), .N(N), .X(X), .Y(Y), .K(K), .COL_BITS(COL_BITS),
                       .BANK_BITS(BANK_BITS), .ROW_BITS(ROW_BITS)) u_sync (
    .clk, .rst_n, .clk_pix, .rst_pix_n, .pix_in, .pix_in_valid, .in_overflow,
    .mem_rd, .mem_wr, .mem_row, .mem_bank, .mem_col, .mem_wdata, .mem_be,
    .mem_ready, .mem_rdata, .mem_rvalid,
    .out_valid(w_valid), .win, .mask, .pix_cur, .frame_start
  );

  threshold_srams #(.TW(10)) u_thr (
    .clk(clk_pix), .rst_n(rst_pix_n), .we(thr_we), .waddr(thr_addr), .wdata(thr_data),
    .swap_req(thr_swap), .frame_start, .raddr(pix_cur), .thr, .active(thr_active)
  );

  st_filter #(.X(X), .Y(Y), .K(K), .TW(10)) u_filt (
    .clk(clk_pix), .rst_n(rst_pix_n), .in_valid(w_valid), .win, .mask, .pix_cur, .thr,
    .out_valid(pix_out_valid), .pix_out
  );
endmodule
