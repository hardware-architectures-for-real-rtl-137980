// hd_video_top: the three real-time video circuits side by side.
//
//  * Background identification chain: the GMM circuit (fgbg_optimized)
//    classifies every pixel of an HD stream as foreground or background
//    while updating the pixel's statistical model, and the morphological
//    denoising unit cleans the resulting binary mask. The per-pixel model
//    (99 bits) lives in an external memory; it enters on model_in together
//    with the pixel and the updated model leaves on model_out.
//  * Fluoroscopic filter (fluoro_filter): spatio-temporal conditioned
//    average of 1024x1024 X-ray frames using an external burst memory for
//    the K-1 previous frames.
// The two parts share nothing; each has its own clocks and ports. Cascading
// GMM and denoising is the published system; putting the fluoroscopic filter
// in the same top only gathers the published circuits in one place.
//
// Timing: the GMM returns tag and model 2 clocks after the input; the
// denoised mask follows IMG_W+1 tags (plus one clock) later per Dilation
// unit used. See fluoro_filter for the other part.
module hd_video_top
  import gmm_pkg::*;
#(
  parameter int unsigned IMG_W        = 1920,
  parameter int unsigned IMG_H        = 1080,
  parameter int unsigned FL_M         = 1024,
  parameter int unsigned FL_N         = 1024,
  parameter int unsigned FL_X         = 3,
  parameter int unsigned FL_Y         = 3,
  parameter int unsigned FL_K         = 5,
  parameter int unsigned FL_COL_BITS  = 8,
  parameter int unsigned FL_BANK_BITS = 3,
  parameter int unsigned FL_ROW_BITS  = ($clog2(FL_M*FL_N/8) > FL_COL_BITS + FL_BANK_BITS) ?
                                        $clog2(FL_M*FL_N/8) - FL_COL_BITS - FL_BANK_BITS : 1
) (
  // ---------------- background identification chain
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    in_valid,
  input  logic [7:0]              pix,
  input  model_t                  model_in,
  output logic                    model_valid,
  output model_t                  model_out,
  output logic                    fgbg,
  input  logic [8:0]              se,
  input  logic                    sel1,
  input  logic                    sel2,
  output logic                    bm_valid,
  output logic                    bm,
  // ---------------- fluoroscopic filter
  input  logic                    fl_clk,
  input  logic                    fl_rst_n,
  input  logic                    fl_clk_pix,
  input  logic                    fl_rst_pix_n,
  input  logic [7:0]              fl_pix_in,
  input  logic                    fl_pix_in_valid,
  output logic                    fl_in_overflow,
  input  logic                    fl_thr_we,
  input  logic [7:0]              fl_thr_addr,
  input  logic [9:0]              fl_thr_data,
  input  logic                    fl_thr_swap,
  output logic                    fl_thr_active,
  output logic                    fl_mem_rd,
  output logic                    fl_mem_wr,
  output logic [FL_ROW_BITS-1:0]  fl_mem_row,
  output logic [FL_BANK_BITS-1:0] fl_mem_bank,
  output logic [FL_COL_BITS-1:0]  fl_mem_col,
  output logic [64*(FL_K-1)-1:0]  fl_mem_wdata,
  output logic [8*(FL_K-1)-1:0]   fl_mem_be,
  input  logic                    fl_mem_ready,
  input  logic [64*(FL_K-1)-1:0]  fl_mem_rdata,
  input  logic                    fl_mem_rvalid,
  output logic [7:0]              fl_pix_out,
  output logic                    fl_pix_out_valid
);
  fgbg_optimized u_gmm (
    .clk, .rst_n, .in_valid, .pixel(pix), .model_in,
    .out_valid(model_valid), .fgbg, .model_out
  );

  denoising_unit #(.IMG_W(IMG_W), .IMG_H(IMG_H)) u_denoise (
    .clk, .rst_n, .in_valid(model_valid), .fgbg, .se, .sel1, .sel2,
    .out_valid(bm_valid), .bm
  );

  fluoro_filter #(.M(FL_M), .N(FL_N), .X(FL_X), .Y(FL_Y), .K(FL_K), .COL_BITS(FL_COL_BITS),
                  .BANK_BITS(FL_BANK_BITS), .ROW_BITS(FL_ROW_BITS)) u_fluoro (
    .clk(fl_clk), .rst_n(fl_rst_n), .clk_pix(fl_clk_pix), .rst_pix_n(fl_rst_pix_n),
    .pix_in(fl_pix_in), .pix_in_valid(fl_pix_in_valid), .in_overflow(fl_in_overflow),
    .thr_we(fl_thr_we), .thr_addr(fl_thr_addr), .thr_data(fl_thr_data), .thr_swap(fl_thr_swap),
    .mem_rd(fl_mem_rd), .mem_wr(fl_mem_wr), .mem_row(fl_mem_row), .mem_bank(fl_mem_bank),
    .mem_col(fl_mem_col), .mem_wdata(fl_mem_wdata), .mem_be(fl_mem_be), .mem_ready(fl_mem_ready),
    .mem_rdata(fl_mem_rdata), .mem_rvalid(fl_mem_rvalid),
    .pix_out(fl_pix_out), .pix_out_valid(fl_pix_out_valid), .thr_active(fl_thr_active)
  );
endmodule
