// tb_hd_video_top: end-to-end test of both designs in the top, at reduced
// sizes (16 x 8 video frames; 32 x 8 fluoroscopic frames, K = 3, 5 x 3
// window).
//
// Background identification chain: a model memory in the testbench (one
// three-Gaussian model per pixel, all zero at start) is read for each pixel
// and written back with the updated model, as the external model memory
// would be. The scene is a static textured background with noise and a
// bright square that moves from frame to frame. For each of the four
// morphological operations the chain is reset, the operation selected, and
// three frames streamed; every Fg/Bg decision and updated model is compared
// with the behavioural GMM reference, and every mask pixel with the
// reference morphology of the decisions.
//
// Fluoroscopic filter: as in the filter's own testbench (DDR2 model with
// random stalls, threshold table swapped in mid-run), then the memory is
// held off while pixels keep arriving, to force an input FIFO overflow.
//
// Mechanisms counted (each must happen at least once): GMM match update,
// no-match replacement, foreground and background decisions, each of the
// four operations, border pixels, memory reads, writes and stalls,
// threshold swap, border and not-yet-acquired masking, input overflow.
module tb_hd_video_top;
  import gmm_pkg::*;
  import gmm_ref_pkg::*;
  import morph_ref_pkg::*;
  localparam int W = 16, H = 8, NFG = 3;
  localparam int FM = 8, FN = 32, FX = 2, FY = 1, FK = 3, NFF = 4;
  localparam int FCB = 1, FBB = 1, FRB = 3;
  localparam int FFP = FM*FN;
  localparam int TIMEOUT_NS = 2000000;
  localparam int FIRST_MODE = 0, LAST_MODE = 3;
  `include "hd_top_body.svh"

  hd_video_top #(.IMG_W(W), .IMG_H(H), .FL_M(FM), .FL_N(FN), .FL_X(FX), .FL_Y(FY), .FL_K(FK),
                 .FL_COL_BITS(FCB), .FL_BANK_BITS(FBB), .FL_ROW_BITS(FRB)) dut (.*);
endmodule
