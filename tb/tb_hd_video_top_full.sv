// tb_hd_video_top_full: the end-to-end test of tb_hd_video_top with the top
// at its default sizes: two 1920 x 1080 video frames through the background
// identification and the closing operation, and two 1024 x 1024
// fluoroscopic frames through the K = 5, 7 x 7 filter with 17-bit burst
// addresses. Two frames are enough for every mechanism: the first video
// frame starts from empty models (no-match replacement everywhere), the
// second matches; both fluoroscopic frames have previous frames still
// missing. The other operations are covered at reduced size.
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
module tb_hd_video_top_full;
  import gmm_pkg::*;
  import gmm_ref_pkg::*;
  import morph_ref_pkg::*;
  localparam int W = 1920, H = 1080, NFG = 2;
  localparam int FM = 1024, FN = 1024, FX = 3, FY = 3, FK = 5, NFF = 2;
  localparam int FCB = 8, FBB = 3, FRB = 6;
  localparam int FFP = FM*FN;
  localparam int TIMEOUT_NS = 200000000;
  localparam int FIRST_MODE = 3, LAST_MODE = 3;
  `include "hd_top_body.svh"

  hd_video_top dut (.*);
endmodule
