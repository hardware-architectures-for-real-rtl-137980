// gmm_pkg: types and constants shared by the Gaussian Mixture Model (GMM)
// background-identification circuit.
//
// Every pixel is modelled by K = 3 Gaussians. Each Gaussian carries four
// unsigned fixed-point parameters (Um,n: 2^m is the weight of the MSB, 2^-n
// the weight of the LSB):
//   weight    U-1,8   8 bits   (value = code / 256)
//   mean      U7,2   10 bits   (value = code / 4)
//   variance  U13,-3 11 bits   (value = code * 8, range 8..16376)
//   matchsum  U3,0    4 bits   (counter)
// With the 8-bit pixel this gives 3*33 + 8 = 107 bits per pixel.
// The word lengths are the published ones; the struct layout is this
// design's choice. Each module uses only some of these constants, so a lint
// run on one module reports the others as unused.
package gmm_pkg;
  localparam int unsigned NG      = 3;   // Gaussians per pixel
  localparam int unsigned PIX_W   = 8;
  localparam int unsigned W_W     = 8;
  localparam int unsigned MU_W    = 10;
  localparam int unsigned VAR_W   = 11;
  localparam int unsigned MSUM_W  = 4;
  localparam int unsigned SIG_W   = 10;  // sigma with 2 fractional bits
  localparam int unsigned SH_W    = 3;   // learning-rate shift, alpha = 2^-s
  localparam int unsigned IF_W    = 23;  // inverse fitness, var << up to 12

  typedef struct packed {
    logic [W_W-1:0]    w;
    logic [MU_W-1:0]   mu;
    logic [VAR_W-1:0]  var_;
    logic [MSUM_W-1:0] msum;
  } gauss_t;                            // 33 bits

  typedef gauss_t [NG-1:0] model_t;     // 99 bits, element k = Gaussian k+1
endpackage
