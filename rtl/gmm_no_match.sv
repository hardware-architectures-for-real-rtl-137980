// gmm_no_match: replacement Gaussian used when the pixel matches none of the
// three Gaussians: mean = pixel, variance = VINIT, matchsum = 1 and
// weight = 1/msumtot, msumtot being the summed matchsum of the two Gaussians
// of highest fitness.
//
// 1/msumtot is approximated, as in the published optimized circuit, by four
// straight segments z_i = lambda_i - eta_i * msumtot with eta_i a power of
// two (a shift), replacing a ROM. The segment edges and lambda_i values are
// this design's fit: [1,3) 384-128x, [3,9) 100-8x, [9,24) 35-x,
// [24,63] 12-x/8, all scaled by 256 (weight format U-1,8) and limited to
// 255. msumtot = 0 is treated as 1. VINIT has no published value.
// var_nm, msum_nm and the fraction bits of mu_nm are constants and the rest
// of mu_nm is the pixel itself; only w_nm is computed.
//
// Interface: pixel, msumtot (6 bits) -> w_nm, mu_nm, var_nm, msum_nm.
// Timing: combinational.
module gmm_no_match
  import gmm_pkg::*;
#(
  parameter logic [VAR_W-1:0] VINIT = 11'd112
) (
  input  logic [PIX_W-1:0]  pixel,
  input  logic [5:0]        msumtot,
  output logic [W_W-1:0]    w_nm,
  output logic [MU_W-1:0]   mu_nm,
  output logic [VAR_W-1:0]  var_nm,
  output logic [MSUM_W-1:0] msum_nm
);
  logic [5:0]      x;
  logic [9:0]      z;

  always_comb begin
    x = (msumtot == 6'd0) ? 6'd1 : msumtot;
    if (x < 6'd3)       z = 10'd384 - 10'({x, 7'b0});      // eta = 2^7
    else if (x < 6'd9)  z = 10'd100 - 10'({x, 3'b0});   // eta = 2^3
    else if (x < 6'd24) z = 10'd35  - 10'(x);           // eta = 2^0
    else                z = 10'd12  - 10'(x >> 3);      // eta = 2^-3
    w_nm    = (z > 10'd255) ? 8'd255 : W_W'(z);
    mu_nm   = {pixel, 2'b00};
    var_nm  = VINIT;
    msum_nm = MSUM_W'(1);
  end
endmodule
