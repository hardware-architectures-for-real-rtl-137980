// denoising_unit: morphological clean-up of the binary Fg/Bg stream produced
// by the background identification, one pixel per clock.
//
// Everything is built from dilation, using erosion(I) = NOT dilation(NOT I):
//   SEL1 SEL2  operation  first unit input  result
//    0    0    erosion    NOT Fg/Bg         NOT D1
//    1    0    dilation   Fg/Bg             D1
//    0    1    opening    NOT Fg/Bg         D2, with D2 = dilation(NOT D1)
//    1    1    closing    Fg/Bg             NOT D2
// Two Dilation units are chained so that opening and closing need no frame
// store. The table, the two units and the inversions are the published
// circuit; each Dilation keeps its own border counters here, where the
// published one shares them.
//
// Interface: in_valid, fgbg, se (9-bit structuring element), sel1, sel2 ->
// out_valid, bm (background mask). sel1/sel2 should only change between
// streams. Timing: IMG_W+1 input pixels plus one clock of latency per
// Dilation used; no stalls.
module denoising_unit #(
  parameter int unsigned IMG_W = 1920,
  parameter int unsigned IMG_H = 1080
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       in_valid,
  input  logic       fgbg,
  input  logic [8:0] se,
  input  logic       sel1,
  input  logic       sel2,
  output logic       out_valid,
  output logic       bm
);
  logic in1, d1, v1, in2, d2, v2, out1, out2;

  assign in1 = sel1 ? fgbg : ~fgbg;

  dilation #(.IMG_W(IMG_W), .IMG_H(IMG_H)) u_dil1 (
    .clk, .rst_n, .in_valid, .din(in1), .se, .out_valid(v1), .dout(d1)
  );

  assign out1 = sel1 ? d1 : ~d1;
  assign in2  = ~d1;

  dilation #(.IMG_W(IMG_W), .IMG_H(IMG_H)) u_dil2 (
    .clk, .rst_n, .in_valid(v1 & sel2), .din(in2), .se, .out_valid(v2), .dout(d2)
  );

  assign out2 = sel1 ? ~d2 : d2;

  assign bm        = sel2 ? out2 : out1;
  assign out_valid = sel2 ? v2 : v1;
endmodule
