// gmm_trunc_mult: truncated N x N unsigned multiplier that delivers only the
// OUT_W most significant bits of the 2N-bit product (default 12 x 12 -> 15,
// 9 low bits discarded).
//
// The partial-product bits of the lowest DROP_COLS columns are never formed;
// GUARD columns between them and the first output column are kept to limit
// the error, and a constant equal to the expected value of the omitted bits
// (each is 1 with probability 1/4) plus half an output LSB is added before
// the low bits are dropped. The published circuit uses a truncated multiplier
// of the same size; this constant-correction scheme is this design's choice.
//
// Interface: a, b -> p ~= (a*b) >> (2N - OUT_W). Timing: combinational.
module gmm_trunc_mult #(
  parameter int unsigned N     = 12,
  parameter int unsigned OUT_W = 15,
  parameter int unsigned GUARD = 2
) (
  input  logic [N-1:0]     a,
  input  logic [N-1:0]     b,
  output logic [OUT_W-1:0] p
);
  localparam int unsigned LSB_DROP  = 2*N - OUT_W;
  localparam int unsigned DROP_COLS = (LSB_DROP > GUARD) ? LSB_DROP - GUARD : 0;
  // sum_{c<DROP_COLS} (c+1) 2^c / 4  =  ((DROP_COLS-1) 2^DROP_COLS + 1) / 4
  localparam longint unsigned CORR =
      (DROP_COLS == 0) ? 0 : (((longint'(DROP_COLS) - 1) << DROP_COLS) + 1) / 4;
  localparam longint unsigned RND  = (LSB_DROP == 0) ? 0 : (64'd1 << (LSB_DROP - 1));

  logic [2*N:0] acc;

  always_comb begin
    acc = (2*N+1)'(CORR + RND);
    for (int unsigned i = 0; i < N; i++)
      for (int unsigned j = 0; j < N; j++)
        if (i + j >= DROP_COLS)
          acc = acc + ((2*N+1)'(a[i] & b[j]) << (i + j));
    p = (acc[2*N:LSB_DROP] > (2*N+1-LSB_DROP)'({OUT_W{1'b1}})) ? {OUT_W{1'b1}} : OUT_W'(acc[2*N:LSB_DROP]);
  end
endmodule
