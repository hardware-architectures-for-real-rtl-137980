// dilation: binary dilation of a raster-scan Fg/Bg stream with a 3x3
// structuring element (SE) given as an input, one pixel per clock.
//
// A line_window (3 rows of 3 flip-flops plus two line FIFOs) holds the 3x3
// neighbourhood of the centre pixel. Each neighbour is ANDed with its SE bit
// and the nine products are ORed. Frame borders need no padding and no stall:
// two counters track the centre pixel's column and row, and comparators force
// to 0 the products of neighbours that lie outside the frame, which is the
// published boundary technique. SE_{r,c} (bit 3(r-1)+(c-1) of se) pairs with
// the pixel at row offset r-2 and column offset c-2 from the centre, so
// SE_{1,1} meets the oldest pixel, as drawn in the published delay-line
// figure.
//
// The registered window output of line_window is left unused: the OR is
// formed on the window as it is after the accepting shift (win_nxt), so the
// result can be registered in the same clock.
//
// Interface: in_valid/din in, out_valid/dout out; se is applied in the
// clock in which the input completing a window is accepted, so a new SE for
// a frame must be presented with that frame's input pixel (1,1).
// Timing: the result for pixel (y,x) leaves one clock after pixel (y+1,x+1)
// is accepted, i.e. IMG_W+1 input pixels plus one clock later. Frames follow
// each other without gaps; a stream's tail is flushed by IMG_W+1 more inputs.
module dilation #(
  parameter int unsigned IMG_W = 1920,
  parameter int unsigned IMG_H = 1080
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       in_valid,
  input  logic       din,
  input  logic [8:0] se,
  output logic       out_valid,
  output logic       dout
);
  localparam int unsigned XW = $clog2(IMG_W);
  localparam int unsigned YW = $clog2(IMG_H);
  localparam int unsigned FILL = IMG_W + 1;   // inputs before the first centre

  logic [0:0]  win [3][3];
  logic [0:0]  nxt [3][3];  // window after this input: [0][0] oldest
  logic [XW-1:0] cx;       // centre of the window completed by the next input
  logic [YW-1:0] cy;
  logic [$clog2(FILL+1)-1:0] fill;
  logic          full;

  line_window #(.PW(1), .ROWS(3), .COLS(3), .LINE(IMG_W)) u_win (
    .clk, .rst_n, .en(in_valid), .din, .win, .win_nxt(nxt)
  );

  assign full = (fill == ($clog2(FILL+1))'(FILL));

  // fill counter, then centre-position counters (advance with each input)
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      fill <= '0;
      cx   <= '0;
      cy   <= '0;
    end else if (in_valid) begin
      if (!full) fill <= fill + 1'b1;
      if (full) begin
        if (cx == XW'(IMG_W-1)) begin
          cx <= '0;
          cy <= (cy == YW'(IMG_H-1)) ? '0 : cy + 1'b1;
        end else begin
          cx <= cx + 1'b1;
        end
      end
    end
  end

  logic       ok_row [3];
  logic       ok_col [3];
  logic       acc;

  always_comb begin
    ok_row[0] = (cy != '0);
    ok_row[1] = 1'b1;
    ok_row[2] = (cy != YW'(IMG_H-1));
    ok_col[0] = (cx != '0);
    ok_col[1] = 1'b1;
    ok_col[2] = (cx != XW'(IMG_W-1));
    acc = 1'b0;
    for (int r = 0; r < 3; r++)
      for (int c = 0; c < 3; c++)
        acc |= nxt[r][c][0] & se[3*r+c] & ok_row[r] & ok_col[c];
  end

  // (cx, cy) is the centre of the window formed by the input being accepted
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      dout      <= 1'b0;
    end else begin
      out_valid <= in_valid && full;
      dout      <= acc;
    end
  end
endmodule
