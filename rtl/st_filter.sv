// st_filter: spatio-temporal conditioned average of fluoroscopic pixels.
//
// For the current pixel Pix_cur and its (2X+1)x(2Y+1)xK spatio-temporal
// window, every window pixel Pix_ref is accepted when
//     Pix_cur - T <= Pix_ref <= Pix_cur + T
// (the two bounds are formed once per pixel, so each comparison unit needs
// only two comparators). Accepted pixels are summed (16 bits) and counted
// (8 bits); Pix_out = sum * (1/count), where 1/count comes from an 18-bit
// table holding round(2^17/x), so the division is one multiplication. This
// structure and these widths are the published ones (at the default 7x7x5
// window: 245 pixels, 16-bit sum, 8-bit count, 256-entry table); here the
// sum, count and table grow with the window, and the table gains fraction
// bits (FRAC = max(17, clog2(2*255*NW))) so that its rounding stays below a
// quarter of an output step: K = 9 or 17 still divide correctly. A count
// of 0 cannot happen when the current pixel is in its own window; it passes
// Pix_cur through. A mask input removes
// window positions that lie outside the frame or belong to frames not yet
// acquired; the table scaling and the rounding of Pix_out are this design's.
//
// Interface: in_valid, win[NW], mask[NW], pix_cur, thr -> out_valid, pix_out.
// Timing: combinational datapath with a registered output, one pixel per
// clock, latency 1.
module st_filter #(
  parameter int unsigned X  = 3,
  parameter int unsigned Y  = 3,
  parameter int unsigned K  = 5,
  parameter int unsigned TW = 10
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          in_valid,
  input  logic [7:0]    win  [K*(2*X+1)*(2*Y+1)],
  input  logic          mask [K*(2*X+1)*(2*Y+1)],
  input  logic [7:0]    pix_cur,
  input  logic [TW-1:0] thr,
  output logic          out_valid,
  output logic [7:0]    pix_out
);
  localparam int unsigned NW    = K * (2*X+1) * (2*Y+1);
  localparam int unsigned SUM_W = $clog2(NW*255 + 1);
  localparam int unsigned CNT_W = $clog2(NW + 1);
  localparam int unsigned FRAC  = ($clog2(2*255*NW) > 17) ? $clog2(2*255*NW) : 17;
  localparam int unsigned RW    = FRAC + 1;

  typedef logic [RW-1:0] recip_t [NW+1];

  function automatic recip_t gen_recip();
    recip_t t;
    t[0] = '0;
    for (int x = 1; x <= NW; x++) t[x] = RW'(((64'd1 << FRAC) + 64'(x / 2)) / 64'(x));
    return t;
  endfunction

  localparam recip_t RECIP = gen_recip();

  logic signed [TW+1:0] lo, hi;
  logic [SUM_W-1:0]     sum;
  logic [CNT_W-1:0]     cnt;
  logic [RW-1:0]        r;
  logic [SUM_W+RW-1:0]  prod;
  logic [SUM_W+RW-1:0]  q;

  always_comb begin
    lo  = $signed({4'b0, pix_cur}) - $signed({2'b0, thr});
    hi  = $signed({4'b0, pix_cur}) + $signed({2'b0, thr});
    sum = '0;
    cnt = '0;
    for (int i = 0; i < NW; i++) begin
      logic c;
      c   = mask[i] && ($signed({4'b0, win[i]}) >= lo) && ($signed({4'b0, win[i]}) <= hi);
      sum = sum + (c ? SUM_W'(win[i]) : '0);
      cnt = cnt + CNT_W'(c);
    end
    r    = RECIP[cnt];
    prod = (SUM_W+RW)'(sum) * (SUM_W+RW)'(r);
    q    = (prod + ((SUM_W+RW)'(1) << (FRAC-1))) >> FRAC;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      pix_out   <= '0;
    end else begin
      out_valid <= in_valid;
      pix_out   <= (cnt == '0) ? pix_cur : ((q > (SUM_W+RW)'(255)) ? 8'd255 : 8'(q));
    end
  end
endmodule
