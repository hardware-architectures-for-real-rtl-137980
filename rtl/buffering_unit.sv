// buffering_unit: turns the K synchronised pixel streams (the current frame
// and the K-1 previous ones) into the spatio-temporal window needed by the
// filter: (2Y+1) rows x (2X+1) columns from each of the K frames.
//
// Each frame has its own data buffer, a line_window of 2Y+1 rows whose
// (2X+1)-pixel window sits in flip-flops while the rest of every line sits in
// RAM FIFOs, as in the published circuit. Two counters follow the position of
// the window centre; from them, and from a count of the frames seen so far,
// a mask marks the window positions that lie inside the frame and belong to a
// frame already acquired. How borders and the first K-1 frames are treated
// is not published; masking them out of the average is this design's choice.
//
// The registered windows of the line_windows (w_reg) are left unused: the
// outputs are taken from the windows after the accepting shift (win_nxt).
//
// Interface: in_valid, cur, prev[K-1] (prev[0] oldest) -> out_valid,
// win[K*(2Y+1)*(2X+1)] (index k*(2Y+1)*(2X+1) + r*(2X+1) + c, k = K-1 the
// current frame, r = 0 the oldest row, c = 0 the oldest column), mask,
// pix_cur (window centre of the current frame), frame_start.
// Timing: outputs are combinational from the accepted input and describe the
// window completed by it; the first centre is reached Y*N+X inputs after
// reset and frames stream back to back.
module buffering_unit #(
  parameter int unsigned M = 1024,
  parameter int unsigned N = 1024,
  parameter int unsigned X = 3,
  parameter int unsigned Y = 3,
  parameter int unsigned K = 5
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       in_valid,
  input  logic [7:0] cur,
  input  logic [7:0] prev [K-1],
  output logic       out_valid,
  output logic [7:0] win  [K*(2*X+1)*(2*Y+1)],
  output logic       mask [K*(2*X+1)*(2*Y+1)],
  output logic [7:0] pix_cur,
  output logic       frame_start
);
  localparam int unsigned R    = 2*Y + 1;
  localparam int unsigned C    = 2*X + 1;
  localparam int unsigned FILL = Y*N + X;
  localparam int unsigned XW   = $clog2(N);
  localparam int unsigned YW   = $clog2(M);
  localparam int unsigned FW   = $clog2(FILL + 1);
  localparam int unsigned KW   = $clog2(K);

  logic [7:0]    din   [K];
  logic [7:0]    w_reg [K][R][C];
  logic [7:0]    w_nxt [K][R][C];
  logic [FW-1:0] fill;
  logic          full;
  logic [XW-1:0] cx;
  logic [YW-1:0] cy;
  logic [KW-1:0] nfr;     // frames completed so far, saturating at K-1

  always_comb begin
    for (int k = 0; k < K-1; k++) din[k] = prev[k];
    din[K-1] = cur;
  end

  for (genvar k = 0; k < K; k++) begin : g_buf
    line_window #(.PW(8), .ROWS(R), .COLS(C), .LINE(N)) u_db (
      .clk, .rst_n, .en(in_valid), .din(din[k]), .win(w_reg[k]), .win_nxt(w_nxt[k])
    );
  end

  assign full = (fill == FW'(FILL));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      fill <= '0;
      cx   <= '0;
      cy   <= '0;
      nfr  <= '0;
    end else if (in_valid) begin
      if (!full) fill <= fill + 1'b1;
      else if (cx == XW'(N-1)) begin
        cx <= '0;
        if (cy == YW'(M-1)) begin
          cy <= '0;
          if (nfr != KW'(K-1)) nfr <= nfr + 1'b1;
        end else begin
          cy <= cy + 1'b1;
        end
      end else begin
        cx <= cx + 1'b1;
      end
    end
  end

  always_comb begin
    for (int k = 0; k < K; k++) begin
      for (int r = 0; r < R; r++) begin
        for (int c = 0; c < C; c++) begin
          int yy, xx;
          yy = int'(cy) + r - int'(Y);
          xx = int'(cx) + c - int'(X);
          win [k*R*C + r*C + c] = w_nxt[k][r][c];
          mask[k*R*C + r*C + c] = (yy >= 0) && (yy < int'(M)) && (xx >= 0) && (xx < int'(N))
                                  && (int'(nfr) >= K - 1 - k);
        end
      end
    end
    pix_cur     = w_nxt[K-1][Y][X];
    out_valid   = in_valid && full;
    frame_start = out_valid && (cx == '0) && (cy == '0);
  end
endmodule
