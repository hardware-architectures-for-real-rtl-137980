// threshold_srams: two 256-entry tables of the filter threshold T(luminance),
// i.e. a multiple of the noise standard deviation at each grey level.
//
// One table (the active bank) is read by the filter with the luminance of
// the current pixel; the other can be rewritten at any time through the
// write port. A swap request is held pending and takes effect at the next
// frame start, so the threshold curve changes between frames without
// stopping the filter. Two tables and the real-time update are the published
// scheme; the swap timing is this design's. The tables are RAMs without reset:
// both banks must be loaded (write, swap, write) before filtering starts.
//
// Interface: we/waddr/wdata write the inactive bank; swap_req asks to
// exchange banks; frame_start marks the first pixel of a frame; raddr -> thr.
// Timing: thr is combinational from raddr; a pending swap applies from the
// pixel that carries frame_start on (active follows one clock later).
module threshold_srams #(
  parameter int unsigned TW = 10
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          we,
  input  logic [7:0]    waddr,
  input  logic [TW-1:0] wdata,
  input  logic          swap_req,
  input  logic          frame_start,
  input  logic [7:0]    raddr,
  output logic [TW-1:0] thr,
  output logic          active
);
  logic [TW-1:0] bank0 [256];
  logic [TW-1:0] bank1 [256];
  logic          pending;
  logic          swap_now;

  assign swap_now = frame_start && (pending || swap_req);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      active  <= 1'b0;
      pending <= 1'b0;
    end else begin
      if (swap_now) begin
        active  <= ~active;
        pending <= 1'b0;
      end else if (swap_req) begin
        pending <= 1'b1;
      end
    end
  end

  // write port: always the bank that is not being read
  always_ff @(posedge clk) begin
    if (we) begin
      if (active) bank0[waddr] <= wdata;
      else        bank1[waddr] <= wdata;
    end
  end

  // the first pixel of a frame already reads the newly selected bank
  assign thr = (active ^ swap_now) ? bank1[raddr] : bank0[raddr];
endmodule
