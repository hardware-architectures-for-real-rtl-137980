// line_window: delay-line neighbourhood extractor for a raster-scan stream.
//
// ROWS rows of COLS flip-flops hold the ROWS x COLS window; between row r and
// row r+1 a FIFO of LINE-COLS-1 entries plus an output register (a circular RAM with one pointer) makes
// up the rest of an image line, so each row is exactly LINE pixels older than
// the one below it. Only the window sits in flip-flops, the remainder in
// RAM, as in the published delay-line circuits. win[0][0] is the oldest pixel
// (top-left of the window), win[ROWS-1][COLS-1] the pixel that entered last.
//
// Interface: en shifts din in (rst_n only clears the RAM pointer); win_nxt
// is the window that the next enabled edge will load (combinational); win is the registered window.
// Timing: win reflects all pixels accepted up to the previous clock edge.
module line_window #(
  parameter int unsigned PW   = 1,
  parameter int unsigned ROWS = 3,
  parameter int unsigned COLS = 3,
  parameter int unsigned LINE = 1920
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          en,
  input  logic [PW-1:0] din,
  output logic [PW-1:0] win     [ROWS][COLS],
  output logic [PW-1:0] win_nxt [ROWS][COLS]
);
  // a pixel spends COLS clocks in a row's flip-flops, FD in the RAM and one in
  // the RAM's output register: COLS + FD + 1 = LINE
  localparam int unsigned FD = LINE - COLS - 1;
  localparam int unsigned AW = (FD > 1) ? $clog2(FD) : 1;

  // row_in[r] feeds the newest column of window row r (r = ROWS-1 is newest)
  logic [PW-1:0] row_in [ROWS];
  logic [AW-1:0] ptr;

  assign row_in[ROWS-1] = din;

  // window as it will be after the current shift
  always_comb begin
    for (int r = 0; r < ROWS; r++) begin
      for (int c = 0; c < COLS-1; c++) win_nxt[r][c] = win[r][c+1];
      win_nxt[r][COLS-1] = row_in[r];
    end
  end

  always_ff @(posedge clk) begin
    if (en) begin
      for (int r = 0; r < ROWS; r++) begin
        win[r][COLS-1] <= row_in[r];
        for (int c = 0; c < COLS-1; c++) win[r][c] <= win[r][c+1];
      end
    end
  end

  // one shared pointer: all row FIFOs advance together
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  ptr <= '0;
    else if (en) ptr <= (ptr == AW'(FD-1)) ? '0 : ptr + 1'b1;
  end

  for (genvar r = 1; r < ROWS; r++) begin : g_fifo
    logic [PW-1:0] mem [FD];
    logic [PW-1:0] q;
    always_ff @(posedge clk) begin
      if (en) begin
        q        <= mem[ptr];
        mem[ptr] <= win[r][0];
      end
    end
    assign row_in[r-1] = q;
  end
endmodule
