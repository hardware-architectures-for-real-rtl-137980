// frame_manager: moves the fluoroscopic frames to and from the external DDR2
// memory so that every incoming pixel leaves together with the pixels at the
// same position in the K-1 previous frames.
//
// Memory layout (one burst = K-1 words of 64 bits): the burst at address g
// holds pixels 8g..8g+7 of the K-1 stored frames, frame f in word f mod (K-1).
// For every group of 8 incoming pixels the unit issues one burst read, which
// returns the 8 pixels of all K-1 stored frames, followed by one masked burst
// write that puts the 8 new pixels into the word of the oldest frame (which
// has just been read and is no longer needed). This is the published
// addressing scheme with frames per burst = K-1, the one of least hardware.
// Consecutive bursts fill the columns of a row, then the same row of the next
// bank, then the next row, which keeps row activations rare. The request/
// ready memory port and the double buffering (collecting the next group
// while the previous one is read, written and sent on) are this design's.
//
// Interface: pixel input pix/pix_valid/pix_ready (from the input FIFO);
// memory port mem_rd, mem_wr, mem_row/bank/col, mem_wdata, mem_be (byte
// enables), mem_ready (request accepted), mem_rdata/mem_rvalid; output
// cur/prev/out_valid/out_ready, prev[0] being the oldest frame.
// Timing: one read and one write per 8 pixels; each group leaves as 8
// consecutive outputs once its read data has returned.
module frame_manager #(
  parameter int unsigned K         = 5,
  parameter int unsigned FRAME_PIX = 1024*1024,
  parameter int unsigned COL_BITS  = 8,
  parameter int unsigned BANK_BITS = 3,
  parameter int unsigned ROW_BITS  = ($clog2(FRAME_PIX/8) > COL_BITS + BANK_BITS) ?
                                     $clog2(FRAME_PIX/8) - COL_BITS - BANK_BITS : 1
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic [7:0]               pix,
  input  logic                     pix_valid,
  output logic                     pix_ready,
  output logic                     mem_rd,
  output logic                     mem_wr,
  output logic [ROW_BITS-1:0]      mem_row,
  output logic [BANK_BITS-1:0]     mem_bank,
  output logic [COL_BITS-1:0]      mem_col,
  output logic [64*(K-1)-1:0]      mem_wdata,
  output logic [8*(K-1)-1:0]       mem_be,
  input  logic                     mem_ready,
  input  logic [64*(K-1)-1:0]      mem_rdata,
  input  logic                     mem_rvalid,
  output logic [7:0]               cur,
  output logic [7:0]               prev [K-1],
  output logic                     out_valid,
  input  logic                     out_ready
);
  localparam int unsigned NP       = K - 1;              // stored frames
  localparam int unsigned NG       = FRAME_PIX / 8;      // bursts per frame
  localparam int unsigned GW       = $clog2(NG);
  localparam int unsigned SW       = (NP > 1) ? $clog2(NP) : 1;

  typedef enum logic [1:0] {S_IDLE, S_READ, S_WAIT, S_WRITE} mstate_t;

  // ---------------- collect buffer
  logic [7:0] col_buf [8];
  logic [3:0] col_cnt;
  logic       col_full;
  logic       take;

  assign col_full  = (col_cnt == 4'd8);
  assign pix_ready = !col_full;
  assign take      = pix_valid && pix_ready;

  // ---------------- memory transaction state
  mstate_t        st;
  logic [GW-1:0]  g;          // burst address of the group in flight
  logic [SW-1:0]  slot;       // word of the current frame
  logic [7:0]     grp [8];    // group being written
  logic [64*NP-1:0] rbuf;

  // ---------------- emit buffer
  logic [7:0]     e_cur  [8];
  logic [7:0]     e_prev [8][NP];
  logic [3:0]     e_cnt;      // entries left to send
  logic [2:0]     e_idx;
  logic           e_free;

  assign e_free = (e_cnt == 4'd0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      col_cnt <= '0;
      st      <= S_IDLE;
      g       <= '0;
      slot    <= '0;
      e_cnt   <= '0;
      e_idx   <= '0;
    end else begin
      // collect 8 pixels
      if (take) begin
        col_buf[col_cnt[2:0]] <= pix;
        col_cnt <= col_cnt + 1'b1;
      end
      unique case (st)
        S_IDLE: if (col_full) begin
          grp     <= col_buf;
          col_cnt <= '0;
          st      <= S_READ;
        end
        S_READ:  if (mem_ready) st <= S_WAIT;
        S_WAIT:  if (mem_rvalid) begin
          rbuf <= mem_rdata;
          st   <= S_WRITE;
        end
        S_WRITE: if (mem_ready && e_free) begin
          // hand the group to the emit buffer
          for (int p = 0; p < 8; p++) begin
            e_cur[p] <= grp[p];
            for (int i = 0; i < NP; i++) begin
              // prev[i] is frame n-NP+i, stored in word (slot + i) mod NP
              e_prev[p][i] <= rbuf[64*((int'(slot) + i) % NP) + 8*p +: 8];
            end
          end
          e_cnt <= 4'd8;
          e_idx <= '0;
          st    <= S_IDLE;
          if (g == GW'(NG-1)) begin
            g    <= '0;
            slot <= (slot == SW'(NP-1)) ? '0 : slot + 1'b1;
          end else begin
            g <= g + 1'b1;
          end
        end
        default: st <= S_IDLE;
      endcase
      // emit
      if (out_valid && out_ready) begin
        e_cnt <= e_cnt - 1'b1;
        e_idx <= e_idx + 1'b1;
      end
    end
  end

  // ---------------- memory port
  always_comb begin
    mem_rd    = (st == S_READ);
    mem_wr    = (st == S_WRITE) && e_free;
    {mem_row, mem_bank, mem_col} = (ROW_BITS+BANK_BITS+COL_BITS)'(g);
    mem_wdata = '0;
    mem_be    = '0;
    for (int i = 0; i < NP; i++) begin
      if (SW'(i) == slot) begin
        for (int p = 0; p < 8; p++) mem_wdata[64*i + 8*p +: 8] = grp[p];
        mem_be[8*i +: 8] = 8'hFF;
      end
    end
  end

  // ---------------- output
  assign out_valid = !e_free;
  assign cur       = e_cur[e_idx];
  always_comb for (int i = 0; i < NP; i++) prev[i] = e_prev[e_idx][i];
endmodule
