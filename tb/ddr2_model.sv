// ddr2_model: behavioural stand-in for the external DDR2 memory and its
// controller, as seen through the frame manager's burst port. It is a
// testbench model only (not synthesizable): an associative array of bursts
// of K-1 64-bit words, a request/ready handshake whose ready is withheld at
// random (STALL_PCT percent of clocks) to model refresh and bank conflicts,
// byte-masked writes, and reads that return a whole burst RL clocks after
// they are accepted, flagged by rvalid for one clock. Bursts never written
// read as zero. A testbench can set hold to refuse all requests. Counters
// of accepted reads, writes and stalled requests are public for the
// testbenches. Timing figures are this model's, not a real
// device's.
module ddr2_model #(
  parameter int unsigned K         = 5,
  parameter int unsigned COL_BITS  = 8,
  parameter int unsigned BANK_BITS = 3,
  parameter int unsigned ROW_BITS  = 6,
  parameter int unsigned RL        = 6,
  parameter int unsigned STALL_PCT = 20
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     mem_rd,
  input  logic                     mem_wr,
  input  logic [ROW_BITS-1:0]      mem_row,
  input  logic [BANK_BITS-1:0]     mem_bank,
  input  logic [COL_BITS-1:0]      mem_col,
  input  logic [64*(K-1)-1:0]      mem_wdata,
  input  logic [8*(K-1)-1:0]       mem_be,
  output logic                     mem_ready,
  output logic [64*(K-1)-1:0]      mem_rdata,
  output logic                     mem_rvalid
);
  localparam int unsigned AW = ROW_BITS + BANK_BITS + COL_BITS;

  logic [64*(K-1)-1:0] mem [logic [AW-1:0]];
  int                  n_rd = 0, n_wr = 0, n_stall = 0;
  int                  due [$];
  logic [64*(K-1)-1:0] dq  [$];
  int                  cyc = 0;
  bit                  hold = 0;   // set by a testbench: refuse every request

  always @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      mem_ready  <= 1'b0;
      mem_rvalid <= 1'b0;
      mem_rdata  <= '0;
    end else begin
      logic [AW-1:0] a;
      a   = {mem_row, mem_bank, mem_col};
      cyc = cyc + 1;
      if ((mem_rd || mem_wr) && !mem_ready) n_stall++;
      if (mem_rd && mem_ready) begin
        n_rd++;
        due.push_back(cyc + int'(RL));
        dq.push_back(mem.exists(a) ? mem[a] : '0);
      end
      if (mem_wr && mem_ready) begin
        logic [64*(K-1)-1:0] d;
        n_wr++;
        d = mem.exists(a) ? mem[a] : '0;
        for (int b = 0; b < 8*(K-1); b++)
          if (mem_be[b]) d[8*b +: 8] = mem_wdata[8*b +: 8];
        mem[a] = d;
      end
      mem_rvalid <= 1'b0;
      if (due.size() > 0 && due[0] <= cyc) begin
        void'(due.pop_front());
        mem_rvalid <= 1'b1;
        mem_rdata  <= dq.pop_front();
      end
      mem_ready <= !hold && ($urandom_range(0, 99) >= STALL_PCT);
    end
  end
endmodule
