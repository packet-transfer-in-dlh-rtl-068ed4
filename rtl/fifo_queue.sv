// fifo_queue: one single-packet queue of an input buffer.
//
// The queue holds exactly one packet of at most DEPTH flits (L+2: a header,
// up to L body flits and a tail). A write counter (CNT_WR) and its decoder
// choose the flit register to write; a read counter (CNT_RD) and a
// multiplexer present the flit to be read; CNT_EQU is high when both counters
// are equal, i.e. nothing is left to read. The busy flag B is set by the
// first write of a packet and cleared, together with both counters (CLR_FIFO),
// when the tail flit is read out, so the queue is then free for the next
// packet. Reading and writing may happen in the same cycle, so a packet can
// leave while it is still arriving (cut-through).
//
// These parts follow the published queue structure. Single clock domain: the
// sender's EXT_CLK strobe is folded into `wr_en` (VALID_DATA and the queue's
// FIFO_SELECT), which is this design's choice. A write beyond DEPTH flits is
// dropped and flagged on `ovf` (the published queue only says a packet must
// fit). Reset and `init` clear the queue like CLR_FIFO.
//
// Timing: a flit written in cycle t is readable (rd_data) from cycle t+1.
// rd_data is combinational from CNT_RD.
module fifo_queue
  import dlh_pkg::*;
#(
  parameter int unsigned DEPTH = 8
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  init,        // INIT: clears the queue
  input  logic  wr_en,       // RTR_WR: VALID_DATA & WR_FIFO_EN
  input  flit_t wr_data,
  input  logic  rd_en,       // FLT_RD
  output flit_t rd_data,
  output logic  cnt_equ,     // CNT_RD == CNT_WR: nothing to read
  output logic  busy,        // flag B
  output flit_t hdr,         // the header register (first flit)
  output logic  hdr_valid,   // a header flit is held
  output logic  tail_rd,     // the tail is read this cycle (releases the queue)
  output logic  ovf          // a write found the queue full
);
  localparam int unsigned CW = $clog2(DEPTH + 1);

  flit_t            mem [DEPTH];
  logic [CW-1:0]    cnt_wr, cnt_rd;
  logic             full;

  assign full    = (cnt_wr == CW'(DEPTH));
  assign cnt_equ = (cnt_wr == cnt_rd);
  assign rd_data = cnt_equ ? flit_t'(0) : mem[cnt_rd[$clog2(DEPTH)-1:0]];
  assign hdr     = mem[0];
  assign hdr_valid = busy && (cnt_wr != '0) && (flit_type(mem[0]) == TF_HEADER);
  assign tail_rd = rd_en && !cnt_equ && (flit_type(rd_data) == TF_TAIL);
  assign ovf     = wr_en && full;

  // counters and busy flag (the control automaton)
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt_wr <= '0;
      cnt_rd <= '0;
      busy   <= 1'b0;
    end else if (init || tail_rd) begin
      cnt_wr <= '0;
      cnt_rd <= '0;
      busy   <= 1'b0;
    end else begin
      if (wr_en && !full) begin
        cnt_wr <= cnt_wr + 1'b1;
        busy   <= 1'b1;
      end
      if (rd_en && !cnt_equ)
        cnt_rd <= cnt_rd + 1'b1;
    end
  end

  // flit registers, written through the decoder DC
  always_ff @(posedge clk) begin
    if (wr_en && !full)
      mem[cnt_wr[$clog2(DEPTH)-1:0]] <= wr_data;
  end
endmodule
