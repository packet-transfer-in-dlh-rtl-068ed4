// input_buffer: the input side of one router channel, a pool of NQ
// single-packet queues.
//
// Each queue takes one whole packet. The busy flags of the queues are copied
// every cycle into the register B_FIFO_STATUS (WR_B_RG is held high); a
// priority encoder picks the first free queue from it and a 3-to-8 decoder
// turns that into FIFO_SELECT, disabled by BUFF_BUSY when no queue is free.
// A packet may start when PACK_WAIT is high; its header goes to the selected
// queue, which is then latched for the rest of the packet, and every flit
// with VALID_DATA is steered there by the demultiplexer. The channel state
// reported upstream follows the published rule: CHAN_BUSY when all queues are
// busy, CHAN_LOAD when only one or two are free, both low when more than two
// are free. These parts follow the published input buffer.
//
// This design's own choices: one clock domain for both sides of the link;
// PACK_WAIT = a queue is free and no packet is being received; DATA_ACK is a
// one-cycle pulse in the cycle after the tail flit was written; a header that
// arrives while PACK_WAIT is low is dropped and counted on `drop`.
//
// Read side: every queue is exposed directly (rd_en, rd_data, header, state)
// so that any number of queues can be read in parallel through the crossbar.
module input_buffer
  import dlh_pkg::*;
#(
  parameter int unsigned NQ    = 8,
  parameter int unsigned DEPTH = 8
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            init,
  // link from the previous router
  input  logic            valid_data,
  input  flit_t           data_in,
  output logic            pack_wait,
  output logic            chan_busy,
  output logic            chan_load,
  output logic            data_ack,
  output logic            drop,
  // queue side
  input  logic [NQ-1:0]   q_rd_en,
  output flit_t           q_rd_data [NQ],
  output logic [NQ-1:0]   q_cnt_equ,
  output logic [NQ-1:0]   q_busy,
  output flit_t           q_hdr [NQ],
  output logic [NQ-1:0]   q_hdr_valid,
  output logic [NQ-1:0]   q_tail_rd,
  output logic [NQ-1:0]   q_ovf
);
  localparam int unsigned QW = $clog2(NQ);

  logic [NQ-1:0] b_fifo_status;   // B_FIFO_STATUS register
  logic [QW-1:0] sel;             // priority encoder output
  logic          any_free;
  logic          buff_busy;
  logic [NQ-1:0] fifo_select;     // decoder output
  logic          receiving;
  logic [QW-1:0] cur_q;
  logic [NQ-1:0] wr_en;
  logic          is_hdr, is_tail, start;
  logic [$clog2(NQ+1)-1:0] n_free;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) b_fifo_status <= '0;
    else        b_fifo_status <= q_busy;      // WR_B_RG = 1
  end

  prio_enc #(.N(NQ)) u_penc (.free(~b_fifo_status), .idx(sel), .any(any_free));

  assign buff_busy = !any_free;
  always_comb begin
    fifo_select = '0;
    if (!buff_busy) fifo_select[sel] = 1'b1;
  end

  always_comb begin
    n_free = '0;
    for (int i = 0; i < NQ; i++) n_free += {{($clog2(NQ+1)-1){1'b0}}, ~b_fifo_status[i]};
  end

  assign pack_wait = !receiving && !buff_busy;
  assign chan_busy = buff_busy;
  assign chan_load = (n_free == 1) || (n_free == 2);

  assign is_hdr  = valid_data && (flit_type(data_in) == TF_HEADER);
  assign is_tail = valid_data && (flit_type(data_in) == TF_TAIL);
  assign start   = is_hdr && pack_wait;
  assign drop    = is_hdr && !pack_wait;

  // demultiplexer
  always_comb begin
    wr_en = '0;
    if (start)                      wr_en = fifo_select;
    else if (receiving && valid_data) wr_en[cur_q] = 1'b1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      receiving <= 1'b0;
      cur_q     <= '0;
      data_ack  <= 1'b0;
    end else if (init) begin
      receiving <= 1'b0;
      data_ack  <= 1'b0;
    end else begin
      data_ack <= receiving && is_tail;
      if (start) begin
        receiving <= 1'b1;
        cur_q     <= sel;
      end else if (receiving && is_tail) begin
        receiving <= 1'b0;
      end
    end
  end

  for (genvar q = 0; q < NQ; q++) begin : g_q
    fifo_queue #(.DEPTH(DEPTH)) u_q (
      .clk, .rst_n, .init,
      .wr_en    (wr_en[q]),
      .wr_data  (data_in),
      .rd_en    (q_rd_en[q]),
      .rd_data  (q_rd_data[q]),
      .cnt_equ  (q_cnt_equ[q]),
      .busy     (q_busy[q]),
      .hdr      (q_hdr[q]),
      .hdr_valid(q_hdr_valid[q]),
      .tail_rd  (q_tail_rd[q]),
      .ovf      (q_ovf[q])
    );
  end
endmodule
