// dlh_router: a router for a Double-Loop Hypercube (DLH) network with
// cut-through flow control.
//
// The router has N_CHAN = 12 full-duplex channels: eight hypercube dimensions,
// the loop channel to the other ring, the two ring directions L and R and the
// own processing node (numbering in dlh_pkg). Every input channel has an
// input buffer of NQ = 8 single-packet queues of DEPTH flits. A packet passes
// a three-stage pipeline:
//   1. flit write   - the flit is written into a queue of its input buffer;
//   2. routing, arbitration and path setting - for the header only: the
//      queue's arbiter requests outputs, the output round-robin arbiters grant
//      and the queue accepts one (one iSLIP iteration per cycle);
//   3. switch traversal - the flit crosses the crossbar, the header's dT is
//      rewritten, and the flit is loaded into the output register RG_OUT.
// Body and tail flits skip stage 2 and follow the header one per cycle; the
// tail releases the queue and the output channel. All queues connect to the
// crossbar directly, so one input buffer can feed several outputs at once.
//
// Interface, per channel c: the input link in_valid/in_data with the flow
// control outputs in_pack_wait (a queue waits for a packet), in_chan_busy (all
// queues busy), in_chan_load (one or two free) and in_data_ack (packet
// received); the output link out_valid/out_data and the state of the next
// router's input, ds_pack_wait/ds_chan_busy/ds_chan_load. A sender may start a
// packet only while PACK_WAIT is high and then sends all its flits. The own
// address register OWN_ADDRESS_RG is loaded from own_adr_in while init is high.
//
// Timing: a header written in cycle t (stage 1) is matched in t+1 (stage 2),
// read through the switch in t+2 (stage 3) and is on the output link in t+3;
// each later flit follows one cycle after the one before it.
//
// The structure, the channel and queue counts and the channel-state rules
// follow the published router. A single clock for all links, the queue depth,
// the flit type codes and the channel numbering are this design's choices.
module dlh_router
  import dlh_pkg::*;
#(
  parameter int unsigned NQ    = 8,
  parameter int unsigned DEPTH = 8,
  localparam int unsigned NQT  = N_CHAN * NQ,
  localparam int unsigned IW   = $clog2(NQT)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              init,
  input  dlh_adr_t          own_adr_in,
  // input links
  input  logic [N_CHAN-1:0] in_valid,
  input  flit_t             in_data [N_CHAN],
  output logic [N_CHAN-1:0] in_pack_wait,
  output logic [N_CHAN-1:0] in_chan_busy,
  output logic [N_CHAN-1:0] in_chan_load,
  output logic [N_CHAN-1:0] in_data_ack,
  output logic [N_CHAN-1:0] in_drop,
  // output links
  output logic [N_CHAN-1:0] out_valid,
  output flit_t             out_data [N_CHAN],
  input  logic [N_CHAN-1:0] ds_pack_wait,
  input  logic [N_CHAN-1:0] ds_chan_busy,
  input  logic [N_CHAN-1:0] ds_chan_load
);
  dlh_adr_t own;   // OWN_ADDRESS_RG

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    own <= '0;
    else if (init) own <= own_adr_in;
  end

  // flattened queue signals, index c*NQ+q
  flit_t          q_rd_data [NQT];
  flit_t          q_hdr     [NQT];
  logic [NQT-1:0] q_rd_en, q_cnt_equ, q_busy, q_hdr_valid, q_tail_rd, q_ovf;
  logic [NQT-1:0] q_matched;

  for (genvar c = 0; c < N_CHAN; c++) begin : g_in
    flit_t      rd_data [NQ];
    flit_t      hdr     [NQ];
    input_buffer #(.NQ(NQ), .DEPTH(DEPTH)) u_ib (
      .clk, .rst_n, .init,
      .valid_data (in_valid[c]),
      .data_in    (in_data[c]),
      .pack_wait  (in_pack_wait[c]),
      .chan_busy  (in_chan_busy[c]),
      .chan_load  (in_chan_load[c]),
      .data_ack   (in_data_ack[c]),
      .drop       (in_drop[c]),
      .q_rd_en    (q_rd_en[c*NQ +: NQ]),
      .q_rd_data  (rd_data),
      .q_cnt_equ  (q_cnt_equ[c*NQ +: NQ]),
      .q_busy     (q_busy[c*NQ +: NQ]),
      .q_hdr      (hdr),
      .q_hdr_valid(q_hdr_valid[c*NQ +: NQ]),
      .q_tail_rd  (q_tail_rd[c*NQ +: NQ]),
      .q_ovf      (q_ovf[c*NQ +: NQ])
    );
    for (genvar q = 0; q < NQ; q++) begin : g_q
      assign q_rd_data[c*NQ+q] = rd_data[q];
      assign q_hdr[c*NQ+q]     = hdr[q];
    end
  end

  // allocator
  logic [N_CHAN-1:0] o_busy, o_mod_dt, o_flit_rd, o_release, o_new_match;
  logic [IW-1:0]     o_conn [N_CHAN];
  logic [IW-1:0]     o_ptr  [N_CHAN];

  allocator #(.NQ(NQ)) u_alloc (
    .clk, .rst_n, .init, .own,
    .q_hdr_valid,
    .q_hdr,
    .q_release  (q_tail_rd),
    .q_matched,
    .ds_ready   (ds_pack_wait & ~ds_chan_busy),
    .ds_load    (ds_chan_load),
    .o_flit_rd,
    .o_release,
    .o_busy,
    .o_conn,
    .o_mod_dt,
    .o_ptr,
    .o_new_match
  );

  // switch
  flit_t             xb_data [N_CHAN];
  logic [N_CHAN-1:0] xb_empty;

  crossbar #(.N_IN(NQT), .N_OUT(N_CHAN)) u_xbar (
    .in_data  (q_rd_data),
    .in_empty (q_cnt_equ),
    .in_rd    (q_rd_en),
    .en       (o_busy),
    .sel      (o_conn),
    .out_rd   (o_flit_rd),
    .out_data (xb_data),
    .out_empty(xb_empty)
  );

  // output registers and link control
  for (genvar o = 0; o < N_CHAN; o++) begin : g_out
    output_channel #(.CH(o)) u_oc (
      .clk, .rst_n, .init, .own,
      .busy     (o_busy[o]),
      .mod_dt   (o_mod_dt[o]),
      .xb_data  (xb_data[o]),
      .xb_empty (xb_empty[o]),
      .flit_rd  (o_flit_rd[o]),
      .release_o(o_release[o]),
      .out_valid(out_valid[o]),
      .out_data (out_data[o])
    );
  end

  // a queue may be read by one output channel at a time, and no packet may
  // be longer than a queue
  logic conn_clash;
  always_comb begin
    conn_clash = 1'b0;
    for (int a = 0; a < N_CHAN; a++)
      for (int b = a + 1; b < N_CHAN; b++)
        if (o_busy[a] && o_busy[b] && o_conn[a] == o_conn[b]) conn_clash = 1'b1;
  end

  a_one_reader: assert property (@(posedge clk) disable iff (!rst_n) !conn_clash)
    else $error("one queue connected to two output channels");
  a_no_overflow: assert property (@(posedge clk) disable iff (!rst_n) q_ovf == '0)
    else $error("packet longer than a queue");
endmodule
