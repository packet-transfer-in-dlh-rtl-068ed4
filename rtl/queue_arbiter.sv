// queue_arbiter: the local arbiter (ARB) of one input queue.
//
// When the queue holds a header that is not yet matched, the arbiter sends
// requests to the output round-robin arbiters: only to the own-node channel
// when the destination equals the router's address, otherwise one request for
// each high bit of the mismatch field dT. Of the grants that come back in the
// same cycle it accepts one by fixed priority: a channel whose next router
// reports a lightly loaded input (CHAN_LOAD low) first, then the lowest
// channel number. After an accept the queue is matched and stops requesting
// until its tail flit has been read out (`release`).
//
// The request rule and the use of the neighbours' load follow the published
// text. The mapping of dT bits to channels, masking the ring requests with the
// own comparators (a ring move is wanted only while the ring or the hypercube
// address still differs) and the tie-break by channel number are this
// design's choices. Combinational request/accept; `matched` is registered.
module queue_arbiter
  import dlh_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic              init,
  input  logic              hdr_valid,
  input  flit_t             hdr,
  input  dlh_adr_t          own,
  input  logic [N_CHAN-1:0] grant,
  input  logic [N_CHAN-1:0] ds_load,    // CHAN_LOAD of the next routers
  input  logic              release_q,  // tail read: path released
  output logic [N_CHAN-1:0] req,
  output logic [N_CHAN-1:0] accept,
  output logic              matched
);
  dlh_header_t h;
  logic loop_eq, lr_eq, bch_eq, hit;
  logic [N_CHAN-1:0] route, g_light;

  assign h = dlh_header_t'(hdr);

  header_compare u_cmp (.dest(h.dest), .own, .loop_eq, .lr_eq, .bch_eq, .hit);

  always_comb begin
    route = '0;
    if (hit) begin
      route[CH_LOCAL] = 1'b1;
    end else begin
      route[BCH_W-1:0] = h.dt.dif_bch;
      route[CH_LOOP]   = h.dt.loop & ~loop_eq;
      route[CH_L]      = h.dt.l & ~lr_eq;
      route[CH_R]      = h.dt.r & ~lr_eq;
    end
  end

  assign req = (hdr_valid && !matched) ? route : '0;

  // fixed-priority accept
  assign g_light = grant & req & ~ds_load;
  always_comb begin
    accept = '0;
    if (g_light != '0) begin
      for (int i = N_CHAN - 1; i >= 0; i--) if (g_light[i]) accept = N_CHAN'(1) << i;
    end else begin
      for (int i = N_CHAN - 1; i >= 0; i--) if (grant[i] && req[i]) accept = N_CHAN'(1) << i;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                matched <= 1'b0;
    else if (init || release_q) matched <= 1'b0;
    else if (accept != '0)     matched <= 1'b1;
  end
endmodule
