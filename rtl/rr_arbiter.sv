// rr_arbiter: round-robin arbiter (RRA) of one output channel.
//
// While its channel is free (no packet in transfer and the next router's
// input can take a packet) the RRA grants the first request found at or after
// its ring priority pointer PTR. If the granted queue accepts, the channel
// state (STATE) becomes busy and records the connected queue, PTR moves to
// the position after that queue (the iSLIP pointer rule: only an accepted
// grant moves it), and MOD_DT is raised for the first flit to be read, which
// is the header. The tail flit leaving the channel frees it again.
//
// Grant by ring pointer, STATE and PTR follow the published allocator. The
// free condition (next router's PACK_WAIT high and CHAN_BUSY low) and the
// encoding of STATE are this design's choices.
//
// Timing: grant is combinational from req in the same cycle as the queue's
// accept; busy/conn/mod_dt are registered and valid from the next cycle.
module rr_arbiter #(
  parameter int unsigned N_REQ = 96,
  localparam int unsigned IW   = $clog2(N_REQ)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             init,
  input  logic [N_REQ-1:0] req,
  input  logic             chan_ready,  // next router can take a packet
  input  logic             accepted,    // the granted queue accepted
  input  logic             flit_rd,     // a flit was read for this channel
  input  logic             release_o,   // the tail flit was read
  output logic [N_REQ-1:0] grant,
  output logic             busy,        // STATE
  output logic [IW-1:0]    conn,        // connected queue
  output logic             mod_dt,      // next flit is the header
  output logic [IW-1:0]    ptr          // PTR
);
  logic [IW-1:0] gidx;
  logic          gany;

  // first request at or after ptr, wrapping round: search the requests at
  // or above ptr first, then all of them
  logic [N_REQ-1:0] upper;

  always_comb begin
    upper = req & ~((N_REQ'(1) << ptr) - N_REQ'(1));
    gidx  = '0;
    gany  = (req != '0);
    if (upper != '0) begin
      for (int k = N_REQ - 1; k >= 0; k--) if (upper[k]) gidx = IW'(k);
    end else begin
      for (int k = N_REQ - 1; k >= 0; k--) if (req[k]) gidx = IW'(k);
    end
  end

  always_comb begin
    grant = '0;
    if (!busy && chan_ready && gany) grant[gidx] = 1'b1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy   <= 1'b0;
      conn   <= '0;
      mod_dt <= 1'b0;
      ptr    <= '0;
    end else if (init) begin
      busy   <= 1'b0;
      mod_dt <= 1'b0;
      ptr    <= '0;
    end else if (!busy) begin
      if (grant != '0 && accepted) begin
        busy   <= 1'b1;
        conn   <= gidx;
        mod_dt <= 1'b1;
        ptr    <= (gidx == IW'(N_REQ - 1)) ? '0 : gidx + 1'b1;
      end
    end else begin
      if (flit_rd) mod_dt <= 1'b0;
      if (release_o) begin
        busy   <= 1'b0;
        mod_dt <= 1'b0;
      end
    end
  end
endmodule
