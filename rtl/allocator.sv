// allocator: the router's routing and arbitration unit.
//
// One local arbiter per input queue (N_CHAN x NQ of them) and one round-robin
// arbiter per output channel (N_CHAN) work in parallel and perform one iSLIP
// request-grant-accept iteration every clock cycle: unmatched queues holding a
// header request all outputs their packet may take, every free output grants
// one request by its round-robin pointer, and every queue accepts at most one
// grant. Zero, one or several queue-output pairs can be formed in one cycle.
// The structure follows the published allocator; queue q of input channel c
// has the global index c*NQ+q.
//
// Timing: requests, grants and accepts settle within the cycle; a pair formed
// in cycle t shows as o_busy/o_conn/o_mod_dt from cycle t+1.
module allocator
  import dlh_pkg::*;
#(
  parameter int unsigned NQ   = 8,
  localparam int unsigned NQT = N_CHAN * NQ,
  localparam int unsigned IW  = $clog2(NQT)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              init,
  input  dlh_adr_t          own,
  // input queues
  input  logic [NQT-1:0]    q_hdr_valid,
  input  flit_t             q_hdr [NQT],
  input  logic [NQT-1:0]    q_release,
  output logic [NQT-1:0]    q_matched,
  // output channels
  input  logic [N_CHAN-1:0] ds_ready,
  input  logic [N_CHAN-1:0] ds_load,
  input  logic [N_CHAN-1:0] o_flit_rd,
  input  logic [N_CHAN-1:0] o_release,
  output logic [N_CHAN-1:0] o_busy,
  output logic [IW-1:0]     o_conn [N_CHAN],
  output logic [N_CHAN-1:0] o_mod_dt,
  output logic [IW-1:0]     o_ptr [N_CHAN],
  output logic [N_CHAN-1:0] o_new_match       // a pair was formed this cycle
);
  logic [N_CHAN-1:0] req_q    [NQT];
  logic [N_CHAN-1:0] acc_q    [NQT];
  logic [N_CHAN-1:0] grant_q  [NQT];
  logic [NQT-1:0]    req_o    [N_CHAN];
  logic [NQT-1:0]    grant_o  [N_CHAN];
  logic [N_CHAN-1:0] accepted;

  for (genvar q = 0; q < NQT; q++) begin : g_qarb
    queue_arbiter u_arb (
      .clk, .rst_n, .init,
      .hdr_valid (q_hdr_valid[q]),
      .hdr       (q_hdr[q]),
      .own,
      .grant     (grant_q[q]),
      .ds_load,
      .release_q (q_release[q]),
      .req       (req_q[q]),
      .accept    (acc_q[q]),
      .matched   (q_matched[q])
    );
  end

  // transpose requests, grants and accepts between the two arbiter sets
  always_comb begin
    for (int o = 0; o < N_CHAN; o++)
      for (int q = 0; q < NQT; q++)
        req_o[o][q] = req_q[q][o];
  end

  always_comb begin
    for (int q = 0; q < NQT; q++)
      for (int o = 0; o < N_CHAN; o++)
        grant_q[q][o] = grant_o[o][q];
  end

  always_comb begin
    for (int o = 0; o < N_CHAN; o++) begin
      accepted[o] = 1'b0;
      for (int q = 0; q < NQT; q++)
        accepted[o] = accepted[o] | (acc_q[q][o] & grant_o[o][q]);
    end
  end

  for (genvar o = 0; o < N_CHAN; o++) begin : g_rra
    rr_arbiter #(.N_REQ(NQT)) u_rra (
      .clk, .rst_n, .init,
      .req        (req_o[o]),
      .chan_ready (ds_ready[o]),
      .accepted   (accepted[o]),
      .flit_rd    (o_flit_rd[o]),
      .release_o  (o_release[o]),
      .grant      (grant_o[o]),
      .busy       (o_busy[o]),
      .conn       (o_conn[o]),
      .mod_dt     (o_mod_dt[o]),
      .ptr        (o_ptr[o])
    );
  end

  assign o_new_match = accepted;
endmodule
