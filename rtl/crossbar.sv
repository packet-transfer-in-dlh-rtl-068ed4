// crossbar: the router's switch between input queues and output channels.
//
// Every output channel that is connected to a queue (crossbar control from
// the allocator: en and sel) sees that queue's current flit and its empty
// flag, and its read strobe is steered back to that queue. Several outputs
// can read different queues of the same input buffer in the same cycle. The
// full connectivity follows the published switch; the multiplexer form is this
// design's choice. Purely combinational.
module crossbar
  import dlh_pkg::*;
#(
  parameter int unsigned N_IN  = 96,
  parameter int unsigned N_OUT = 12,
  localparam int unsigned IW   = $clog2(N_IN)
) (
  input  flit_t            in_data  [N_IN],
  input  logic [N_IN-1:0]  in_empty,
  output logic [N_IN-1:0]  in_rd,
  input  logic [N_OUT-1:0] en,
  input  logic [IW-1:0]    sel [N_OUT],
  input  logic [N_OUT-1:0] out_rd,
  output flit_t            out_data [N_OUT],
  output logic [N_OUT-1:0] out_empty
);
  always_comb begin
    in_rd = '0;
    for (int o = 0; o < N_OUT; o++) begin
      out_data[o]  = en[o] ? in_data[sel[o]] : flit_t'(0);
      out_empty[o] = en[o] ? in_empty[sel[o]] : 1'b1;
      if (en[o] && out_rd[o]) in_rd[sel[o]] = 1'b1;
    end
  end
endmodule
