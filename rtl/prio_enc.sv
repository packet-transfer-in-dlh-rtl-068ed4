// prio_enc: priority encoder of the input buffer (the 8:3 PRIORITY ENCODER).
//
// Given the free flags of the queues, it returns the index of the first free
// queue, lowest index first, and flags whether any queue is free at all. It
// is purely combinational. The rule "always select the first available queue"
// is the published one; taking queue 0 as the first is this design's choice.
//
// Interface: free[N] in, idx[$clog2(N)] and any out. No clock, zero latency.
module prio_enc #(
  parameter int unsigned N = 8
) (
  input  logic [N-1:0]         free,
  output logic [$clog2(N)-1:0] idx,
  output logic                 any
);
  always_comb begin
    idx = '0;
    any = 1'b0;
    for (int i = N - 1; i >= 0; i--) begin
      if (free[i]) begin
        idx = ($clog2(N))'(i);
        any = 1'b1;
      end
    end
  end
endmodule
