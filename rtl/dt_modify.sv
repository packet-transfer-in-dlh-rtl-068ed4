// dt_modify: rewrites the mismatch field dT of a header flit on its way to
// output channel CH.
//
// The 34-bit flit from the crossbar is split into its 11-bit dT field (bits
// 31..21) and the other 23 bits, which pass unchanged. A multiplexer driven by
// MOD_DT chooses between the flit's own dT (body and tail flits) and a new dT
// computed for the router the packet is going to:
//   DIF_BCH[i] = BCH[i] xor HYPERCUBE[i] xor (CH == i)  - the node-address
//                mismatch seen from the next node;
//   LOOP       = EI xor own EI xor (CH == loop channel) - the ring
//                mismatch seen from the next node;
//   L, R       = the flit's L, R and not(L/R equal) - the ring direction is
//                kept until the destination hypercube is reached.
// The split into 11 and 23 bits, the XOR of the own HYPERCUBE bits with the
// BCH bits, the use of the LOOP and L/R comparator results with XOR and AND
// gates, and the MOD_DT multiplexer are published. The exact equations above,
// in particular folding the chosen channel into the XOR so that dT is correct
// at the next router, are this design's reading of them. On the own-node
// channel (11) the flit is never modified. Combinational.
module dt_modify
  import dlh_pkg::*;
#(
  parameter int unsigned CH = 0
) (
  input  flit_t    flit_in,
  input  dlh_adr_t own,
  input  logic     mod_dt,
  output flit_t    flit_out
);
  dlh_header_t h, o;
  dlh_dt_t     dt_new;
  logic        loop_eq, lr_eq, bch_eq, hit;
  logic [BCH_W-1:0] dim;

  assign h = dlh_header_t'(flit_in);

  header_compare u_cmp (.dest(h.dest), .own, .loop_eq, .lr_eq, .bch_eq, .hit);

  always_comb begin
    dim = '0;
    if (CH < BCH_W) dim[CH % BCH_W] = 1'b1;
    dt_new.dif_bch = h.dest.bch ^ own.bch ^ dim;
    dt_new.loop    = h.dest.ei ^ own.ei ^ (CH == CH_LOOP);
    dt_new.l       = h.dt.l & ~lr_eq;
    dt_new.r       = h.dt.r & ~lr_eq;
  end

  always_comb begin
    o = h;
    if (mod_dt && CH != CH_LOCAL) o.dt = dt_new;
  end

  assign flit_out = flit_t'(o);
endmodule
