// header_compare: the three destination comparators of the header flit.
//
// CMP1 compares the ring bit EI, CMP2 the 12-bit hypercube address in the DL
// network and CMP3 the 8-bit node address BCH of the packet's destination
// with the router's own address (OWN_ADDRESS_RG). A high output means the two
// fields are equal, as published. `hit` (all three equal) means the packet has
// reached its destination node. Combinational, zero latency.
module header_compare
  import dlh_pkg::*;
(
  input  dlh_adr_t dest,
  input  dlh_adr_t own,
  output logic     loop_eq,   // LOOP: same ring of the double loop
  output logic     lr_eq,     // L/R: same hypercube in the DL network
  output logic     bch_eq,    // BCH: same node inside the hypercube
  output logic     hit        // DEST_ADR = OWN_ADR
);
  assign loop_eq = (dest.ei  == own.ei);
  assign lr_eq   = (dest.dl  == own.dl);
  assign bch_eq  = (dest.bch == own.bch);
  assign hit     = loop_eq & lr_eq & bch_eq;
endmodule
