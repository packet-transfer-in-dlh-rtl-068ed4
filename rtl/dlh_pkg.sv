// dlh_pkg: types and constants shared by the DLH router.
//
// A flit on every link and in every queue is 34 bits: a 2-bit flit type
// TF in bits 33..32 and a 32-bit payload. In a header flit the payload holds
// the mismatch field dT (bits 31..21: LOOP, L/R, DIF_BCH) and the destination
// address (bits 20..0: EI, DL network address, node address BCH in the
// hypercube). The field positions follow the published header format; the
// numeric code of each flit type is this design's own choice, since only the
// three type names are given.
//
// Channel numbering is also this design's choice. The router has 12
// full-duplex channels: 0..7 are the hypercube dimensions (channel i changes
// node address bit i), 8 is the loop channel to the other ring of the double
// loop, 9 and 10 are the two ring directions L and R, and 11 is the channel to
// the router's own processing node.
package dlh_pkg;

  localparam int unsigned FLIT_W   = 34;  // TF + 32-bit flit
  localparam int unsigned BCH_W    = 8;   // node address inside a hypercube
  localparam int unsigned DL_W     = 12;  // hypercube address in the DL network

  localparam int unsigned N_CHAN   = 12;  // full-duplex channels per router
  localparam int unsigned CH_LOOP  = 8;
  localparam int unsigned CH_L     = 9;
  localparam int unsigned CH_R     = 10;
  localparam int unsigned CH_LOCAL = 11;

  typedef enum logic [1:0] {
    TF_IDLE   = 2'b00,
    TF_HEADER = 2'b01,
    TF_BODY   = 2'b10,
    TF_TAIL   = 2'b11
  } flit_type_e;

  // Destination / own address: EI [20], DL network [19:8], BCH [7:0].
  typedef struct packed {
    logic             ei;
    logic [DL_W-1:0]  dl;
    logic [BCH_W-1:0] bch;
  } dlh_adr_t;

  // Mismatch field dT: LOOP [31], L/R [30:29], DIF_BCH [28:21].
  typedef struct packed {
    logic             loop;
    logic             l;
    logic             r;
    logic [BCH_W-1:0] dif_bch;
  } dlh_dt_t;

  // Header flit as a whole.
  typedef struct packed {
    flit_type_e tf;
    dlh_dt_t    dt;
    dlh_adr_t   dest;
  } dlh_header_t;

  typedef logic [FLIT_W-1:0] flit_t;

  function automatic flit_type_e flit_type(flit_t f);
    return flit_type_e'(f[FLIT_W-1 -: 2]);
  endfunction

endpackage
