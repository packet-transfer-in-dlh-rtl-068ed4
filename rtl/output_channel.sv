// output_channel: output register RG_OUT and link control of one channel.
//
// While the channel is connected to a queue (busy from its round-robin
// arbiter) it reads one flit per cycle through the crossbar whenever the
// queue has one (FLT_RD), passes it through dt_modify, which rewrites dT of
// the header (MOD_DT), and loads it into RG_OUT (WR_RG_OUT), from where it is
// driven onto the link with VALID_DATA the next cycle. Reading the tail flit
// releases both the queue and the channel. RG_OUT, WR_RG_OUT and MOD_DT are
// published names; the read rule and VALID_DATA as a registered copy of
// WR_RG_OUT are this design's choices.
//
// Timing: a flit read in cycle t appears on out_data/out_valid in cycle t+1.
module output_channel
  import dlh_pkg::*;
#(
  parameter int unsigned CH = 0
) (
  input  logic     clk,
  input  logic     rst_n,
  input  logic     init,
  input  dlh_adr_t own,
  input  logic     busy,        // channel connected (RRA STATE)
  input  logic     mod_dt,      // MOD_DT from the RRA
  input  flit_t    xb_data,     // flit from the crossbar
  input  logic     xb_empty,    // connected queue has nothing to read
  output logic     flit_rd,     // FLT_RD to the connected queue
  output logic     release_o,   // tail flit read
  output logic     out_valid,   // VALID_DATA to the next router
  output flit_t    out_data     // RG_OUT
);
  flit_t mod_flit;
  logic  wr_rg_out;

  assign flit_rd   = busy && !xb_empty;
  assign wr_rg_out = flit_rd;
  assign release_o = flit_rd && (flit_type(xb_data) == TF_TAIL);

  dt_modify #(.CH(CH)) u_mod (.flit_in(xb_data), .own, .mod_dt, .flit_out(mod_flit));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_data  <= '0;
    end else if (init) begin
      out_valid <= 1'b0;
    end else begin
      out_valid <= wr_rg_out;
      if (wr_rg_out) out_data <= mod_flit;
    end
  end
endmodule
