// tb_router_utilization: link utilization of the router at its default size.
//
// Case 1, one direction: three input channels each send eight packets of
// DEPTH flits, all to hypercube dimension 2. The output link carries one
// packet after another; between two packets it is idle for exactly two
// cycles (the next router's PACK_WAIT returns the cycle after the tail, then
// one cycle of arbitration and one of switch traversal), so the expected
// utilization over the busy period is DEPTH/(DEPTH+2).
// Case 2, all directions: each input channel c sends eight packets to a
// different output, so all 12 outputs stream in parallel; each must reach the
// same DEPTH/(DEPTH+2) figure, showing that the crossbar never limits them.
// Next routers are modelled as always having a free queue.
module tb_router_utilization;
  import dlh_pkg::*;
  localparam int DEPTH = 8;
  localparam logic [20:0] OWN = {1'b1, 12'h00F, 8'b1100_0101};

  logic clk = 0, rst_n = 0, init = 0;
  dlh_adr_t own_adr_in;
  logic [N_CHAN-1:0] in_valid = '0;
  flit_t in_data [N_CHAN];
  logic [N_CHAN-1:0] in_pack_wait, in_chan_busy, in_chan_load, in_data_ack, in_drop;
  logic [N_CHAN-1:0] out_valid;
  flit_t out_data [N_CHAN];
  logic [N_CHAN-1:0] ds_pack_wait, ds_chan_busy, ds_chan_load;

  dlh_router dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  // next-router models: PACK_WAIT low only while a packet is arriving
  logic [N_CHAN-1:0] ds_receiving = '0;
  assign ds_pack_wait = ~ds_receiving;
  assign ds_chan_busy = '0;
  assign ds_chan_load = '0;
  int flits_out [N_CHAN];
  int first_out [N_CHAN];
  int last_out  [N_CHAN];
  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  for (genvar c = 0; c < N_CHAN; c++) begin : g_rx
    always @(posedge clk) begin
      if (rst_n && out_valid[c]) begin
        if (out_data[c][33:32] == TF_HEADER) ds_receiving[c] <= 1;
        if (out_data[c][33:32] == TF_TAIL)   ds_receiving[c] <= 0;
        if (first_out[c] < 0) first_out[c] = cyc;
        last_out[c] = cyc;
        flits_out[c]++;
      end
    end
  end

  // senders
  flit_t txq [N_CHAN][$];
  logic [N_CHAN-1:0] sending = '0;
  for (genvar c = 0; c < N_CHAN; c++) begin : g_tx
    always @(posedge clk) begin
      if (rst_n && txq[c].size() > 0 && (sending[c] || in_pack_wait[c])) begin
        flit_t f;
        f = txq[c].pop_front();
        in_valid[c] <= 1;
        in_data[c]  <= f;
        sending[c]  <= f[33:32] != TF_TAIL;
      end else begin
        in_valid[c] <= 0;
        in_data[c]  <= '0;
      end
    end
  end

  function automatic flit_t hdr_to(int ch);
    logic [20:0] d = OWN;
    flit_t h;
    if (ch < 8) d[ch] = ~d[ch];
    else if (ch == 8) d[20] = ~d[20];
    else if (ch == 9 || ch == 10) d[19:8] = d[19:8] + 12'd5;
    h[33:32] = TF_HEADER;
    h[20:0] = d;
    h[28:21] = d[7:0] ^ OWN[7:0];
    h[31] = d[20] != OWN[20];
    h[30] = ch == 9;
    h[29] = ch == 10;
    return h;
  endfunction

  task automatic queue_pkts(int in_ch, int out_ch, int n);
    for (int p = 0; p < n; p++) begin
      txq[in_ch].push_back(hdr_to(out_ch));
      for (int i = 1; i < DEPTH; i++)
        txq[in_ch].push_back({(i == DEPTH - 1) ? TF_TAIL : TF_BODY, 16'(p), 16'(i)});
    end
  endtask

  task automatic reset_counts();
    for (int c = 0; c < N_CHAN; c++) begin
      flits_out[c] = 0; first_out[c] = -1; last_out[c] = -1;
    end
  endtask

  task automatic run_until_idle();
    int quiet = 0;
    while (quiet < 20) begin
      @(posedge clk);
      quiet = (out_valid == '0 && sending == '0) ? quiet + 1 : 0;
    end
  endtask

  // utilization of channel c in per mille over its busy period
  function automatic int util(int c);
    return (flits_out[c] * 1000) / (last_out[c] - first_out[c] + 1 + 2);
  endfunction

  localparam int EXPECT = (DEPTH * 1000) / (DEPTH + 2);

  initial begin
    for (int c = 0; c < N_CHAN; c++) in_data[c] = '0;
    own_adr_in = dlh_adr_t'(OWN);
    reset_counts();
    repeat (3) @(posedge clk);
    rst_n = 1;
    init = 1; @(posedge clk); init = 0;
    @(posedge clk);

    // case 1
    for (int c = 0; c < 3; c++) queue_pkts(c, 2, 8);
    run_until_idle();
    $display("one direction: %0d flits on channel 2, utilization %0d per mille (expected %0d)",
             flits_out[2], util(2), EXPECT);
    checks++;
    if (flits_out[2] != 3 * 8 * DEPTH) begin failures++; $display("FAIL flit count"); end
    checks++;
    if (util(2) != EXPECT) begin failures++; $display("FAIL utilization"); end

    // case 2
    reset_counts();
    for (int c = 0; c < N_CHAN; c++) queue_pkts(c, (c + 5) % N_CHAN, 8);
    run_until_idle();
    for (int o = 0; o < N_CHAN; o++) begin
      $display("all directions: channel %0d carried %0d flits, utilization %0d per mille", o, flits_out[o], util(o));
      checks++;
      if (flits_out[o] != 8 * DEPTH || util(o) != EXPECT) begin failures++; $display("FAIL channel %0d", o); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
