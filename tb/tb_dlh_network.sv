// tb_dlh_network: eight routers at default size wired into a small DLH
// network, to check routing hop by hop.
//
// Router r has the address EI = r[2], DL_Network = r[1], BCH = r[0] plus bit
// 1 of BCH fixed at 0: so there are two-node hypercubes (dimension 0) on a
// ring of two hypercubes, on each of the two rings. Links:
//   hypercube channel 0 <-> the router differing in BCH bit 0,
//   loop channel 8      <-> the router on the other ring,
//   ring channels L (9) and R (10): out L goes to the neighbour's input R
//   and out R to the neighbour's input L (with two hypercubes per ring both
//   neighbours are the same router).
// All other channels are left unconnected and report no free queue.
// Each processing node injects packets on channel 11 with the dT a source
// node would set. Every packet must come out of channel 11 of its destination
// router once, unchanged, after exactly the minimal number of hops
// (address bits that differ plus one ring step if the hypercubes differ),
// which is checked by counting headers on all inter-router links.
module tb_dlh_network;
  import dlh_pkg::*;
  localparam int NR = 8, DEPTH = 8;

  logic clk = 0, rst_n = 0, init = 0;
  always #5 clk = ~clk;

  dlh_adr_t          own_adr   [NR];
  logic [N_CHAN-1:0] in_valid  [NR];
  flit_t             in_data   [NR][N_CHAN];
  logic [N_CHAN-1:0] in_pack_wait [NR], in_chan_busy [NR], in_chan_load [NR], in_data_ack [NR], in_drop [NR];
  logic [N_CHAN-1:0] out_valid [NR];
  flit_t             out_data  [NR][N_CHAN];
  logic [N_CHAN-1:0] ds_pack_wait [NR], ds_chan_busy [NR], ds_chan_load [NR];

  function automatic logic [20:0] adr_of(int r);
    return {1'(r >> 2), 12'((r >> 1) & 1), 7'b0, 1'(r & 1)};
  endfunction

  // neighbour reached through output channel o of router r, and the input
  // channel the link arrives on there; -1 if unconnected
  function automatic int peer(int r, int o);
    case (o)
      0:  return r ^ 1;
      8:  return r ^ 4;
      9, 10: return r ^ 2;
      default: return -1;
    endcase
  endfunction
  function automatic int peer_in(int o);
    return (o == 9) ? 10 : (o == 10) ? 9 : o;
  endfunction

  // processing-node side
  logic [NR-1:0] node_valid = '0;
  flit_t         node_data [NR];

  for (genvar r = 0; r < NR; r++) begin : g_r
    assign own_adr[r] = dlh_adr_t'(adr_of(r));
    dlh_router u_router (
      .clk, .rst_n, .init,
      .own_adr_in  (own_adr[r]),
      .in_valid    (in_valid[r]),
      .in_data     (in_data[r]),
      .in_pack_wait(in_pack_wait[r]),
      .in_chan_busy(in_chan_busy[r]),
      .in_chan_load(in_chan_load[r]),
      .in_data_ack (in_data_ack[r]),
      .in_drop     (in_drop[r]),
      .out_valid   (out_valid[r]),
      .out_data    (out_data[r]),
      .ds_pack_wait(ds_pack_wait[r]),
      .ds_chan_busy(ds_chan_busy[r]),
      .ds_chan_load(ds_chan_load[r])
    );
    for (genvar c = 0; c < N_CHAN; c++) begin : g_c
      if (c == CH_LOCAL) begin : g_node
        assign in_valid[r][c]     = node_valid[r];
        assign in_data[r][c]      = node_data[r];
        assign ds_pack_wait[r][c] = 1'b1;    // the node always takes packets
        assign ds_chan_busy[r][c] = 1'b0;
        assign ds_chan_load[r][c] = 1'b0;
      end else if (peer(r, c) >= 0) begin : g_link
        // input c of router r is fed by output peer_in(c) of router peer(r, c)
        assign in_valid[r][c]     = out_valid[peer(r, c)][peer_in(c)];
        assign in_data[r][c]      = out_data[peer(r, c)][peer_in(c)];
        assign ds_pack_wait[r][c] = in_pack_wait[peer(r, c)][peer_in(c)];
        assign ds_chan_busy[r][c] = in_chan_busy[peer(r, c)][peer_in(c)];
        assign ds_chan_load[r][c] = in_chan_load[peer(r, c)][peer_in(c)];
      end else begin : g_open
        assign in_valid[r][c]     = 1'b0;
        assign in_data[r][c]      = '0;
        assign ds_pack_wait[r][c] = 1'b0;
        assign ds_chan_busy[r][c] = 1'b1;
        assign ds_chan_load[r][c] = 1'b0;
      end
    end
  end

  int checks = 0, failures = 0;

  // scoreboard: tag -> destination router, length
  int sb_dest [int];
  int sb_len  [int];
  int next_tag = 1, n_sent = 0, n_recv = 0;
  int hops_expected = 0, hops_seen = 0;
  int n_ring = 0, n_loop = 0, n_cube = 0;

  function automatic int hop_dist(int s, int d);
    return ((s ^ d) & 1 ? 1 : 0) + ((s ^ d) & 2 ? 1 : 0) + ((s ^ d) & 4 ? 1 : 0);
  endfunction

  flit_t txq [NR][$];
  logic [NR-1:0] sending = '0;

  task automatic inject(int s, int d, int len);
    logic [20:0] sa = adr_of(s), da = adr_of(d);
    flit_t h;
    int tag = next_tag++;
    h[33:32] = TF_HEADER;
    h[20:0]  = da;
    h[28:21] = sa[7:0] ^ da[7:0];
    h[31]    = sa[20] != da[20];
    h[30]    = (sa[19:8] != da[19:8]) && (tag % 2 == 0);
    h[29]    = (sa[19:8] != da[19:8]) && (tag % 2 == 1);
    txq[s].push_back(h);
    for (int i = 1; i < len; i++)
      txq[s].push_back({(i == len - 1) ? TF_TAIL : TF_BODY, 16'(tag), 16'(i)});
    sb_dest[tag] = d; sb_len[tag] = len;
    hops_expected += hop_dist(s, d);
    n_sent++;
  endtask

  for (genvar r = 0; r < NR; r++) begin : g_node
    always @(posedge clk) begin
      if (rst_n && txq[r].size() > 0 && (sending[r] || in_pack_wait[r][CH_LOCAL])) begin
        flit_t f;
        f = txq[r].pop_front();
        node_valid[r] <= 1;
        node_data[r]  <= f;
        sending[r]    <= f[33:32] != TF_TAIL;
      end else begin
        node_valid[r] <= 0;
        node_data[r]  <= '0;
      end
    end

    // delivery to the processing node
    flit_t rx [$];
    always @(posedge clk) begin
      if (rst_n && out_valid[r][CH_LOCAL]) begin
        flit_t f;
        f = out_data[r][CH_LOCAL];
        rx.push_back(f);
        if (f[33:32] == TF_TAIL) begin
          int tag;
          tag = int'(rx[1][31:16]);
          checks++;
          if (!sb_dest.exists(tag) || sb_dest[tag] != r || rx.size() != sb_len[tag]
              || rx[0][33:32] != TF_HEADER || rx[0][20:0] != adr_of(r)
              || rx[0][28:21] != 8'h0 || rx[0][31]) begin
            failures++;
            $display("FAIL packet tag %0d delivered at router %0d (%0d flits, header %h)", tag, r, rx.size(), rx[0]);
          end else begin
            for (int i = 1; i < rx.size(); i++) begin
              checks++;
              if (rx[i] != {(i == rx.size() - 1) ? TF_TAIL : TF_BODY, 16'(tag), 16'(i)}) failures++;
            end
            sb_dest.delete(tag);
            n_recv++;
          end
          rx.delete();
        end
      end
    end

    // headers crossing inter-router links
    always @(posedge clk) begin
      if (rst_n) begin
        for (int c = 0; c < CH_LOCAL; c++)
          if (out_valid[r][c] && out_data[r][c][33:32] == TF_HEADER) begin
            hops_seen++;
            if (c < 8) n_cube++; else if (c == 8) n_loop++; else n_ring++;
            if (peer(r, c) < 0) begin failures++; $display("FAIL header sent to an open channel %0d of router %0d", c, r); end
          end
        if (in_drop[r] != '0) begin failures++; $display("FAIL header dropped at router %0d", r); end
      end
    end
  end

  initial begin
    for (int r = 0; r < NR; r++) node_data[r] = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    init = 1; @(posedge clk); init = 0;
    @(posedge clk);
    // every source to every destination, then random traffic
    for (int s = 0; s < NR; s++)
      for (int d = 0; d < NR; d++) inject(s, d, 2 + (s + d) % (DEPTH - 1));
    for (int i = 0; i < 400; i++) inject($urandom % NR, $urandom % NR, 2 + $urandom % (DEPTH - 1));
    for (int n = 0; n < 30000 && sb_dest.size() != 0; n++) @(posedge clk);
    repeat (10) @(posedge clk);
    $display("packets %0d delivered %0d, link hops %0d (minimal %0d): hypercube %0d loop %0d ring %0d",
             n_sent, n_recv, hops_seen, hops_expected, n_cube, n_loop, n_ring);
    checks++;
    if (n_recv != n_sent || sb_dest.size() != 0) begin failures++; $display("FAIL %0d packets lost", sb_dest.size()); end
    checks++;
    if (hops_seen != hops_expected) begin failures++; $display("FAIL routes are not minimal"); end
    checks++;
    if (n_cube == 0 || n_loop == 0 || n_ring == 0) begin failures++; $display("FAIL a channel kind was never used"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("watchdog: %0d packets outstanding", sb_dest.size());
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
