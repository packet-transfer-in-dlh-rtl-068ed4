// tb_dlh_router: end-to-end test of the router at its default size (12
// channels, 8 queues of 8 flits per input).
//
// Senders on all twelve input links obey PACK_WAIT and send each packet
// without gaps. Models of the next routers on all twelve output links report
// PACK_WAIT / CHAN_BUSY / CHAN_LOAD like a real input buffer, and a monitor
// per output collects packets and checks them against a scoreboard: the packet
// must leave on one of the channels its header allows (own node when the
// destination is this router, otherwise a high dT bit), all body and tail
// flits unchanged and in order, and the header with dT rewritten for the
// node behind that channel (computed here from addresses, independently of
// the RTL). Packets are identified by a tag carried in their body and tail.
//
// Phases: single packets (header latency of three cycles, each kind of
// channel), a blocked output that fills one input buffer (CHAN_LOAD,
// CHAN_BUSY, contention, stall), load-steered adaptive choice, then random
// traffic on all inputs. Every mechanism is counted and one that never
// happened counts as a failure.
module tb_dlh_router;
  import dlh_pkg::*;
  localparam int NQ = 8, DEPTH = 8;

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
  longint cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  task automatic expect_(string what, logic cond);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at cycle %0d", what, cyc); end
  endtask

  localparam logic [20:0] OWN = {1'b0, 12'h5A3, 8'b0110_1001};

  // ---------------- scoreboard ----------------
  typedef struct {
    flit_t       hdr;
    int          len;
    int          in_ch;
    logic [11:0] allowed;
    longint      t_hdr_in;
    longint      t_tail_in;
  } pkt_info_t;
  pkt_info_t sb [int];
  int next_tag = 1;
  int n_sent = 0, n_recv = 0;

  // mechanism counters
  int m_local = 0, m_cube = 0, m_loop = 0, m_ring = 0, m_multi = 0, m_steer = 0;
  int m_contention = 0, m_stall = 0, m_parallel = 0, m_cut = 0, m_load = 0, m_busy = 0;
  int m_ack = 0, m_lat = 0, m_rr = 0;

  function automatic logic [11:0] allowed_of(flit_t h);
    logic [11:0] v = '0;
    if (h[20:0] == OWN) v[11] = 1;
    else begin
      v[7:0] = h[28:21];
      v[8]  = h[31] && (h[20] != OWN[20]);
      v[9]  = h[30] && (h[19:8] != OWN[19:8]);
      v[10] = h[29] && (h[19:8] != OWN[19:8]);
    end
    return v;
  endfunction

  function automatic flit_t expected_hdr(flit_t h, int ch);
    logic [20:0] nxt = OWN;
    flit_t r = h;
    if (ch == 11) return h;
    if (ch < 8) nxt[ch] = ~nxt[ch];
    if (ch == 8) nxt[20] = ~nxt[20];
    r[28:21] = h[7:0] ^ nxt[7:0];
    r[31]    = h[20] ^ nxt[20];
    r[30]    = h[30] && (h[19:8] != OWN[19:8]);
    r[29]    = h[29] && (h[19:8] != OWN[19:8]);
    return r;
  endfunction

  // header as a previous router would send it to this one
  function automatic flit_t make_hdr(logic [20:0] dest, logic dir_l);
    flit_t h;
    h[33:32] = TF_HEADER;
    h[20:0]  = dest;
    h[28:21] = dest[7:0] ^ OWN[7:0];
    h[31]    = dest[20] != OWN[20];
    h[30]    = (dest[19:8] != OWN[19:8]) && dir_l;
    h[29]    = (dest[19:8] != OWN[19:8]) && !dir_l;
    return h;
  endfunction

  // ---------------- senders ----------------
  flit_t txq [N_CHAN][$];
  int    txtag [N_CHAN][$];
  logic [N_CHAN-1:0] sending = '0;

  task automatic queue_packet(int ch, flit_t h, int len);
    int tag = next_tag++;
    pkt_info_t pi;
    pi.hdr = h; pi.len = len; pi.in_ch = ch; pi.allowed = allowed_of(h);
    pi.t_hdr_in = -1; pi.t_tail_in = -1;
    sb[tag] = pi;
    txq[ch].push_back(h); txtag[ch].push_back(tag);
    for (int i = 1; i < len; i++) begin
      txq[ch].push_back({(i == len - 1) ? TF_TAIL : TF_BODY, 16'(tag), 16'(i)});
      txtag[ch].push_back(tag);
    end
    n_sent++;
    if ($countones(pi.allowed) > 1) m_multi++;
  endtask

  for (genvar c = 0; c < N_CHAN; c++) begin : g_tx
    always @(posedge clk) begin
      if (!rst_n) begin
        in_valid[c] <= 0;
        sending[c]  <= 0;
      end else if ((sending[c] || (in_pack_wait[c] && txq[c].size() > 0)) && txq[c].size() > 0) begin
        flit_t f;
        int tag;
        f   = txq[c].pop_front();
        tag = txtag[c].pop_front();
        in_valid[c] <= 1;
        in_data[c]  <= f;
        sending[c]  <= (f[33:32] != TF_TAIL);
        if (f[33:32] == TF_HEADER) sb[tag].t_hdr_in = cyc;
        if (f[33:32] == TF_TAIL)   sb[tag].t_tail_in = cyc;
      end else begin
        in_valid[c] <= 0;
        in_data[c]  <= '0;
      end
    end
  end

  // ---------------- next-router models and monitors ----------------
  logic [N_CHAN-1:0] ds_receiving = '0, force_busy = '0;
  assign ds_pack_wait = ~ds_receiving & ~force_busy;
  assign ds_chan_busy = force_busy;

  flit_t  rxbuf [N_CHAN][$];
  longint rx_t_hdr [N_CHAN];

  for (genvar c = 0; c < N_CHAN; c++) begin : g_rx
    always @(posedge clk) begin
      if (rst_n && out_valid[c]) begin
        flit_t f;
        f = out_data[c];
        if (f[33:32] == TF_HEADER) begin
          if (rxbuf[c].size() != 0) begin failures++; $display("FAIL header inside packet on %0d", c); end
          if (ds_receiving[c] || force_busy[c]) begin failures++; $display("FAIL packet sent to a busy channel %0d", c); end
          rxbuf[c].delete();
          rx_t_hdr[c] = cyc;
          ds_receiving[c] <= 1;
        end
        rxbuf[c].push_back(f);
        if (f[33:32] == TF_TAIL) begin
          check_packet(c, rxbuf[c], rx_t_hdr[c]);
          rxbuf[c].delete();
          ds_receiving[c] <= 0;
        end
      end
    end
  end

  function automatic void check_packet(int ch, flit_t p [$], longint t_hdr_out);
    int tag;
    pkt_info_t pi;
    checks++;
    if (p.size() < 2) begin failures++; $display("FAIL short packet on %0d", ch); return; end
    tag = int'(p[1][31:16]);
    if (!sb.exists(tag)) begin failures++; $display("FAIL unknown packet tag %0d on %0d", tag, ch); return; end
    pi = sb[tag];
    sb.delete(tag);
    n_recv++;
    if (!pi.allowed[ch]) begin
      failures++; $display("FAIL packet %0d left on %0d, allowed %b", tag, ch, pi.allowed);
    end
    checks++;
    if (p.size() != pi.len) begin failures++; $display("FAIL packet %0d length %0d want %0d", tag, p.size(), pi.len); end
    checks++;
    if (p[0] != expected_hdr(pi.hdr, ch)) begin
      failures++; $display("FAIL packet %0d header %h want %h", tag, p[0], expected_hdr(pi.hdr, ch));
    end
    for (int i = 1; i < p.size(); i++) begin
      checks++;
      if (p[i] != {(i == pi.len - 1) ? TF_TAIL : TF_BODY, 16'(tag), 16'(i)}) begin
        failures++; $display("FAIL packet %0d flit %0d = %h", tag, i, p[i]);
      end
    end
    if (ch == 11) m_local++;
    else if (ch < 8) m_cube++;
    else if (ch == 8) m_loop++;
    else m_ring++;
    if (t_hdr_out <= pi.t_tail_in) m_cut++;   // header left before the tail arrived
    if ($countones(pi.allowed) > 1 && ds_chan_load != '0) begin
      for (int o = 0; o < 12; o++)
        if (pi.allowed[o] && o != ch && ds_chan_load[o] && !ds_chan_load[ch]) m_steer++;
    end
  endfunction

  // ---------------- mechanism observers ----------------
  logic [11:0] rq [8*N_CHAN];
  always @(posedge clk) begin
    if (rst_n) begin
      int req_cnt [12];
      if (in_drop != '0) begin failures++; $display("FAIL header dropped"); end
      m_ack  += $countones(in_data_ack);
      m_load += $countones(in_chan_load & ~in_chan_busy);
      m_busy += $countones(in_chan_busy);
      for (int o = 0; o < 12; o++) req_cnt[o] = 0;
      for (int q = 0; q < 8 * N_CHAN; q++)
        if (dut.q_hdr_valid[q] && !dut.q_matched[q]) begin
          logic [11:0] a;
          a = allowed_of(dut.q_hdr[q]);
          for (int o = 0; o < 12; o++) if (a[o]) req_cnt[o]++;
          for (int o = 0; o < 12; o++) if (a[o] && (force_busy[o] || ds_receiving[o])) m_stall++;
        end
      for (int o = 0; o < 12; o++) if (req_cnt[o] > 1) m_contention++;
      for (int a = 0; a < 12; a++)
        for (int b = a + 1; b < 12; b++)
          if (dut.o_busy[a] && dut.o_busy[b] && (dut.o_conn[a] / NQ) == (dut.o_conn[b] / NQ)) m_parallel++;
      for (int o = 0; o < 12; o++)
        if (dut.o_new_match[o] && dut.o_ptr[o] != 0 && dut.o_conn[o] < dut.o_ptr[o]) m_rr++;
    end
  end

  task automatic wait_drain(int max_cycles);
    int n = 0;
    while ((sb.size() != 0 || sending != '0) && n < max_cycles) begin
      @(posedge clk); n++;
    end
    repeat (4) @(posedge clk);
  endtask

  function automatic logic [20:0] rand_dest();
    logic [20:0] d = 21'($urandom);
    case ($urandom % 6)
      0: d = OWN;
      1: d = {OWN[20:8], 8'($urandom)};
      2: d = {~OWN[20], OWN[19:0]};
      3: d = {OWN[20], 12'($urandom), OWN[7:0]};
      default: ;
    endcase
    return d;
  endfunction

  initial begin
    ds_chan_load = '0;
    own_adr_in = dlh_adr_t'(OWN);
    repeat (3) @(posedge clk);
    rst_n = 1;
    init = 1; @(posedge clk); init = 0;
    repeat (2) @(posedge clk);

    // A: one packet, input 0 to hypercube dimension 3: header latency
    begin
      int tag;
      longint t_in;
      tag = next_tag;
      queue_packet(0, make_hdr(OWN ^ 21'h8, 1), 4);
      while (!(in_valid[0] && in_data[0][33:32] == TF_HEADER)) @(posedge clk);
      t_in = cyc;                      // header written at the end of this cycle
      while (!out_valid[3]) @(posedge clk);
      checks++;
      if (cyc - t_in != 3) begin failures++; $display("FAIL header latency %0d cycles", cyc - t_in); end
      else m_lat++;
      wait_drain(100);
    end

    // B: one packet of each kind of channel
    queue_packet(1, make_hdr(OWN, 0), 3);                         // own node
    queue_packet(2, make_hdr({~OWN[20], OWN[19:0]}, 0), 5);       // loop
    queue_packet(3, make_hdr({OWN[20], OWN[19:8] + 12'd1, OWN[7:0]}, 1), 2);  // ring L
    queue_packet(4, make_hdr({OWN[20], OWN[19:8] - 12'd1, OWN[7:0]}, 0), 6);  // ring R
    wait_drain(200);

    // C: output 5 blocked; nine packets from input 6 all to dimension 5
    force_busy[5] = 1;
    for (int i = 0; i < 9; i++) queue_packet(6, make_hdr(OWN ^ 21'h20, 0), 2 + i % (DEPTH - 1));
    repeat (150) @(posedge clk);
    expect_("input 6 busy while output blocked", in_chan_busy[6] && !in_pack_wait[6]);
    expect_("nothing left on the blocked output", n_recv == 5);
    force_busy[5] = 0;
    wait_drain(400);

    // D: adaptive choice steered by the load of the next routers
    for (int k = 0; k < 8; k++) begin
      ds_chan_load = 12'(1 << k);
      queue_packet(k, make_hdr(OWN ^ 21'(8'(1 << k) | 8'(1 << ((k + 3) % 8))), 0), 3);
      wait_drain(100);
    end
    ds_chan_load = '0;

    // E: random traffic on all inputs
    for (int i = 0; i < 600; i++)
      queue_packet($urandom % N_CHAN, make_hdr(rand_dest(), 1'($urandom)), 2 + $urandom % (DEPTH - 1));
    for (int n = 0; n < 20000 && (sb.size() != 0 || sending != '0); n++) begin
      @(posedge clk);
      if ($urandom % 16 == 0) ds_chan_load = 12'($urandom);
    end
    repeat (4) @(posedge clk);

    expect_("all packets delivered", sb.size() == 0 && n_recv == n_sent);
    expect_("one DATA_ACK per packet", m_ack == n_sent);
    $display("packets %0d  local %0d cube %0d loop %0d ring %0d multi-route %0d load-steered %0d",
             n_sent, m_local, m_cube, m_loop, m_ring, m_multi, m_steer);
    $display("contention %0d stall %0d parallel %0d cut-through %0d chan_load %0d chan_busy %0d rr-wrap %0d",
             m_contention, m_stall, m_parallel, m_cut, m_load, m_busy, m_rr);
    expect_("local delivery happened", m_local > 0);
    expect_("hypercube hop happened", m_cube > 0);
    expect_("loop hop happened", m_loop > 0);
    expect_("ring hop happened", m_ring > 0);
    expect_("several routes offered", m_multi > 0);
    expect_("route steered by neighbour load", m_steer > 0);
    expect_("output contention happened", m_contention > 0);
    expect_("stall on a busy next router happened", m_stall > 0);
    expect_("one input feeding two outputs at once", m_parallel > 0);
    expect_("cut-through happened", m_cut > 0);
    expect_("CHAN_LOAD raised", m_load > 0);
    expect_("CHAN_BUSY raised", m_busy > 0);
    expect_("round-robin pointer wrapped", m_rr > 0);
    expect_("three-cycle header latency", m_lat > 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (60000) @(posedge clk);
    failures++;
    $display("watchdog: %0d packets outstanding", sb.size());
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
