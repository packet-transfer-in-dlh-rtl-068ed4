// tb_allocator: request-grant-accept with the full 96-queue allocator.
// Scenarios: two queues contending for one output (round-robin order and
// pointer move), one queue offered two outputs (accepts one, the other output
// stays free for another queue in the same cycle), the neighbour load
// steering the accept, several pairs formed in one cycle, no grant while the
// next router is not ready, and release by the tail.
module tb_allocator;
  import dlh_pkg::*;
  localparam int NQ = 8, NQT = N_CHAN * NQ;
  logic clk = 0, rst_n = 0, init = 0;
  dlh_adr_t own;
  logic [NQT-1:0] q_hdr_valid = '0, q_release = '0, q_matched;
  flit_t q_hdr [NQT];
  logic [N_CHAN-1:0] ds_ready = '1, ds_load = '0, o_flit_rd = '0, o_release = '0;
  logic [N_CHAN-1:0] o_busy, o_mod_dt, o_new_match;
  logic [6:0] o_conn [N_CHAN];
  logic [6:0] o_ptr [N_CHAN];
  int checks = 0, failures = 0;

  allocator #(.NQ(NQ)) dut (.*);

  always #5 clk = ~clk;

  task automatic expect_(string what, logic cond);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  // header towards a node differing from own in the given hypercube bits
  function automatic flit_t hdr_bch(logic [7:0] dims);
    return {TF_HEADER, 1'b0, 1'b0, 1'b0, dims, own.ei, own.dl, own.bch ^ dims};
  endfunction

  task automatic free_out(int o, int q);
    o_release[o] = 1; q_release[q] = 1; q_hdr_valid[q] = 0;
    @(posedge clk); #1;
    o_release[o] = 0; q_release[q] = 0;
  endtask

  initial begin
    own = dlh_adr_t'({1'b1, 12'h0A5, 8'h3C});
    for (int i = 0; i < NQT; i++) q_hdr[i] = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(posedge clk); #1;
    // 1: queues 0 and 8 both want output 3; pointer at 0 -> queue 0 first
    q_hdr[0] = hdr_bch(8'b0000_1000); q_hdr_valid[0] = 1;
    q_hdr[8] = hdr_bch(8'b0000_1000); q_hdr_valid[8] = 1;
    #1;
    expect_("one match for output 3", o_new_match == 12'b0000_0000_1000);
    @(posedge clk); #1;
    expect_("queue 0 on output 3", o_busy[3] && o_conn[3] == 0 && q_matched[0] && !q_matched[8] && o_mod_dt[3]);
    expect_("pointer after queue 0", o_ptr[3] == 1);
    repeat (2) @(posedge clk); #1;
    expect_("queue 8 waits", !q_matched[8]);
    free_out(3, 0);
    expect_("output 3 free", !o_busy[3]);
    @(posedge clk); #1;
    expect_("queue 8 on output 3", o_busy[3] && o_conn[3] == 8 && o_ptr[3] == 9);
    free_out(3, 8);
    // 2: queue 16 may go to 4 or 5, queue 24 only to 4; both outputs grant
    //    queue 16, which takes 5 because the neighbour behind 4 is loaded
    q_hdr[16] = hdr_bch(8'b0011_0000); q_hdr_valid[16] = 1;
    q_hdr[24] = hdr_bch(8'b0001_0000); q_hdr_valid[24] = 1;
    ds_load = 12'b0000_0001_0000;   // neighbour behind output 4 heavily loaded
    #1;
    expect_("load steers accept to 5", o_new_match == 12'b0000_0010_0000);
    @(posedge clk); #1;
    expect_("queue 16 on output 5", o_conn[5] == 16 && o_busy[5] && !o_busy[4]);
    // one iSLIP iteration per cycle: output 4's lost grant is retried now
    expect_("output 4 matched next cycle", o_new_match == 12'b0000_0001_0000);
    @(posedge clk); #1;
    expect_("queue 24 on output 4", o_conn[4] == 24 && o_busy[4]);
    free_out(5, 16);
    free_out(4, 24);
    ds_load = '0;
    // 3: not ready downstream
    ds_ready[7] = 0;
    q_hdr[40] = hdr_bch(8'b1000_0000); q_hdr_valid[40] = 1;
    repeat (3) @(posedge clk); #1;
    expect_("no match while next router busy", !o_busy[7] && !q_matched[40]);
    ds_ready[7] = 1;
    @(posedge clk); #1;
    expect_("match once ready", o_busy[7] && o_conn[7] == 40);
    // MOD_DT until first flit read
    o_flit_rd[7] = 1; @(posedge clk); #1; o_flit_rd[7] = 0;
    expect_("mod_dt cleared by first flit", !o_mod_dt[7] && o_busy[7]);
    free_out(7, 40);
    // 4: eight queues to eight different outputs in one cycle, plus local
    for (int k = 0; k < 8; k++) begin
      q_hdr[k * NQ + 1] = hdr_bch(8'(1 << k)); q_hdr_valid[k * NQ + 1] = 1;
    end
    q_hdr[90] = {TF_HEADER, 11'h7FF, own}; q_hdr_valid[90] = 1;
    #1;
    expect_("nine matches in one cycle", o_new_match == 12'b1000_1111_1111);
    @(posedge clk); #1;
    for (int k = 0; k < 8; k++) expect_("parallel pair", o_busy[k] && o_conn[k] == 7'(k * NQ + 1));
    expect_("local delivery", o_busy[11] && o_conn[11] == 90);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
