// tb_queue_arbiter: request forming from the header (own node versus the
// high bits of dT, ring requests masked once the ring or hypercube matches)
// and the fixed-priority accept that prefers lightly loaded neighbours.
module tb_queue_arbiter;
  import dlh_pkg::*;
  logic clk = 0, rst_n = 0, init = 0, hdr_valid = 0, release_q = 0;
  flit_t hdr = '0;
  dlh_adr_t own;
  logic [N_CHAN-1:0] grant = '0, ds_load = '0, req, accept;
  logic matched;
  int checks = 0, failures = 0;

  queue_arbiter dut (.*);

  always #5 clk = ~clk;

  task automatic expect_(string what, logic cond);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  function automatic flit_t mkhdr(logic loop, logic l, logic r, logic [7:0] dif, logic [20:0] dest);
    return {2'b01, loop, l, r, dif, dest};
  endfunction

  // reference request vector
  function automatic logic [11:0] ref_req(flit_t h, logic [20:0] o);
    logic [11:0] v;
    v = '0;
    if (h[20:0] == o) v[11] = 1;
    else begin
      v[7:0] = h[28:21];
      v[8]  = h[31] & (h[20] != o[20]);
      v[9]  = h[30] & (h[19:8] != o[19:8]);
      v[10] = h[29] & (h[19:8] != o[19:8]);
    end
    return v;
  endfunction

  initial begin
    own = dlh_adr_t'(21'h1_234_56);
    repeat (2) @(posedge clk);
    rst_n = 1;
    hdr_valid = 0; #1;
    expect_("no request without header", req == '0);
    for (int i = 0; i < 300; i++) begin
      logic [20:0] d;
      d = (i % 4 == 0) ? 21'(own) : 21'($urandom);
      if (i % 4 == 1) d[19:8] = own.dl;
      hdr = mkhdr(1'($urandom), 1'($urandom), 1'($urandom), 8'($urandom), d);
      hdr_valid = 1; #1;
      expect_($sformatf("request %h", hdr), req == ref_req(hdr, 21'(own)));
    end
    // accept: requests on 2, 5, 9; grants on all three; channel 2 loaded
    hdr = mkhdr(0, 1, 0, 8'b0010_0100, 21'h0_FFF_00);
    ds_load = 12'b0000_0000_0100;
    grant = 12'b0010_0010_0100; #1;
    expect_("accept lightly loaded", accept == 12'b0000_0010_0000);
    ds_load = 12'b0010_0010_0100; #1;
    expect_("all loaded: lowest", accept == 12'b0000_0000_0100);
    grant = 12'b1000_0000_0000; #1;
    expect_("grant without request ignored", accept == '0);
    grant = 12'b0010_0000_0000; ds_load = 0; #1;
    expect_("single grant", accept == 12'b0010_0000_0000);
    @(posedge clk); #1;
    expect_("matched", matched && req == '0 && accept == '0);
    repeat (3) @(posedge clk); #1;
    expect_("still matched", matched);
    release_q = 1; hdr_valid = 0; @(posedge clk); #1; release_q = 0;
    expect_("released", !matched);
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
