// tb_rr_arbiter: round-robin grant order from the pointer, pointer moved only
// by an accepted grant, no grant while busy or while the next router is not
// ready, MOD_DT for the first flit, release by the tail. A reference pointer
// is kept in the testbench.
module tb_rr_arbiter;
  localparam int N = 12;
  logic clk = 0, rst_n = 0, init = 0, chan_ready = 1, accepted = 0, flit_rd = 0, release_o = 0;
  logic [N-1:0] req = '0, grant;
  logic busy, mod_dt;
  logic [3:0] conn, ptr;
  int checks = 0, failures = 0;
  int rptr = 0;

  rr_arbiter #(.N_REQ(N)) dut (.*);

  always #5 clk = ~clk;

  task automatic expect_(string what, logic cond);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  function automatic int ref_pick(logic [N-1:0] r, int p);
    for (int k = 0; k < N; k++) if (r[(p + k) % N]) return (p + k) % N;
    return -1;
  endfunction

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1; #1;
    for (int i = 0; i < 200; i++) begin
      int e;
      logic acc;
      req = N'($urandom) & N'($urandom);
      chan_ready = ($urandom % 8) != 0;
      accepted = 0; #1;
      e = ref_pick(req, rptr);
      if (!chan_ready || e < 0) expect_("no grant", grant == '0);
      else expect_($sformatf("grant %0d ptr %0d", e, rptr), grant == (N'(1) << e));
      accepted = (grant != '0) && ($urandom % 3 != 0); #1;
      acc = accepted;
      @(posedge clk); #1;
      accepted = 0;
      expect_("busy only after an accept", busy == acc);
      if (acc) begin
        rptr = (e + 1) % N;
        expect_("connected queue", conn == 4'(e) && mod_dt && ptr == 4'(rptr));
        // busy: no grants
        req = '1; #1;
        expect_("no grant while busy", grant == '0);
        flit_rd = 1; @(posedge clk); #1; flit_rd = 0;
        expect_("mod_dt only for first flit", !mod_dt && busy);
        release_o = 1; @(posedge clk); #1; release_o = 0;
        expect_("released", !busy);
      end else begin
        expect_("pointer unchanged", ptr == 4'(rptr) && !busy);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
