// tb_output_channel: a packet presented by the crossbar to hypercube channel
// 3, with gaps where the queue is empty. Checks one-cycle latency into RG_OUT,
// dT rewritten on the header only, body and tail untouched, no read while
// the queue is empty and the release on the tail.
module tb_output_channel;
  import dlh_pkg::*;
  logic clk = 0, rst_n = 0, init = 0, busy = 0, mod_dt = 0, xb_empty = 1;
  dlh_adr_t own;
  flit_t xb_data = '0, out_data;
  logic flit_rd, release_o, out_valid;
  int checks = 0, failures = 0;

  output_channel #(.CH(3)) dut (.*);

  always #5 clk = ~clk;

  task automatic expect_(string what, logic cond);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    flit_t pkt [5];
    flit_t exp_hdr;
    int sent;
    own = dlh_adr_t'({1'b0, 12'h123, 8'b1010_1010});
    pkt[0] = {TF_HEADER, 1'b0, 1'b1, 1'b0, 8'b0000_1001, 1'b0, 12'h124, 8'b1010_0011};
    pkt[1] = {TF_BODY, 32'h1111_1111};
    pkt[2] = {TF_BODY, 32'h2222_2222};
    pkt[3] = {TF_BODY, 32'h3333_3333};
    pkt[4] = {TF_TAIL, 32'h4444_4444};
    // next node across dimension 3: 1010_0010; dest 1010_0011 -> 0000_0001
    exp_hdr = pkt[0];
    exp_hdr[31:21] = {1'b0, 1'b1, 1'b0, 8'b0000_0001};
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(posedge clk); #1;
    expect_("idle", !out_valid && !flit_rd);
    busy = 1; mod_dt = 1;
    sent = 0;
    for (int cyc = 0; sent < 5 && cyc < 30; cyc++) begin
      xb_empty = (cyc == 2 || cyc == 3);
      xb_data = xb_empty ? '0 : pkt[sent];
      #1;
      expect_("read when not empty", flit_rd == !xb_empty);
      expect_("release only on tail", release_o == (!xb_empty && sent == 4));
      @(posedge clk); #1;
      expect_("valid follows read", out_valid == !xb_empty);
      if (!xb_empty) begin
        expect_($sformatf("flit %0d", sent), out_data == (sent == 0 ? exp_hdr : pkt[sent]));
        if (sent == 0) mod_dt = 0;
        sent++;
      end
    end
    busy = 0; xb_empty = 1;
    @(posedge clk); #1;
    expect_("idle after packet", !out_valid);
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
