// tb_input_buffer: fills the eight queues of one input buffer packet by
// packet and checks that each packet lands in the first free queue, that
// CHAN_LOAD rises with two and one free queues left, CHAN_BUSY and the loss
// of PACK_WAIT when none is left, that PACK_WAIT is low while a packet is
// being received, and DATA_ACK after each tail. Freeing a queue by reading
// its packet makes it the selected queue again.
module tb_input_buffer;
  import dlh_pkg::*;
  localparam int NQ = 8, DEPTH = 8;
  logic clk = 0, rst_n = 0, init = 0, valid_data = 0;
  flit_t data_in = '0;
  logic pack_wait, chan_busy, chan_load, data_ack, drop;
  logic [NQ-1:0] q_rd_en = '0;
  flit_t q_rd_data [NQ];
  flit_t q_hdr [NQ];
  logic [NQ-1:0] q_cnt_equ, q_busy, q_hdr_valid, q_tail_rd, q_ovf;
  int checks = 0, failures = 0;

  input_buffer #(.NQ(NQ), .DEPTH(DEPTH)) dut (.*);

  always #5 clk = ~clk;

  task automatic expect_(string what, logic cond);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  task automatic send(int len, int tag);
    for (int i = 0; i < len; i++) begin
      valid_data = 1;
      data_in = {(i == 0 ? TF_HEADER : (i == len - 1 ? TF_TAIL : TF_BODY)), 32'(tag * 256 + i)};
      #1;
      if (i > 0) expect_("pack_wait low while receiving", !pack_wait);
      @(posedge clk); #1;
    end
    valid_data = 0;
    expect_("data_ack after tail", data_ack);
    @(posedge clk); #1;
    expect_("data_ack is a pulse", !data_ack);
  endtask

  task automatic drain(int q);
    int n = 0;
    while (!q_cnt_equ[q] && n < 20) begin
      q_rd_en[q] = 1; #1;
      if (n == 0) expect_("queue holds the header", q_rd_data[q][33:32] == TF_HEADER);
      @(posedge clk); #1; n++;
    end
    q_rd_en[q] = 0;
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(posedge clk); #1;
    expect_("idle: pack_wait", pack_wait && !chan_busy && !chan_load);
    for (int p = 0; p < NQ; p++) begin
      expect_("pack_wait before packet", pack_wait);
      expect_("chan_load", chan_load == ((NQ - p) <= 2));
      send(2 + p % 5, p);
      expect_($sformatf("packet %0d in queue %0d", p, p), q_busy[p] && q_hdr[p][7:0] == 8'(p * 256) && q_hdr_valid[p]);
    end
    expect_("chan_busy when all busy", chan_busy && !pack_wait && !chan_load);
    // a header now is dropped
    valid_data = 1; data_in = {TF_HEADER, 32'h0}; #1;
    expect_("header dropped when busy", drop);
    @(posedge clk); #1; valid_data = 0;
    // free queue 5 and queue 2; queue 2 must be selected next
    drain(5);
    drain(2);
    @(posedge clk); #1;
    expect_("not busy after freeing", !chan_busy && pack_wait && chan_load);
    send(3, 40);
    expect_("first free queue reused", q_hdr[2][15:0] == 16'(40 * 256));
    send(3, 41);
    expect_("next free queue", q_hdr[5][15:0] == 16'(41 * 256));
    expect_("busy again", chan_busy);
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
