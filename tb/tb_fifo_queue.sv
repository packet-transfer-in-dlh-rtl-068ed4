// tb_fifo_queue: writes packets of several lengths into one queue while a
// reader follows one cycle behind (cut-through), and checks flit order, the
// empty flag CNT_EQU, the busy flag, the header register, the release on the
// tail and the overflow flag.
module tb_fifo_queue;
  import dlh_pkg::*;
  localparam int DEPTH = 8;
  logic  clk = 0, rst_n = 0, init = 0, wr_en = 0, rd_en = 0;
  flit_t wr_data = '0, rd_data, hdr;
  logic  cnt_equ, busy, hdr_valid, tail_rd, ovf;
  int checks = 0, failures = 0;

  fifo_queue #(.DEPTH(DEPTH)) dut (.*);

  always #5 clk = ~clk;

  task automatic expect_(string what, logic cond);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  function automatic flit_t mk(flit_type_e t, int n);
    return {t, 32'(32'hA5000000 + n)};
  endfunction

  // send a packet of len flits; read starts the cycle after the header
  task automatic packet(int len, int lag);
    flit_t pkt [$];
    int rd_i = 0;
    for (int i = 0; i < len; i++)
      pkt.push_back(mk(i == 0 ? TF_HEADER : (i == len - 1 ? TF_TAIL : TF_BODY), $urandom));
    for (int cyc = 0; cyc < len + lag + 2; cyc++) begin
      wr_en   = cyc < len;
      wr_data = cyc < len ? pkt[cyc] : '0;
      rd_en   = (cyc >= lag) && (rd_i < len);
      #1;
      if (cyc == 0) expect_("empty before header", cnt_equ);
      if (rd_en) begin
        expect_("not empty while reading", !cnt_equ);
        expect_("read data", rd_data == pkt[rd_i]);
        expect_("tail flag", tail_rd == (rd_i == len - 1));
        if (rd_i == 1) expect_("header register", hdr_valid && hdr == pkt[0]);
        rd_i++;
      end
      @(posedge clk); #1;
      if (cyc == 0) expect_("busy after header", busy);
    end
    expect_("all flits read", rd_i == len);
    expect_("free after tail", !busy && cnt_equ && !hdr_valid);
    wr_en = 0; rd_en = 0;
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(posedge clk); #1;
    expect_("free after reset", !busy && cnt_equ);
    packet(2, 1);
    packet(5, 1);
    packet(DEPTH, 3);
    packet(DEPTH, DEPTH);      // store-and-forward case
    // overflow: DEPTH+1 flits without reading
    for (int i = 0; i <= DEPTH; i++) begin
      wr_en = 1; wr_data = mk(i == 0 ? TF_HEADER : TF_BODY, i);
      #1;
      if (i == DEPTH) expect_("overflow flagged", ovf);
      else            expect_("no overflow", !ovf);
      @(posedge clk); #1;
    end
    wr_en = 0;
    init = 1; @(posedge clk); #1; init = 0;
    expect_("init clears", !busy && cnt_equ);
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
