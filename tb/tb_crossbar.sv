// tb_crossbar: random connections of 12 outputs to 96 queues; each output
// must see its queue's flit and empty flag, an unconnected output nothing,
// and each read strobe must reach exactly the queue it was meant for.
module tb_crossbar;
  import dlh_pkg::*;
  localparam int NI = 96, NO = 12;
  flit_t in_data [NI];
  logic [NI-1:0] in_empty, in_rd;
  logic [NO-1:0] en, out_rd, out_empty;
  logic [6:0] sel [NO];
  flit_t out_data [NO];
  int checks = 0, failures = 0;

  crossbar #(.N_IN(NI), .N_OUT(NO)) dut (.*);

  initial begin
    for (int it = 0; it < 200; it++) begin
      logic [NI-1:0] exp_rd;
      int used [int];
      for (int i = 0; i < NI; i++) in_data[i] = {2'($urandom), 32'($urandom)};
      in_empty = {$urandom, $urandom, $urandom};
      exp_rd = '0;
      used.delete();
      for (int o = 0; o < NO; o++) begin
        int s;
        do s = $urandom % NI; while (used.exists(s));
        used[s] = 1;
        sel[o] = 7'(s);
        en[o] = $urandom % 4 != 0;
        out_rd[o] = 1'($urandom);
        if (en[o] && out_rd[o]) exp_rd[s] = 1;
      end
      #1;
      for (int o = 0; o < NO; o++) begin
        checks++;
        if (en[o] ? (out_data[o] !== in_data[sel[o]] || out_empty[o] !== in_empty[sel[o]])
                  : (out_data[o] !== '0 || !out_empty[o])) begin
          failures++; $display("output %0d wrong", o);
        end
      end
      checks++;
      if (in_rd !== exp_rd) begin failures++; $display("read strobes wrong"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
