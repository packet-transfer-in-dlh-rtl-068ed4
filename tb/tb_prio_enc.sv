// tb_prio_enc: exhaustive check of the 8:3 priority encoder against a
// reference that scans the free flags from queue 0 upwards.
module tb_prio_enc;
  logic [7:0] free;
  logic [2:0] idx;
  logic       any;
  int checks = 0, failures = 0;

  prio_enc #(.N(8)) dut (.free, .idx, .any);

  initial begin
    for (int v = 0; v < 256; v++) begin
      int exp_idx;
      exp_idx = -1;
      for (int i = 0; i < 8; i++) if (exp_idx < 0 && v[i]) exp_idx = i;
      free = 8'(v);
      #1;
      checks++;
      if (any !== (exp_idx >= 0)) begin failures++; $display("any wrong for %b", free); end
      if (exp_idx >= 0) begin
        checks++;
        if (idx !== 3'(exp_idx)) begin failures++; $display("idx %0d for %b, want %0d", idx, free, exp_idx); end
      end
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
