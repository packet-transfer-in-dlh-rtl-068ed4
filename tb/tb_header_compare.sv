// tb_header_compare: random and equal addresses through the three
// destination comparators; the expected bits come from field-by-field
// comparison of the raw 21-bit addresses.
module tb_header_compare;
  import dlh_pkg::*;
  dlh_adr_t dest, own;
  logic loop_eq, lr_eq, bch_eq, hit;
  int checks = 0, failures = 0;

  header_compare dut (.dest, .own, .loop_eq, .lr_eq, .bch_eq, .hit);

  task automatic check(logic [20:0] d, logic [20:0] o);
    logic e1, e2, e3;
    dest = dlh_adr_t'(d);
    own  = dlh_adr_t'(o);
    #1;
    e1 = d[20] == o[20];
    e2 = d[19:8] == o[19:8];
    e3 = d[7:0] == o[7:0];
    checks++;
    if ({loop_eq, lr_eq, bch_eq, hit} !== {e1, e2, e3, e1 & e2 & e3}) begin
      failures++;
      $display("d=%h o=%h got %b%b%b%b", d, o, loop_eq, lr_eq, bch_eq, hit);
    end
  endtask

  initial begin
    for (int i = 0; i < 500; i++) begin
      logic [20:0] a, b;
      a = 21'($urandom);
      b = a;
      case (i % 5)
        0: b = a;
        1: b[20] = ~a[20];
        2: b[19:8] = 12'($urandom);
        3: b[7:0] = a[7:0] ^ (8'd1 << (i % 8));
        default: b = 21'($urandom);
      endcase
      check(a, b);
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
