// tb_dt_modify: random header, body and tail flits through the dT modifier
// of every output channel. The expected dT is formed from the address of the
// node the channel leads to (own address with the channel's hypercube bit or
// ring bit inverted): DIF_BCH and LOOP are its mismatch with the destination,
// L/R are kept while the hypercube address still differs. Flits without
// MOD_DT and flits on the own-node channel must pass unchanged.
module tb_dt_modify;
  import dlh_pkg::*;
  flit_t    fin;
  dlh_adr_t own;
  logic     mod_dt;
  flit_t    fout [N_CHAN];
  int checks = 0, failures = 0;

  for (genvar c = 0; c < N_CHAN; c++) begin : g
    dt_modify #(.CH(c)) dut (.flit_in(fin), .own, .mod_dt, .flit_out(fout[c]));
  end

  function automatic flit_t ref_mod(flit_t f, logic [20:0] o, int ch);
    logic [20:0] nxt;
    flit_t r;
    nxt = o;
    if (ch < 8) nxt[ch] = ~nxt[ch];
    if (ch == 8) nxt[20] = ~nxt[20];
    r = f;
    if (ch == 11) return r;
    r[28:21] = f[7:0] ^ nxt[7:0];
    r[31]    = f[20] ^ nxt[20];
    r[30]    = f[30] && (f[19:8] != o[19:8]);
    r[29]    = f[29] && (f[19:8] != o[19:8]);
    return r;
  endfunction

  initial begin
    for (int i = 0; i < 400; i++) begin
      own = dlh_adr_t'(21'($urandom));
      fin = {2'($urandom), 32'($urandom)};
      if (i % 3 == 0) fin[19:8] = own.dl;
      mod_dt = (i % 4) != 3;
      #1;
      for (int c = 0; c < N_CHAN; c++) begin
        checks++;
        if (fout[c] !== (mod_dt ? ref_mod(fin, 21'(own), c) : fin)) begin
          failures++;
          $display("ch %0d in %h own %h got %h", c, fin, own, fout[c]);
        end
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
