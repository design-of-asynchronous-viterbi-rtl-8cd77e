// tb_soft_mapper: exhaustive check of the soft mapper over both code bits and
// every 4-bit perturbation: the symbol must be clip(+-3 + n, -3, +3), with a
// code bit 1 mapped to +3 and 0 to -3 when there is no perturbation.
module tb_soft_mapper;
  import viterbi_pkg::*;
  enc_tok_t tok;
  sym_t     sym;
  int checks = 0, failures = 0;

  soft_mapper dut (.tok, .sym);

  function automatic int clip3(input int v);
    return v > 3 ? 3 : (v < -3 ? -3 : v);
  endfunction

  initial begin
    for (int v1 = 0; v1 < 2; v1++)
      for (int v2 = 0; v2 < 2; v2++)
        for (int n0 = -8; n0 < 8; n0++)
          for (int n1 = -8; n1 < 8; n1++) begin
            int e0, e1;
            tok = '{v1: 1'(v1), v2: 1'(v2), n0: noise_t'(n0), n1: noise_t'(n1)};
            #1;
            e0 = clip3((v1 != 0 ? 3 : -3) + n0);
            e1 = clip3((v2 != 0 ? 3 : -3) + n1);
            checks++;
            if (int'(sym.i0) != e0 || int'(sym.i1) != e1) begin
              failures++;
              $display("FAIL: v=%0d%0d n=%0d,%0d got %0d,%0d expected %0d,%0d",
                       v1, v2, n0, n1, sym.i0, sym.i1, e0, e1);
            end
          end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
