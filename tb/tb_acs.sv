// tb_acs: drives the combinational add-compare-select with random path
// metrics (with deliberate ties) and with branch metrics of random soft
// pairs, and compares new metrics, decisions and best state with a reference
// built from the trellis by forward enumeration of (state, input) pairs.
module tb_acs;
  import viterbi_pkg::*;
  import vit_ref_pkg::*;
  localparam int PM_W = pm_width(FRAME_LEN_DEF);
  logic signed [PM_W-1:0] pm [N_STATES], pm_new [N_STATES];
  bm_vec_t bm;
  logic [N_STATES-1:0] dec;
  state_t best;
  int checks = 0, failures = 0;

  acs dut (.*);

  initial begin
    for (int it = 0; it < 2000; it++) begin
      int i0, i1, epm [4], edec [4], eset [4], ebest;
      i0 = $urandom_range(0, 6) - 3;
      i1 = $urandom_range(0, 6) - 3;
      for (int c = 0; c < 4; c++) bm[c] = bm_t'(ref_bm(i0, i1, c[1], c[0]));
      for (int s = 0; s < 4; s++) pm[s] = PM_W'(int'($urandom_range(0, (it % 2) ? 8 : 120)) - 60);
      for (int s = 0; s < 4; s++) eset[s] = 0;
      for (int ps = 0; ps < 4; ps++)
        for (int u = 0; u < 2; u++) begin
          bit v1, v2;
          int ns, m;
          ref_step(bit'(u), bit'(ps & 1), bit'(ps >> 1), v1, v2);
          ns = ((ps & 1) << 1) | u;
          m  = int'(pm[ps]) + ref_bm(i0, i1, v1, v2);
          if (!eset[ns] || m < epm[ns]) begin
            eset[ns] = 1; epm[ns] = m; edec[ns] = ps >> 1;
          end
        end
      ebest = 0;
      for (int s = 1; s < 4; s++) if (epm[s] < epm[ebest]) ebest = s;
      #1;
      for (int s = 0; s < 4; s++) begin
        checks++;
        if (int'(pm_new[s]) != epm[s] || int'(dec[s]) != edec[s]) begin
          failures++;
          $display("FAIL: state %0d pm %0d dec %0d expected %0d %0d", s, pm_new[s], dec[s], epm[s], edec[s]);
        end
      end
      checks++;
      if (int'(best) != ebest) begin failures++; $display("FAIL: best %0d expected %0d", best, ebest); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
