// tb_acsu: feeds four frames (12 steps each) of branch metrics, made from
// random soft pairs, into the ACS unit with the 4-phase protocol and random
// acknowledge delays. A reference trellis, starting every frame in state 0,
// gives the expected decision bit of every state that a path from state 0 can
// reach, the best state and the end-of-frame flag on the 12th step. The path
// metric memory is also compared with the reference metrics after each step.
module tb_acsu;
  import viterbi_pkg::*;
  import vit_ref_pkg::*;
  localparam int NF = 4;
  localparam int N  = NF * FRAME_LEN_DEF;
  logic clk = 0, rst = 1;
  logic in_req, in_ack, out_req, out_ack;
  bm_vec_t  in_data;
  acs_tok_t out_data;
  int si0 [N], si1 [N];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  acsu dut (.*);

  initial begin
    in_req = 0; in_data = '0;
    repeat (3) @(posedge clk);
    rst <= 0;
    for (int i = 0; i < N; i++) begin
      si0[i] = $urandom_range(0, 6) - 3;
      si1[i] = $urandom_range(0, 6) - 3;
      repeat ($urandom_range(0, 2)) @(posedge clk);
      for (int c = 0; c < 4; c++) in_data[c] <= bm_t'(ref_bm(si0[i], si1[i], c[1], c[0]));
      in_req <= 1;
      @(posedge clk);
      while (!in_ack) @(posedge clk);
      in_req <= 0;
      @(posedge clk);
      while (in_ack) @(posedge clk);
    end
  end

  initial begin
    int pm [4], npm [4], edec [4];
    bit ok [4], nok [4];
    int ebest;
    out_ack = 0;
    wait (rst == 0);
    for (int i = 0; i < N; i++) begin
      @(posedge clk);
      while (!out_req) @(posedge clk);
      if (i % FRAME_LEN_DEF == 0)
        for (int s = 0; s < 4; s++) begin pm[s] = 0; ok[s] = (s == 0); end
      for (int s = 0; s < 4; s++) nok[s] = 0;
      for (int ps = 0; ps < 4; ps++) begin
        if (!ok[ps]) continue;
        for (int u = 0; u < 2; u++) begin
          bit v1, v2;
          int ns, m;
          ref_step(bit'(u), bit'(ps & 1), bit'(ps >> 1), v1, v2);
          ns = ((ps & 1) << 1) | u;
          m  = pm[ps] + ref_bm(si0[i], si1[i], v1, v2);
          if (!nok[ns] || m < npm[ns]) begin nok[ns] = 1; npm[ns] = m; edec[ns] = ps >> 1; end
        end
      end
      ebest = -1;
      for (int s = 0; s < 4; s++) begin
        pm[s] = npm[s]; ok[s] = nok[s];
        if (ok[s] && (ebest < 0 || pm[s] < pm[ebest])) ebest = s;
      end
      for (int s = 0; s < 4; s++) if (ok[s]) begin
        checks++;
        if (int'(out_data.dec[s]) != edec[s]) begin
          failures++; $display("FAIL: step %0d state %0d dec %0d expected %0d", i, s, out_data.dec[s], edec[s]);
        end
        checks++;
        if (int'(dut.pmm[s]) != pm[s]) begin
          failures++; $display("FAIL: step %0d state %0d pm %0d expected %0d", i, s, dut.pmm[s], pm[s]);
        end
      end
      checks++;
      if (int'(out_data.best) != ebest) begin failures++; $display("FAIL: step %0d best %0d expected %0d", i, out_data.best, ebest); end
      checks++;
      if (out_data.last != ((i % FRAME_LEN_DEF) == FRAME_LEN_DEF - 1)) begin failures++; $display("FAIL: step %0d last flag", i); end
      repeat ($urandom_range(0, 3)) @(posedge clk);
      out_ack <= 1;
      @(posedge clk);
      while (out_req) @(posedge clk);
      out_ack <= 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
