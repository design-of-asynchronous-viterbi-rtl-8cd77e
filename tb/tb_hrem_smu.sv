// tb_hrem_smu: two parts.
// 1. A hand-built decision sequence reproduces the register contents of the
//    worked HREM example: after step 4 the registers of S3, S2, S1, S0 end in
//    1011, 1010, 1101, 0000, and after step 6 those of S2, S1, S0 end in
//    110110, 101101, 000000.
// 2. Random frames: soft pairs are run through a reference trellis that
//    produces the per-step decision bits, best state and end-of-frame flag
//    exactly as the ACS unit sends them; the word the survivor memory emits
//    for each frame must equal the output of the reference Viterbi decoder
//    (full survivor paths, updated every step).
// Throughout, the survivor registers may change only on even steps (the
// register exchange happens once every two steps).
module tb_hrem_smu;
  import viterbi_pkg::*;
  import vit_ref_pkg::*;
  localparam int L  = FRAME_LEN_DEF;
  localparam int NF = 6;
  logic clk = 0, rst = 1;
  logic in_req, in_ack, out_req, out_ack;
  acs_tok_t in_data;
  logic [L-1:0] out_data;
  int checks = 0, failures = 0;
  int n_words = 0;
  logic [L-1:0] exp_words [$];
  int step_in_frame = 0;

  always #5 clk = ~clk;

  hrem_smu dut (.*);

  task automatic send(input acs_tok_t tok);
    repeat ($urandom_range(0, 2)) @(posedge clk);
    in_data <= tok;
    in_req  <= 1;
    @(posedge clk);
    while (!in_ack) @(posedge clk);
    in_req <= 0;
    @(posedge clk);
    while (in_ack) @(posedge clk);
  endtask

  task automatic check_reg(input int s, input int nbits, input logic [L-1:0] exp_v, input string what);
    logic [L-1:0] mask;
    mask = (L'(1) << nbits) - 1;
    checks++;
    if ((dut.sreg[s] & mask) != exp_v) begin
      failures++;
      $display("FAIL: %s: S%0d register %b expected ...%b", what, s, dut.sreg[s] & mask, exp_v);
    end
  endtask

  // decision vectors are written {S3,S2,S1,S0}
  initial begin
    in_req = 0; in_data = '0;
    repeat (3) @(posedge clk);
    rst <= 0;
    // ---- part 1: the worked example, steps 1..6 of a frame ----
    send('{dec: 4'b0000, best: 2'd0, last: 1'b0});
    send('{dec: 4'b0000, best: 2'd0, last: 1'b0});
    send('{dec: 4'b0110, best: 2'd0, last: 1'b0});   // step 3: S2 -> 1, S1 -> 1, S0 -> 0
    send('{dec: 4'b0010, best: 2'd0, last: 1'b0});   // step 4: S3 0, S2 0, S1 1, S0 0
    check_reg(3, 4, L'('b1011), "t=4");
    check_reg(2, 4, L'('b1010), "t=4");
    check_reg(1, 4, L'('b1101), "t=4");
    check_reg(0, 4, L'('b0000), "t=4");
    send('{dec: 4'b0100, best: 2'd0, last: 1'b0});   // step 5: S3 0, S2 1, S1 0, S0 0
    send('{dec: 4'b0110, best: 2'd0, last: 1'b0});   // step 6: S3 0, S2 1, S1 1, S0 0
    check_reg(2, 6, L'('b110110), "t=6");
    check_reg(1, 6, L'('b101101), "t=6");
    check_reg(0, 6, L'('b000000), "t=6");
    // with all later decisions 0, S1 = {0,1} at step L traces back through S0
    // only, so the frame word is S0's all-zero history followed by 01
    exp_words.push_back(L'('b01));
    for (int t = 7; t <= L; t++) send('{dec: 4'b0000, best: 2'd1, last: (t == L)});
    // ---- part 2: random frames ----
    for (int f = 0; f < NF; f++) begin
      int_arr_t i0, i1, dout;
      int pm [4], npm [4], edec [4];
      bit ok [4], nok [4];
      logic [L-1:0] w;
      for (int t = 0; t < L; t++) begin
        // arbitrary soft pairs: the survivor memory must follow any decisions
        i0[t] = $urandom_range(0, 6) - 3;
        i1[t] = $urandom_range(0, 6) - 3;
      end
      ref_decode(i0, i1, L, dout);
      w = '0;
      for (int t = 0; t < L; t++) w[L-1-t] = dout[t][0];
      exp_words.push_back(w);
      for (int s = 0; s < 4; s++) begin pm[s] = 0; ok[s] = (s == 0); end
      for (int t = 0; t < L; t++) begin
        int best;
        for (int s = 0; s < 4; s++) begin nok[s] = 0; edec[s] = 0; end
        for (int ps = 0; ps < 4; ps++) begin
          if (!ok[ps]) continue;
          for (int u = 0; u < 2; u++) begin
            bit v1, v2;
            int ns, m;
            ref_step(bit'(u), bit'(ps & 1), bit'(ps >> 1), v1, v2);
            ns = ((ps & 1) << 1) | u;
            m  = pm[ps] + ref_bm(i0[t], i1[t], v1, v2);
            if (!nok[ns] || m < npm[ns]) begin nok[ns] = 1; npm[ns] = m; edec[ns] = ps >> 1; end
          end
        end
        best = -1;
        for (int s = 0; s < 4; s++) begin
          pm[s] = npm[s]; ok[s] = nok[s];
          if (ok[s] && (best < 0 || pm[s] < pm[best])) best = s;
        end
        send('{dec: {1'(edec[3]), 1'(edec[2]), 1'(edec[1]), 1'(edec[0])},
               best: state_t'(best), last: (t == L - 1)});
      end
    end
  end

  // sink
  initial begin
    out_ack = 0;
    wait (rst == 0);
    for (int k = 0; k < NF + 1; k++) begin
      @(posedge clk);
      while (!out_req) @(posedge clk);
      checks++;
      if (out_data != exp_words[k]) begin
        failures++; $display("FAIL: frame %0d word %b expected %b", k, out_data, exp_words[k]);
      end
      n_words++;
      repeat ($urandom_range(0, 5)) @(posedge clk);
      out_ack <= 1;
      @(posedge clk);
      while (out_req) @(posedge clk);
      out_ack <= 0;
    end
    repeat (5) @(posedge clk);
    checks++;
    if (n_words != NF + 1) begin failures++; $display("FAIL: words %0d", n_words); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // the registers move only on even steps
  logic [L-1:0] sreg_q [N_STATES];
  logic         odd_q, load_q, last_q;
  always @(posedge clk) begin
    if (!rst && load_q && odd_q && !last_q) begin
      for (int s = 0; s < N_STATES; s++) begin
        checks++;
        if (dut.sreg[s] != sreg_q[s]) begin failures++; $display("FAIL: S%0d register moved on an odd step", s); end
      end
    end
    sreg_q <= dut.sreg;
    odd_q  <= dut.odd_step;
    load_q <= dut.load;
    last_q <= in_data.last;
  end

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
