// tb_enc_dec: end-to-end test of the encoder + decoder top at its default
// size (12-bit frames). Random information bits enter on the input channel
// with a per-bit channel perturbation; decoded words leave on dec_out.
// Frame groups:
//   clean     no perturbation: dec_out must equal the frame's input bits;
//   one flip  one code symbol driven to the opposite level (not in the last
//             step): the error must be corrected;
//   noisy     random perturbation on every symbol: dec_out must equal the
//             reference Viterbi decoder's output for the clipped soft symbols.
// The output side sometimes withholds its acknowledge for a long time so the
// pipeline stalls back to the input. The test counts how often each mechanism
// of the design happened and fails if one never did: frames decoded, an
// error corrected, a survivor decision of 1, a register move in the survivor
// memory from a different state (and an odd step with no register move), a
// frame ending in a state other than S0, a soft symbol clipped to +-3, and a
// stall of the input channel caused by the output.
module tb_enc_dec;
  import viterbi_pkg::*;
  import vit_ref_pkg::*;
  localparam int L  = FRAME_LEN_DEF;
  localparam int NF = 36;

  logic clk = 0, reset = 1;
  logic e_inp, e_req, e_ack, dec_req, dec_ack;
  noise_t e_noise0, e_noise1;
  logic [L-1:0] dec_out;
  logic [L-1:0] exp_words [$], sent_words [$];
  int           kind_q [$];
  int checks = 0, failures = 0;
  int n_frames = 0, n_corrected = 0, n_dec1 = 0, n_move = 0, n_hold = 0;
  int n_best_nz = 0, n_clip = 0, n_stall = 0, stall_run = 0;

  always #5 clk = ~clk;

  enc_dec dut (.*);

  function automatic int clip3(input int v);
    return v > 3 ? 3 : (v < -3 ? -3 : v);
  endfunction

  // source
  initial begin
    e_req = 0; e_inp = 0; e_noise0 = '0; e_noise1 = '0;
    repeat (3) @(posedge clk);
    reset <= 0;
    for (int f = 0; f < NF; f++) begin
      int_arr_t bits, v1, v2, i0, i1, n0, n1, dout;
      logic [L-1:0] w, sw;
      int kind, flip;
      kind = f % 3;   // 0 clean, 1 one flip, 2 noisy
      for (int t = 0; t < L; t++) bits[t] = $urandom_range(0, 1);
      ref_encode(bits, L, v1, v2);
      flip = $urandom_range(0, 2 * L - 3);
      for (int t = 0; t < L; t++) begin
        n0[t] = 0; n1[t] = 0;
        if (kind == 1) begin
          if (flip == 2 * t)     n0[t] = v1[t] ? -6 : 6;
          if (flip == 2 * t + 1) n1[t] = v2[t] ? -6 : 6;
        end else if (kind == 2) begin
          n0[t] = $urandom_range(0, 10) - 5;
          n1[t] = $urandom_range(0, 10) - 5;
        end
        i0[t] = clip3((v1[t] ? 3 : -3) + n0[t]);
        i1[t] = clip3((v2[t] ? 3 : -3) + n1[t]);
      end
      ref_decode(i0, i1, L, dout);
      w = '0; sw = '0;
      for (int t = 0; t < L; t++) begin w[L-1-t] = dout[t][0]; sw[L-1-t] = bits[t][0]; end
      exp_words.push_back(w);
      sent_words.push_back(sw);
      kind_q.push_back(kind);
      for (int t = 0; t < L; t++) begin
        repeat ($urandom_range(0, 2)) @(posedge clk);
        e_inp    <= bits[t][0];
        e_noise0 <= noise_t'(n0[t]);
        e_noise1 <= noise_t'(n1[t]);
        e_req    <= 1;
        @(posedge clk);
        while (!e_ack) @(posedge clk);
        e_req <= 0;
        @(posedge clk);
        while (e_ack) @(posedge clk);
      end
    end
  end

  // sink
  initial begin
    dec_ack = 0;
    wait (reset == 0);
    for (int k = 0; k < NF; k++) begin
      @(posedge clk);
      while (!dec_req) @(posedge clk);
      n_frames++;
      checks++;
      if (dec_out != exp_words[k]) begin
        failures++; $display("FAIL: frame %0d dec_out %b expected %b", k, dec_out, exp_words[k]);
      end
      if (kind_q[k] != 2) begin
        checks++;
        if (dec_out != sent_words[k]) begin
          failures++; $display("FAIL: frame %0d dec_out %b sent %b", k, dec_out, sent_words[k]);
        end else if (kind_q[k] == 1) n_corrected++;
      end
      // every fourth frame the receiver is slow, so the pipeline backs up
      repeat ((k % 4 == 3) ? 120 : $urandom_range(0, 4)) @(posedge clk);
      dec_ack <= 1;
      @(posedge clk);
      while (dec_req) @(posedge clk);
      dec_ack <= 0;
    end
    repeat (5) @(posedge clk);
    checks++; if (n_frames != NF) begin failures++; $display("FAIL: %0d frames", n_frames); end
    $display("mechanisms: frames=%0d corrected=%0d decision1=%0d hrem_moves=%0d odd_holds=%0d best_not_S0=%0d clipped=%0d stalls=%0d",
             n_frames, n_corrected, n_dec1, n_move, n_hold, n_best_nz, n_clip, n_stall);
    checks++; if (n_corrected == 0) begin failures++; $display("FAIL: no error corrected"); end
    checks++; if (n_dec1 == 0)      begin failures++; $display("FAIL: no decision 1"); end
    checks++; if (n_move == 0)      begin failures++; $display("FAIL: no HREM register move"); end
    checks++; if (n_hold == 0)      begin failures++; $display("FAIL: no odd-step hold"); end
    checks++; if (n_best_nz == 0)   begin failures++; $display("FAIL: no frame ending outside S0"); end
    checks++; if (n_clip == 0)      begin failures++; $display("FAIL: no clipped symbol"); end
    checks++; if (n_stall == 0)     begin failures++; $display("FAIL: no input stall"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // mechanism counters (observation only)
  always @(posedge clk) if (!reset) begin
    if (dut.u_dec.u_acsu.load && |dut.u_dec.u_acsu.dec) n_dec1++;
    if (dut.u_dec.u_smu.load) begin
      if (dut.u_dec.u_smu.odd_step) n_hold++;
      else for (int s = 0; s < N_STATES; s++) if (int'(dut.u_dec.u_smu.pre[s]) != s) n_move++;
      if (dut.u_dec.u_smu.in_data.last && dut.u_dec.u_smu.in_data.best != '0) n_best_nz++;
    end
    if (dut.ch_enc.req && !dut.ch_enc.ack &&
        ((dut.u_enc.out_data.n0 != 0 && (dut.sym.i0 == 3 || dut.sym.i0 == -3) &&
          (dut.u_enc.out_data.v1 ? 3 + int'(dut.u_enc.out_data.n0) : -3 + int'(dut.u_enc.out_data.n0)) != int'(dut.sym.i0))))
      n_clip++;
    // the input waits while the output is being withheld
    if (e_req && !e_ack && dec_req && !dec_ack) stall_run++;
    else stall_run = 0;
    if (stall_run == 10) n_stall++;
  end

  initial begin
    repeat (60000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
