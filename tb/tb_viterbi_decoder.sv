// tb_viterbi_decoder: encodes random 12-bit frames with the reference
// encoder, sends them as soft symbols (+-3) through a noisy channel model and
// through the decoder with the 4-phase protocol, and compares every decoded
// word with the reference Viterbi decoder. Frame groups use increasing noise:
// none (the word must equal the sent bits), one flipped symbol per frame (a
// free distance of 5 means the word must still equal the sent bits; the flip
// avoids the last step of the frame, which has no tail bits), and
// random soft noise (only the reference decoder is the judge). The number of
// clocks from the last symbol's acknowledge to the word's request is bounded.
module tb_viterbi_decoder;
  import viterbi_pkg::*;
  import vit_ref_pkg::*;
  localparam int L  = FRAME_LEN_DEF;
  localparam int NF = 30;
  logic clk = 0, rst = 1;
  logic in_req, in_ack, out_req, out_ack;
  sym_t in_data;
  logic [L-1:0] out_data;
  logic [L-1:0] exp_words [$], sent_words [$];
  bit           must_match [$];
  int checks = 0, failures = 0;
  longint last_ack_cycle, cycle;

  always #5 clk = ~clk;
  always @(posedge clk) cycle++;

  viterbi_decoder dut (.*);

  function automatic int clip3(input int v);
    return v > 3 ? 3 : (v < -3 ? -3 : v);
  endfunction

  initial begin
    in_req = 0; in_data = '0; cycle = 0;
    repeat (3) @(posedge clk);
    rst <= 0;
    for (int f = 0; f < NF; f++) begin
      int_arr_t bits, v1, v2, i0, i1, dout;
      logic [L-1:0] w, sw;
      int flip;
      for (int t = 0; t < L; t++) bits[t] = $urandom_range(0, 1);
      ref_encode(bits, L, v1, v2);
      flip = $urandom_range(0, 2 * L - 3);  // not in the last step, where a path that differs only there is as close
      for (int t = 0; t < L; t++) begin
        i0[t] = v1[t] ? 3 : -3;
        i1[t] = v2[t] ? 3 : -3;
        if (f >= 10 && f < 20) begin
          if (flip == 2 * t)     i0[t] = -i0[t];
          if (flip == 2 * t + 1) i1[t] = -i1[t];
        end else if (f >= 20) begin
          i0[t] = clip3(i0[t] + $urandom_range(0, 8) - 4);
          i1[t] = clip3(i1[t] + $urandom_range(0, 8) - 4);
        end
      end
      ref_decode(i0, i1, L, dout);
      w = '0; sw = '0;
      for (int t = 0; t < L; t++) begin w[L-1-t] = dout[t][0]; sw[L-1-t] = bits[t][0]; end
      exp_words.push_back(w);
      sent_words.push_back(sw);
      must_match.push_back(f < 20);
      for (int t = 0; t < L; t++) begin
        repeat ($urandom_range(0, 2)) @(posedge clk);
        in_data <= '{i0: soft_t'(i0[t]), i1: soft_t'(i1[t])};
        in_req  <= 1;
        @(posedge clk);
        while (!in_ack) @(posedge clk);
        in_req <= 0;
        last_ack_cycle = cycle;
        @(posedge clk);
        while (in_ack) @(posedge clk);
      end
    end
  end

  initial begin
    out_ack = 0;
    wait (rst == 0);
    for (int k = 0; k < NF; k++) begin
      @(posedge clk);
      while (!out_req) @(posedge clk);
      checks++;
      if (out_data != exp_words[k]) begin
        failures++; $display("FAIL: frame %0d word %b expected %b", k, out_data, exp_words[k]);
      end
      if (must_match[k]) begin
        checks++;
        if (out_data != sent_words[k]) begin
          failures++; $display("FAIL: frame %0d word %b differs from sent %b", k, out_data, sent_words[k]);
        end
      end
      checks++;
      if (cycle - last_ack_cycle > 40) begin
        failures++; $display("FAIL: frame %0d word came %0d clocks after the last symbol", k, cycle - last_ack_cycle);
      end
      repeat ($urandom_range(0, 6)) @(posedge clk);
      out_ack <= 1;
      @(posedge clk);
      while (out_req) @(posedge clk);
      out_ack <= 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
