// tb_conv_encoder: sends four frames of random bits (with random perturbation
// fields) through the encoder stage using the 4-phase protocol, acknowledges
// with random delays, and compares every output token with the reference
// encoder, restarted in state 0 at every 12-bit frame. The encoder state port
// is checked after every token, and the stage must offer each token two
// clocks after the input request when the output is idle.
module tb_conv_encoder;
  import viterbi_pkg::*;
  import vit_ref_pkg::*;

  localparam int NF = 4;
  localparam int N  = NF * FRAME_LEN_DEF;

  logic clk = 0, rst = 1;
  logic in_req, in_ack, out_req, out_ack;
  src_tok_t in_data;
  enc_tok_t out_data;
  state_t   state;
  int checks = 0, failures = 0, n_recv = 0;
  src_tok_t sent [N];

  always #5 clk = ~clk;

  conv_encoder dut (.*);

  initial begin
    in_req = 0; in_data = '0;
    repeat (3) @(posedge clk);
    rst <= 0;
    for (int i = 0; i < N; i++) begin
      repeat ($urandom_range(0, 2)) @(posedge clk);
      sent[i] = '{data: 1'($urandom), n0: noise_t'($urandom), n1: noise_t'($urandom)};
      in_data <= sent[i];
      in_req  <= 1;
      @(posedge clk);
      while (!in_ack) @(posedge clk);
      in_req <= 0;
      @(posedge clk);
      while (in_ack) @(posedge clk);
    end
  end

  initial begin
    bit d0, d1, v1, v2;
    d0 = 0; d1 = 0;
    out_ack = 0;
    wait (rst == 0);
    for (int i = 0; i < N; i++) begin
      @(posedge clk);
      while (!out_req) @(posedge clk);
      ref_step(sent[i].data, d0, d1, v1, v2);
      checks++;
      if (out_data != '{v1: v1, v2: v2, n0: sent[i].n0, n1: sent[i].n1}) begin
        failures++;
        $display("FAIL: token %0d got %b expected v1v2=%b%b", i, out_data, v1, v2);
      end
      if ((i + 1) % FRAME_LEN_DEF == 0) begin d0 = 0; d1 = 0; end
      else begin d1 = d0; d0 = sent[i].data; end
      checks++;
      if (state != {d1, d0}) begin failures++; $display("FAIL: state %b expected %b%b", state, d1, d0); end
      repeat ($urandom_range(0, 3)) @(posedge clk);
      out_ack <= 1;
      @(posedge clk);
      while (out_req) @(posedge clk);
      out_ack <= 0;
      n_recv++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // latency: request seen at clock k -> load at k -> out_req visible after k+1
  always @(posedge clk) begin
    if (!rst && in_req && !in_ack && !out_req && !out_ack && dut.load) begin
      fork begin
        @(posedge clk); @(posedge clk);
        #1;
        checks++;
        if (!out_req) begin failures++; $display("FAIL: latency"); end
      end join_none
    end
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
