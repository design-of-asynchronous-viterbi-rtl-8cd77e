// enc_dec: convolutional encoder and asynchronous Viterbi decoder joined
// end to end, with a 12-bit decoded output word.
//
// An information bit enters on the input channel together with a channel
// perturbation for its two code symbols. The encoder stage produces the code
// pair (V1,V2); the soft mapper turns it into two soft symbols (0 -> -3,
// 1 -> +3, plus the perturbation, clipped to -3..+3); the Viterbi decoder
// (BMU -> ACSU -> HREM survivor memory) returns each frame of FRAME_LEN bits as
// one word on dec_out. Every link is a 4-phase bundled-data channel, so the
// whole chain runs only while tokens move and stalls cleanly when the output
// is not acknowledged. Encoder and decoder both count FRAME_LEN bits per frame
// and restart in state S0 at each frame.
//
// Ports: clk, reset (synchronous, active high), e_inp with its perturbation
// e_noise0/e_noise1 (signed, for V1/V2) on the 4-phase channel e_req/e_ack,
// and dec_out on the 4-phase channel dec_req/dec_ack. clk, reset, e_inp and a
// 12-bit dec_out follow the original design's top level; the handshake wires and the
// perturbation inputs are this implementation's additions. With zero perturbation,
// dec_out equals the FRAME_LEN input bits of the frame, first bit in the MSB.
module enc_dec
  import viterbi_pkg::*;
#(
  parameter int FRAME_LEN = viterbi_pkg::FRAME_LEN_DEF
) (
  input  logic                 clk,
  input  logic                 reset,
  input  logic                 e_inp,
  input  noise_t               e_noise0,
  input  noise_t               e_noise1,
  input  logic                 e_req,
  output logic                 e_ack,
  output logic [FRAME_LEN-1:0] dec_out,
  output logic                 dec_req,
  input  logic                 dec_ack
);

  bd_channel #(.W($bits(src_tok_t))) ch_src (.clk, .rst(reset));
  bd_channel #(.W($bits(enc_tok_t))) ch_enc (.clk, .rst(reset));
  bd_channel #(.W(FRAME_LEN))        ch_dec (.clk, .rst(reset));

  enc_tok_t enc_data;
  sym_t     sym;

  assign ch_src.req  = e_req;
  assign e_ack       = ch_src.ack;
  assign ch_src.data = src_tok_t'{data: e_inp, n0: e_noise0, n1: e_noise1};
  assign ch_enc.data = enc_data;

  conv_encoder #(.FRAME_LEN(FRAME_LEN)) u_enc (
    .clk, .rst(reset),
    .in_req(ch_src.req), .in_ack(ch_src.ack), .in_data(src_tok_t'(ch_src.data)),
    .out_req(ch_enc.req), .out_ack(ch_enc.ack), .out_data(enc_data),
    .state()
  );

  soft_mapper u_map (
    .tok(enc_tok_t'(ch_enc.data)), .sym
  );

  viterbi_decoder #(.FRAME_LEN(FRAME_LEN)) u_dec (
    .clk, .rst(reset),
    .in_req(ch_enc.req), .in_ack(ch_enc.ack), .in_data(sym),
    .out_req(ch_dec.req), .out_ack(ch_dec.ack), .out_data(ch_dec.data)
  );

  assign dec_req    = ch_dec.req;
  assign ch_dec.ack = dec_ack;
  assign dec_out    = ch_dec.data;

endmodule
