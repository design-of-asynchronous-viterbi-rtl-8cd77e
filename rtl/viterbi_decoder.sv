// viterbi_decoder: the asynchronous-style Viterbi decoder for the rate-1/2,
// K = 3 code: branch metric unit -> add-compare-select unit (ACS + path metric
// memory) -> hybrid register exchange survivor memory.
//
// The three units are pipeline stages that talk only through 4-phase
// single-rail bundled-data channels (bd_channel, which also checks the
// protocol): a stage works only when a token reaches it, and a full stage
// holds back its sender. The decoder takes one received soft pair per trellis
// step and, after every FRAME_LEN steps, emits the FRAME_LEN decoded bits of
// that frame (first bit in the MSB). Each frame is assumed to start in state
// S0 (the encoder is cleared between frames).
//
// Interface: in_* is the symbol channel (sym_t: i0 for V1, i1 for V2, each
// -3..+3), out_* the decoded-word channel. The word's request follows the
// acknowledge of the frame's last symbol after about five clocks; throughput
// is one symbol per four clocks when nothing stalls.
module viterbi_decoder
  import viterbi_pkg::*;
#(
  parameter int FRAME_LEN = viterbi_pkg::FRAME_LEN_DEF
) (
  input  logic                 clk,
  input  logic                 rst,
  input  logic                 in_req,
  output logic                 in_ack,
  input  sym_t                 in_data,
  output logic                 out_req,
  input  logic                 out_ack,
  output logic [FRAME_LEN-1:0] out_data
);

  bd_channel #(.W($bits(bm_vec_t)))  ch_bm  (.clk, .rst);
  bd_channel #(.W($bits(acs_tok_t))) ch_acs (.clk, .rst);

  bm_vec_t  bm_data;
  acs_tok_t acs_data;

  assign ch_bm.data  = bm_data;
  assign ch_acs.data = acs_data;

  bmu u_bmu (
    .clk, .rst,
    .in_req, .in_ack, .in_data,
    .out_req(ch_bm.req), .out_ack(ch_bm.ack), .out_data(bm_data)
  );

  acsu #(.FRAME_LEN(FRAME_LEN)) u_acsu (
    .clk, .rst,
    .in_req(ch_bm.req), .in_ack(ch_bm.ack), .in_data(bm_vec_t'(ch_bm.data)),
    .out_req(ch_acs.req), .out_ack(ch_acs.ack), .out_data(acs_data)
  );

  hrem_smu #(.FRAME_LEN(FRAME_LEN)) u_smu (
    .clk, .rst,
    .in_req(ch_acs.req), .in_ack(ch_acs.ack), .in_data(acs_tok_t'(ch_acs.data)),
    .out_req, .out_ack, .out_data
  );

endmodule
