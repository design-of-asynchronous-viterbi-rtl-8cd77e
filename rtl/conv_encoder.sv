// conv_encoder: the (2,1,3) rate-1/2 convolutional encoder, constraint length
// K = 3, as a handshaking pipeline stage.
//
// Two shift stages D0 and D1 hold the last two input bits (D0 the newest).
// For an input bit u the two modulo-2 adders give
//     V1 = u ^ D0 ^ D1        V2 = u ^ D1
// after which u shifts into D0 and D0 into D1. These equations and the
// register structure are the original design's; the framing is this implementation's choice:
// the decoder delivers its output in frames of FRAME_LEN bits without tail
// bits, so the encoder clears D0/D1 after every FRAME_LEN-th bit and each frame
// starts in state S0, as the decoder assumes.
//
// Interface: input channel in_* carries a src_tok_t (information bit plus the
// channel perturbation n0/n1, which is passed on untouched to the soft
// mapper); output channel out_* carries an enc_tok_t. Both are 4-phase
// bundled-data channels (see hs_ctrl). One clock after an input token is taken
// its code bits are offered on the output.
module conv_encoder
  import viterbi_pkg::*;
#(
  parameter int FRAME_LEN = viterbi_pkg::FRAME_LEN_DEF
) (
  input  logic     clk,
  input  logic     rst,
  input  logic     in_req,
  output logic     in_ack,
  input  src_tok_t in_data,
  output logic     out_req,
  input  logic     out_ack,
  output enc_tok_t out_data,
  output state_t   state        // current {D1,D0}, for observation
);

  localparam int CNT_W = $clog2(FRAME_LEN + 1);

  logic             d0, d1;
  logic [CNT_W-1:0] bit_cnt;
  logic             load;

  hs_ctrl u_hs (
    .clk, .rst,
    .in_req, .in_ack,
    .out_req, .out_ack,
    .produce(1'b1),
    .load, .full()
  );

  always_ff @(posedge clk) begin
    if (rst) begin
      d0       <= 1'b0;
      d1       <= 1'b0;
      bit_cnt  <= '0;
      out_data <= '0;
    end else if (load) begin
      out_data.v1 <= in_data.data ^ d0 ^ d1;
      out_data.v2 <= in_data.data ^ d1;
      out_data.n0 <= in_data.n0;
      out_data.n1 <= in_data.n1;
      if (bit_cnt == CNT_W'(FRAME_LEN - 1)) begin
        d0      <= 1'b0;
        d1      <= 1'b0;
        bit_cnt <= '0;
      end else begin
        d0      <= in_data.data;
        d1      <= d0;
        bit_cnt <= bit_cnt + 1'b1;
      end
    end
  end

  assign state = {d1, d0};

endmodule
