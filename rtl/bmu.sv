// bmu: branch metric unit, as a handshaking pipeline stage.
//
// For a received soft pair (i0, i1), each in -3..+3, it forms the four branch
// metrics of the code pairs {V1,V2} = 00, 01, 10, 11:
//     bm[{v1,v2}] = (v1 ? -i0 : i0) + (v2 ? -i1 : i1)
// so bm[01] = i0 - i1, and a branch whose code bits agree with the received
// levels (0 sent as -3, 1 as +3) gets the smallest metric, -6. The metrics
// range over -6..+6 and are kept as 5-bit two's complement numbers; the
// decoder keeps the path of smallest metric sum. The add/subtract structure,
// the 01 example and the 5-bit width are the original design's; the sign convention of
// the other three follows from the 01 example.
//
// Interface: input channel carries a sym_t, output channel a bm_vec_t
// (bm[i] for code pair i), both 4-phase bundled data (see hs_ctrl). The
// metrics are registered on the clock that takes the input token.
module bmu
  import viterbi_pkg::*;
(
  input  logic    clk,
  input  logic    rst,
  input  logic    in_req,
  output logic    in_ack,
  input  sym_t    in_data,
  output logic    out_req,
  input  logic    out_ack,
  output bm_vec_t out_data
);

  logic    load;
  bm_vec_t bm;

  hs_ctrl u_hs (
    .clk, .rst,
    .in_req, .in_ack,
    .out_req, .out_ack,
    .produce(1'b1),
    .load, .full()
  );

  always_comb begin
    bm_t a, b;
    a = bm_t'(in_data.i0);
    b = bm_t'(in_data.i1);
    bm[2'b00] = a + b;
    bm[2'b01] = a - b;
    bm[2'b10] = b - a;
    bm[2'b11] = -a - b;
  end

  always_ff @(posedge clk) begin
    if (rst)       out_data <= '0;
    else if (load) out_data <= bm;
  end

endmodule
