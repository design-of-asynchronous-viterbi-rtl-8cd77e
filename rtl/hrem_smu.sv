// hrem_smu: survivor memory unit using the hybrid register exchange method
// (HREM), as a handshaking pipeline stage.
//
// Every state s has a register holding the information bits of its survivor
// path. Plain register exchange would copy all four registers at every trellis
// step. HREM instead updates them only every m = K-1 = 2 steps: on an odd step
// it just stores the four decision bits; on the following even step it traces
// each state back two steps through the two stored decision vectors
// ("pretraceback"). For s = {a,b} the decision x1 = dec_t[s] names the
// predecessor {x1,a}, whose decision x2 = dec_t-1[{x1,a}] names the state
// {x2,x1} two steps back. The new register of s is the register of {x2,x1}
// followed by the two bits of s itself, which are the two information bits of
// those steps (a, then b). Memory writes and register moves thus happen once
// every two steps. After the last step of a frame (FRAME_LEN steps, which must
// be even) the register of the state with the smallest path metric is the
// decoded frame, first bit in the MSB; it is sent on the output channel and
// the registers are cleared for the next frame. The pretraceback/append rule is
// the original design's; frame-wise output and best-state selection are this implementation's
// choices.
//
// Interface: input channel carries an acs_tok_t per trellis step, output
// channel one FRAME_LEN-bit word per frame, 4-phase bundled data (see hs_ctrl).
module hrem_smu
  import viterbi_pkg::*;
#(
  parameter int FRAME_LEN = viterbi_pkg::FRAME_LEN_DEF
) (
  input  logic                 clk,
  input  logic                 rst,
  input  logic                 in_req,
  output logic                 in_ack,
  input  acs_tok_t             in_data,
  output logic                 out_req,
  input  logic                 out_ack,
  output logic [FRAME_LEN-1:0] out_data
);

  typedef logic [FRAME_LEN-1:0] sreg_t;

  sreg_t               sreg     [N_STATES];  // one survivor register per state
  sreg_t               sreg_new [N_STATES];
  logic [N_STATES-1:0] dec_prev;             // decisions of the odd step
  logic                odd_step;             // next token is step 1, 3, 5, ...
  state_t              pre      [N_STATES];  // pretraceback result per state
  logic                load;

  initial assert (FRAME_LEN % M == 0 && FRAME_LEN >= 2 * M)
    else $error("hrem_smu: FRAME_LEN must be an even number of at least 4");

  hs_ctrl u_hs (
    .clk, .rst,
    .in_req, .in_ack,
    .out_req, .out_ack,
    .produce(in_data.last),
    .load, .full()
  );

  // Pretraceback over two steps and register exchange.
  always_comb begin
    logic   x1, x2;
    state_t p1;
    for (int s = 0; s < N_STATES; s++) begin
      x1          = in_data.dec[s];
      p1          = {x1, s[1]};
      x2          = dec_prev[p1];
      pre[s]      = {x2, x1};
      sreg_new[s] = {sreg[pre[s]][FRAME_LEN-M-1:0], state_t'(s)};
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      odd_step <= 1'b1;
      dec_prev <= '0;
      out_data <= '0;
      for (int s = 0; s < N_STATES; s++) sreg[s] <= '0;
    end else if (load) begin
      odd_step <= !odd_step || in_data.last;
      if (odd_step) begin
        dec_prev <= in_data.dec;
      end else if (in_data.last) begin
        out_data <= sreg_new[in_data.best];
        for (int s = 0; s < N_STATES; s++) sreg[s] <= '0;
      end else begin
        sreg <= sreg_new;
      end
    end
  end

  // A frame ends on an even step.
  a_last_even: assert property (@(posedge clk) disable iff (rst)
                                (load && in_data.last) |-> !odd_step);

endmodule
