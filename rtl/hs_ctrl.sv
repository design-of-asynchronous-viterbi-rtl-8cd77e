// hs_ctrl: control of one pipeline stage between two 4-phase bundled-data
// channels.
//
// The stage owns one output register. When a request arrives on the input
// channel and the output register is free, `load` is high for one clock: the
// stage's datapath computes its result from in-data and stores it. The
// controller then raises in_ack and holds it until the sender drops in_req
// (return to zero). If `produce` was high at the load, the stored result is
// offered on the output channel: out_req rises on the next clock, falls one
// clock after out_ack is seen high, and a new out_req waits for out_ack to
// return to zero. A stage that consumes several input tokens per output token
// (the survivor memory) loads with produce low for all but the last one.
//
// Timing: load is combinational from in_req; every handshake wire it drives
// is registered. An unstalled token needs two clocks per phase pair, so a
// stage accepts at most one token every four clocks when its sender reacts in
// one clock. The handshake protocol follows the four phases of the original design's
// bundled-data channel; realising it with clocked registers is this implementation's
// choice. Reset (synchronous, active high) empties the stage.
module hs_ctrl (
  input  logic clk,
  input  logic rst,
  // input channel (receiver side)
  input  logic in_req,
  output logic in_ack,
  // output channel (sender side)
  output logic out_req,
  input  logic out_ack,
  // datapath control
  input  logic produce,  // the token being loaded yields an output token
  output logic load,     // capture in-data into the stage this clock
  output logic full      // the output register holds an unsent token
);

  assign load = in_req && !in_ack && !full;

  always_ff @(posedge clk) begin
    if (rst) begin
      in_ack  <= 1'b0;
      out_req <= 1'b0;
      full    <= 1'b0;
    end else begin
      // input side
      if (load) begin
        in_ack <= 1'b1;
        full   <= produce;
      end else if (!in_req && in_ack) begin
        in_ack <= 1'b0;
      end
      // output side
      if (out_req && out_ack) begin
        out_req <= 1'b0;
        full    <= 1'b0;
      end else if (full && !out_req && !out_ack) begin
        out_req <= 1'b1;
      end
    end
  end

endmodule
