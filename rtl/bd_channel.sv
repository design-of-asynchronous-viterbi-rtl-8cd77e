// bd_channel: a single-rail bundled-data channel with a 4-phase (return-to-zero)
// request/acknowledge handshake, as used between all pipeline stages.
//
// The sender puts data on the bus and raises req; the receiver takes the data
// and raises ack; the sender drops req, after which data may change; the
// receiver drops ack, and only then may the next cycle start. The assertions
// below check these rules at every clock edge. The handshake wires are sampled
// by the clock of the surrounding design (the decoder is a clocked realisation
// of the handshaking pipeline), so each phase takes at least one clock.
interface bd_channel #(
  parameter int W = 1
) (
  input logic clk,
  input logic rst
);
  logic         req;
  logic         ack;
  logic [W-1:0] data;

  modport sender   (output req, output data, input ack);
  modport receiver (input req, input data, output ack);

  // The rules are checked at clock edges. A party that answers within the
  // same clock period shows both edges in one sample, so each rule also
  // accepts the answer arriving together with its cause.
  // req may only rise after the previous cycle's ack has returned to zero.
  a_req_rise: assert property (@(posedge clk) disable iff (rst) $rose(req) |-> !$past(ack));
  // req may only fall once ack has been raised.
  a_req_fall: assert property (@(posedge clk) disable iff (rst) $fell(req) |-> ($past(ack) || ack));
  // ack only answers a raised req, and returns to zero only after req did.
  a_ack_rise: assert property (@(posedge clk) disable iff (rst) $rose(ack) |-> ($past(req) || req));
  a_ack_fall: assert property (@(posedge clk) disable iff (rst) $fell(ack) |-> (!$past(req) || !req));
  // Bundled data is stable for as long as req stays high.
  a_data_stable: assert property (@(posedge clk) disable iff (rst) (req && $past(req)) |-> $stable(data));
endinterface
