// acsu: add-compare-select unit with its path metric memory (PMM), as a
// handshaking pipeline stage; together they form the path metric unit.
//
// Each input token is one trellis step's four branch metrics. The ACS adds
// them to the stored path metrics, keeps the smaller sum for every state and
// writes the new metrics back into the PMM, where they become the node
// weights of the next step. The output token carries the four survivor
// decisions, the state of smallest metric and a flag on the last step of a
// frame. The loop ACS -> PMM -> ACS is the original design's; the framing is this
// implementation's choice: a frame is FRAME_LEN steps, each frame starts in S0
// (S0 at 0, the other states at a high initial metric), and after the last
// step the PMM is reinitialised. Metrics are signed PM_W-bit numbers wide
// enough for a whole frame, so no normalisation is needed.
//
// Interface: input channel carries a bm_vec_t, output channel an acs_tok_t,
// 4-phase bundled data (see hs_ctrl). PMM update and output token are
// registered on the clock that takes the input token.
module acsu
  import viterbi_pkg::*;
#(
  parameter int FRAME_LEN = viterbi_pkg::FRAME_LEN_DEF,
  parameter int PM_W      = viterbi_pkg::pm_width(FRAME_LEN)
) (
  input  logic     clk,
  input  logic     rst,
  input  logic     in_req,
  output logic     in_ack,
  input  bm_vec_t  in_data,
  output logic     out_req,
  input  logic     out_ack,
  output acs_tok_t out_data
);

  localparam int CNT_W = $clog2(FRAME_LEN + 1);
  localparam logic signed [PM_W-1:0] PM_HIGH = PM_W'(pm_init_high(FRAME_LEN));

  logic signed [PM_W-1:0] pmm    [N_STATES];  // path metric memory
  logic signed [PM_W-1:0] pm_in  [N_STATES];
  logic signed [PM_W-1:0] pm_new [N_STATES];
  logic [N_STATES-1:0]    dec;
  state_t                 best;
  logic                   frame_start;
  logic [CNT_W-1:0]       step_cnt;
  logic                   last;
  logic                   load;

  hs_ctrl u_hs (
    .clk, .rst,
    .in_req, .in_ack,
    .out_req, .out_ack,
    .produce(1'b1),
    .load, .full()
  );

  // At the first step of a frame the ACS reads the initial metrics.
  always_comb begin
    for (int s = 0; s < N_STATES; s++)
      pm_in[s] = frame_start ? ((s == 0) ? '0 : PM_HIGH) : pmm[s];
  end

  acs #(.PM_W(PM_W)) u_acs (
    .pm(pm_in), .bm(in_data), .pm_new, .dec, .best
  );

  assign last = (step_cnt == CNT_W'(FRAME_LEN - 1));

  always_ff @(posedge clk) begin
    if (rst) begin
      frame_start <= 1'b1;
      step_cnt    <= '0;
      out_data    <= '0;
      for (int s = 0; s < N_STATES; s++) pmm[s] <= '0;
    end else if (load) begin
      pmm         <= pm_new;
      out_data    <= '{dec: dec, best: best, last: last};
      frame_start <= last;
      step_cnt    <= last ? '0 : step_cnt + 1'b1;
    end
  end

endmodule
