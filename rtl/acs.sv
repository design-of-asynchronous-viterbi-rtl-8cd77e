// acs: add-compare-select for the four states of the K = 3 trellis.
//
// State s = {a,b} (b the newest bit) is reached from the two states {0,a} and
// {1,a} with input bit b. For each predecessor the branch metric of its code
// pair is added to the predecessor's path metric; the smaller sum becomes the
// new path metric of s and the decision bit dec[s] records which predecessor
// won (1 for {1,a}). On equal sums the predecessor {0,a} is kept (this
// implementation's choice). `best` is the state with the smallest new path metric,
// the lowest index on a tie. Purely combinational; the path metric memory
// that closes the loop is in acsu.
module acs
  import viterbi_pkg::*;
#(
  parameter int PM_W = viterbi_pkg::pm_width(viterbi_pkg::FRAME_LEN_DEF)
) (
  input  logic signed [PM_W-1:0] pm     [N_STATES],
  input  bm_vec_t                bm,
  output logic signed [PM_W-1:0] pm_new [N_STATES],
  output logic [N_STATES-1:0]    dec,
  output state_t                 best
);

  always_comb begin
    logic signed [PM_W-1:0] m0, m1;
    state_t                 p0, p1;
    logic signed [PM_W-1:0] best_pm;
    for (int s = 0; s < N_STATES; s++) begin
      p0 = {1'b0, s[M-1:1]};
      p1 = {1'b1, s[M-1:1]};
      m0 = pm[p0] + PM_W'(bm[branch_code(1'b0, p0[0], s[0])]);
      m1 = pm[p1] + PM_W'(bm[branch_code(1'b1, p1[0], s[0])]);
      dec[s]    = (m1 < m0);
      pm_new[s] = (m1 < m0) ? m1 : m0;
    end
    best    = '0;
    best_pm = pm_new[0];
    for (int s = 1; s < N_STATES; s++) begin
      if (pm_new[s] < best_pm) begin
        best    = state_t'(s);
        best_pm = pm_new[s];
      end
    end
  end

endmodule
