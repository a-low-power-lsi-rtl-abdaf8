// PE2: one Viterbi update of a left-right HMM state (combinational).
//   first frame:  delta_1(j) = p_j + log b_j(o_1)
//   later frames: delta_t(j) = min(delta_{t-1}(j-1) + a_(j-1)j,
//                                  delta_{t-1}(j)   + a_jj) + log b_j(o_t)
// Two adders form the two candidate path costs, a comparator keeps the smaller
// and a third adder adds the output probability from RA1, matching the
// ADD/ADD/COMP/ADD structure of the source design with 24-bit path costs.
// Scores are costs: smaller is more likely. The entry state (is_first_state)
// has no predecessor; its entering path counts as impossible. The initial
// probability p_j is 0 for the first state and "impossible" (DELTA_INF) for
// the rest, the usual left-right start; the source design does not give p_j.
// All additions saturate to 24 bits so DELTA_INF cannot wrap around.
module pe2
  import wr_pkg::*;
(
  input  logic                      first_frame,
  input  logic                      is_first_state,
  input  logic signed [DELTA_W-1:0] delta_prev,   // delta_{t-1}(j-1)
  input  logic signed [DELTA_W-1:0] delta_self,   // delta_{t-1}(j)
  input  logic signed [DW-1:0]      a_in,         // a_(j-1)j from MRA3
  input  logic signed [DW-1:0]      a_self,       // a_jj from MRA3
  input  logic signed [LOGB_W-1:0]  logb,         // log b_j(o_t) from RA1
  output logic signed [DELTA_W-1:0] delta_new
);
  logic signed [39:0] cand_in, cand_self, best, init;

  always_comb begin
    cand_in   = is_first_state ? 40'(DELTA_INF)
                               : sat_s(40'(delta_prev) + 40'(a_in), DELTA_W);
    cand_self = sat_s(40'(delta_self) + 40'(a_self), DELTA_W);
    best      = (cand_in < cand_self) ? cand_in : cand_self;
    init      = is_first_state ? 40'sd0 : 40'(DELTA_INF);
    if (first_frame) best = init;
    // an impossible path stays impossible
    if (best == 40'(DELTA_INF)) delta_new = DELTA_INF;
    else                        delta_new = DELTA_W'(sat_s(best + 40'(logb), DELTA_W));
  end
endmodule
