// PE1: output probability processing element, one per HMM state.
// Computes log b_j(o_t) = w_j + sum_p s_jp * (o_tp + u_jp)^2 for one state j
// while the P elements of one input vector stream past, one element per clock.
// Four pipeline stages, as in the source design: ADD (o + u, saturated to 13
// bits), MUL (square, 16 bits), MUL (times s, 16 bits) and ACC (18 bits,
// seeded with w_j on the first element of a frame). All values carry 8
// fractional bits; a product is shifted right by 8 and saturated.
// Timing: an element accepted at cycle c reaches the accumulator at c+3;
// logb_valid pulses at c+4 for the element flagged `last`, with logb holding
// the finished sum. A new frame can follow the last element back to back.
// The stage widths are the source design's; rounding by truncation and
// saturation at each stage are this design's choices.
module pe1
  import wr_pkg::*;
(
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     in_valid,
  input  logic                     in_first,  // element p = 0 of a frame
  input  logic                     in_last,   // element p = P-1 of a frame
  input  logic signed [DW-1:0]     o,         // input vector element o_tp (from CU)
  input  logic signed [DW-1:0]     u,         // u_jp from MRA1
  input  logic signed [DW-1:0]     s,         // s_jp from MRA2
  input  logic signed [DW-1:0]     w,         // w_j from MRA3, held for the whole frame
  output logic                     logb_valid,
  output logic signed [LOGB_W-1:0] logb
);
  // stage 1: ADD
  logic                     v1, f1, l1;
  logic signed [DIFF_W-1:0] d1;
  logic signed [DW-1:0]     s1;
  // stage 2: MUL (square)
  logic                     v2, f2, l2;
  logic signed [SQ_W-1:0]   q2;
  logic signed [DW-1:0]     s2;
  // stage 3: MUL (by s)
  logic                     v3, f3, l3;
  logic signed [SQ_W-1:0]   m3;
  // stage 4: ACC
  logic signed [LOGB_W-1:0] acc;

  logic signed [39:0] sum_w, sq_w, ms_w, acc_w;

  always_comb begin
    sum_w = sat_s(40'(o) + 40'(u), DIFF_W);
    sq_w  = sat_s((40'(d1) * 40'(d1)) >>> FRAC_BITS, SQ_W);
    ms_w  = sat_s((40'(q2) * 40'(s2)) >>> FRAC_BITS, SQ_W);
    acc_w = sat_s((f3 ? 40'(w) : 40'(acc)) + 40'(m3), LOGB_W);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      {v1, f1, l1, v2, f2, l2, v3, f3, l3} <= '0;
      d1 <= '0; s1 <= '0; q2 <= '0; s2 <= '0; m3 <= '0;
      acc <= '0; logb_valid <= 1'b0;
    end else begin
      v1 <= in_valid; f1 <= in_first; l1 <= in_last;
      if (in_valid) begin
        d1 <= DIFF_W'(sum_w);
        s1 <= s;
      end
      v2 <= v1; f2 <= f1; l2 <= l1;
      if (v1) begin
        q2 <= SQ_W'(sq_w);
        s2 <= s1;
      end
      v3 <= v2; f3 <= f2; l3 <= l2;
      if (v2) m3 <= SQ_W'(ms_w);
      if (v3) acc <= LOGB_W'(acc_w);
      logb_valid <= v3 && l3;
    end
  end

  assign logb = acc;
endmodule
