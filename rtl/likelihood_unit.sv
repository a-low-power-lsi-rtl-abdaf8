// Likelihood calculation unit: NPE PE2s and the register array RA2 that holds
// the path costs delta(j) of all N states.
// When RA1 delivers a frame's output probabilities (ra1_valid), the unit walks
// the states from the last to the first, NPE states per clock, and writes the
// new costs back into RA2. Walking downwards lets RA2 be updated in place:
// delta_{t-1}(j-1) is still the old value when state j is updated. With N = 12
// and NPE = 2 a frame takes 6 clocks, well inside the P = 16 clocks between
// two RA1 loads. After the last frame, final_req starts the word score
// P* = min_j delta_T(j): one state per clock through a comparator, N clocks,
// then score_valid pulses with the 24-bit score.
// The left-right recursion, RA2 and the use of a few PE2s follow the source
// design; the downward walk and the sequential final minimum are this design's.
module likelihood_unit
  import wr_pkg::*;
#(
  parameter int unsigned N   = N_STATES,
  parameter int unsigned NPE = 2
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       ra1_valid,
  input  logic                       ra1_first,
  input  logic [N-1:0][LOGB_W-1:0]   ra1,
  input  logic [N-1:0][DW-1:0]       a_in_lane,    // a_(j-1)j per state (MRA3)
  input  logic [N-1:0][DW-1:0]       a_self_lane,  // a_jj per state (MRA3)
  input  logic                       final_req,
  output logic                       busy,
  output logic                       score_valid,
  output logic signed [DELTA_W-1:0]  score
);
  localparam int unsigned STEPS = (N + NPE - 1) / NPE;
  localparam int unsigned SW    = $clog2(STEPS + 1);
  localparam int unsigned JW    = $clog2(N + 1);

  logic signed [DELTA_W-1:0] ra2 [N];
  logic                      run, first_q, fin;
  logic [SW-1:0]             step;
  logic [JW-1:0]             fin_j;
  logic signed [DELTA_W-1:0] best;

  logic signed [DELTA_W-1:0] pe_out [NPE];
  int                        pe_j   [NPE];

  for (genvar i = 0; i < NPE; i++) begin : g_pe
    always_comb pe_j[i] = int'(N) - 1 - (int'(step) * int'(NPE) + i);
    logic signed [DELTA_W-1:0] d_prev, d_self;
    logic signed [DW-1:0]      a_in_v, a_self_v;
    logic signed [LOGB_W-1:0]  lb;
    always_comb begin
      d_prev = DELTA_INF; d_self = DELTA_INF; a_in_v = '0; a_self_v = '0; lb = '0;
      for (int j = 0; j < N; j++) begin
        if (j == pe_j[i]) begin
          d_self   = ra2[j];
          a_in_v   = a_in_lane[j];
          a_self_v = a_self_lane[j];
          lb       = ra1[j];
          if (j > 0) d_prev = ra2[j-1];
        end
      end
    end
    pe2 u_pe2 (
      .first_frame(first_q), .is_first_state(pe_j[i] == 0),
      .delta_prev(d_prev), .delta_self(d_self),
      .a_in(a_in_v), .a_self(a_self_v), .logb(lb), .delta_new(pe_out[i])
    );
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      run <= 1'b0; first_q <= 1'b0; step <= '0;
      fin <= 1'b0; fin_j <= '0; best <= DELTA_INF;
      score_valid <= 1'b0; score <= DELTA_INF;
      for (int j = 0; j < N; j++) ra2[j] <= DELTA_INF;
    end else begin
      score_valid <= 1'b0;
      if (ra1_valid) begin
        run     <= 1'b1;
        step    <= '0;
        first_q <= ra1_first;
      end else if (run) begin
        for (int i = 0; i < NPE; i++)
          for (int j = 0; j < N; j++)
            if (j == pe_j[i]) ra2[j] <= pe_out[i];
        if (32'(step) == STEPS - 1) run <= 1'b0;
        step <= step + 1'b1;
      end
      if (final_req && !fin) begin
        fin   <= 1'b1;
        fin_j <= '0;
        best  <= DELTA_INF;
      end else if (fin) begin
        if (ra2[fin_j] < best) best <= ra2[fin_j];
        if (32'(fin_j) == N - 1) begin
          fin         <= 1'b0;
          score_valid <= 1'b1;
          score       <= (ra2[fin_j] < best) ? ra2[fin_j] : best;
        end
        fin_j <= fin_j + 1'b1;
      end
    end
  end

  assign busy = run || fin;

  // RA1 may only be reloaded once the previous frame is finished
  a_no_overrun: assert property (@(posedge clk) disable iff (!rst_n) ra1_valid |-> !run);
endmodule
