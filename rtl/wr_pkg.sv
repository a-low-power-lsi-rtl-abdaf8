// Shared constants, types and saturating-arithmetic helpers for the word
// recognizer. The model sizes (N = 12 HMM states, P = 16 cepstrum
// coefficients per frame, T = 86 frames per utterance), the 16-bit training
// data word, the 8 fractional bits of the fixed-point format and the datapath
// widths of the processing elements (13, 16, 18 and 24 bits) follow the
// source design. The saturating helpers and the layout of one word model in
// the training-data stream are choices of this implementation.
package wr_pkg;

  // Model and feature sizes.
  localparam int unsigned N_STATES  = 12;   // HMM states per word model
  localparam int unsigned P_DIM     = 16;   // dimensions of one input vector
  localparam int unsigned T_FRAMES  = 86;   // frames per utterance (11.6 ms each)
  localparam int unsigned FRAC_BITS = 8;    // fractional bits of all fixed-point data

  // Datapath widths.
  localparam int unsigned DW      = 16;  // bus / training data word
  localparam int unsigned DIFF_W  = 13;  // PE1 adder output
  localparam int unsigned SQ_W    = 16;  // PE1 multiplier outputs
  localparam int unsigned LOGB_W  = 18;  // PE1 accumulator, RA1 entries
  localparam int unsigned DELTA_W = 24;  // PE2 path, RA2 entries
  localparam int unsigned SCORE_W = 16;  // PE3 score register
  localparam int unsigned WIDX_W  = 10;  // PE3 word index

  // Columns of MRA3 (one row per state).
  localparam int unsigned MRA3_W     = 0;  // w_j, constant term of log b_j
  localparam int unsigned MRA3_ASELF = 1;  // a_jj, stay in state j
  localparam int unsigned MRA3_AIN   = 2;  // a_(j-1)j, enter state j from j-1
  localparam int unsigned MRA3_COLS  = 3;

  // Training words per word model: u (N*P), s (N*P), then w, a_jj, a_(j-1)j per state.
  localparam int unsigned MODEL_WORDS = (3 + 2 * P_DIM) * N_STATES;

  // Largest score; used as "impossible" path cost.
  localparam logic signed [DELTA_W-1:0] DELTA_INF = {1'b0, {(DELTA_W-1){1'b1}}};

  // Saturate a signed 40-bit value to W bits (W <= 32).
  function automatic logic signed [39:0] sat_s(input logic signed [39:0] v, input int unsigned w);
    logic signed [39:0] hi, lo;
    hi = (40'sd1 <<< (w - 1)) - 40'sd1;
    lo = -(40'sd1 <<< (w - 1));
    if (v > hi) return hi;
    if (v < lo) return lo;
    return v;
  endfunction

endpackage
