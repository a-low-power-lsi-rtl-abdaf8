// HMM recognition engine: isolated word recognition with continuous-density,
// left-right HMM word models.
// One word model ((3+2P)N training words) is streamed into three multiple
// port register arrays: MRA1 holds u_jp, MRA2 holds s_jp and MRA3 holds w_j,
// a_jj and a_(j-1)j. Then all P*T elements of the utterance's input vectors
// stream past once. N PE1s compute log b_j(o_t) for every state in parallel,
// one vector element per clock; RA1 passes each frame's N results to the
// likelihood unit, whose PE2s run the Viterbi recursion into RA2 while PE1
// already works on the next frame. After the last frame the word score
// min_j delta_T(j) goes to PE3, which keeps the word with the smallest cost.
// Because the model stays in the register arrays for the whole utterance,
// training data crosses the bus once per word instead of once per frame.
// Interface: start with num_words / num_frames, then a valid/ready stream of
// 16-bit words (per word: model, then input vectors). done pulses after the
// last word; best_index and best_score then hold the result.
// Timing: about (3+2P)N + PT + N + 16 clocks per word with a gap-free stream.
// The PE2 path cost (24 bits) is reduced to PE3's 16 bits by dropping the 8
// fractional bits and saturating: a choice of this design.
module hmm_engine
  import wr_pkg::*;
#(
  parameter int unsigned N   = N_STATES,
  parameter int unsigned P   = P_DIM,
  parameter int unsigned NPE = 2
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      start,
  input  logic [WIDX_W:0]           num_words,
  input  logic [7:0]                num_frames,
  input  logic                      in_valid,
  input  logic [DW-1:0]             in_data,
  output logic                      in_ready,
  output logic                      busy,
  output logic                      word_done,
  output logic                      done,
  output logic [WIDX_W-1:0]         best_index,
  output logic signed [SCORE_W-1:0] best_score,
  output logic signed [DELTA_W-1:0] word_score     // score of the word just finished
);
  localparam int unsigned RW = $clog2(N);
  localparam int unsigned CW = $clog2(P);

  logic                mra1_we, mra2_we, mra3_we;
  logic [RW-1:0]       wr_row;
  logic [CW-1:0]       wr_col, rd_col;
  logic                pe_valid, pe_first, pe_last, pe_first_frame;
  logic                lu_busy, final_req, score_valid, pe3_clear;
  logic [WIDX_W-1:0]   word_index;

  hmm_cu #(.N(N), .P(P)) u_cu (
    .clk, .rst_n, .start, .num_words, .num_frames, .in_valid, .in_ready,
    .mra1_we, .mra2_we, .mra3_we, .wr_row, .wr_col, .rd_col,
    .pe_valid, .pe_first, .pe_last, .pe_first_frame,
    .lu_busy, .final_req, .score_valid, .pe3_clear, .word_index,
    .word_done, .busy, .done
  );

  logic [0:0][N-1:0][DW-1:0] u_rd, s_rd;
  logic [2:0][N-1:0][DW-1:0] m3_rd;

  mra #(.ROWS(N), .COLS(P), .DW(DW), .NRD(1)) u_mra1 (
    .clk, .wr_en(mra1_we), .wr_row, .wr_col, .wr_data(in_data),
    .rd_col(rd_col), .rd_data(u_rd)
  );
  mra #(.ROWS(N), .COLS(P), .DW(DW), .NRD(1)) u_mra2 (
    .clk, .wr_en(mra2_we), .wr_row, .wr_col, .wr_data(in_data),
    .rd_col(rd_col), .rd_data(s_rd)
  );
  mra #(.ROWS(N), .COLS(MRA3_COLS), .DW(DW), .NRD(3)) u_mra3 (
    .clk, .wr_en(mra3_we), .wr_row, .wr_col(2'(wr_col)), .wr_data(in_data),
    .rd_col({2'(MRA3_AIN), 2'(MRA3_ASELF), 2'(MRA3_W)}), .rd_data(m3_rd)
  );

  logic                     ra1_valid, ra1_first;
  logic [N-1:0][LOGB_W-1:0] ra1;

  output_prob_unit #(.N(N)) u_opu (
    .clk, .rst_n, .in_valid(pe_valid), .in_first(pe_first), .in_last(pe_last),
    .in_first_frame(pe_first_frame), .o(in_data),
    .u_lane(u_rd[0]), .s_lane(s_rd[0]), .w_lane(m3_rd[MRA3_W]),
    .ra1_valid, .ra1_first, .ra1
  );

  likelihood_unit #(.N(N), .NPE(NPE)) u_lu (
    .clk, .rst_n, .ra1_valid, .ra1_first, .ra1,
    .a_in_lane(m3_rd[MRA3_AIN]), .a_self_lane(m3_rd[MRA3_ASELF]),
    .final_req, .busy(lu_busy), .score_valid, .score(word_score)
  );

  logic signed [SCORE_W-1:0] score16;
  assign score16 = SCORE_W'(sat_s(40'(word_score) >>> FRAC_BITS, SCORE_W));

  pe3 u_pe3 (
    .clk, .rst_n, .clear(pe3_clear), .in_valid(score_valid),
    .in_score(score16), .in_index(word_index), .best_score, .best_index
  );
endmodule
