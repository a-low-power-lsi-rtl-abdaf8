// PE3: recognition decision unit. Keeps the best word seen so far.
// Each time a word's score arrives (in_valid), a comparator checks it against
// the SCORE register; if it is better, SCORE takes the new value and a
// multiplexer loads the word index supplied by the control unit into the
// INDEX register. Scores are path costs, so "better" means strictly smaller;
// on a tie the earlier word is kept. `clear` starts a new utterance by setting
// SCORE to its largest value and INDEX to 0. The 16-bit score and 10-bit index
// widths and the COMP/REG/MUX/REG structure follow the source design.
// Timing: the registers update on the clock edge after in_valid.
module pe3
  import wr_pkg::*;
(
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      clear,
  input  logic                      in_valid,
  input  logic signed [SCORE_W-1:0] in_score,
  input  logic [WIDX_W-1:0]         in_index,
  output logic signed [SCORE_W-1:0] best_score,
  output logic [WIDX_W-1:0]         best_index
);
  logic better;
  assign better = in_valid && (in_score < best_score);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      best_score <= {1'b0, {(SCORE_W-1){1'b1}}};
      best_index <= '0;
    end else if (clear) begin
      best_score <= {1'b0, {(SCORE_W-1){1'b1}}};
      best_index <= '0;
    end else if (better) begin
      best_score <= in_score;
      best_index <= in_index;
    end
  end
endmodule
