// Recognition bus controller: feeds the HMM recognition engine from the two
// external memories once the input vectors of an utterance are in SRAM.
// For word w = 0 .. num_words-1 it reads the (3+2P)N training words of model
// w from Flash (addresses w*(3+2P)N onwards) and then all P*T input vector
// words from SRAM (addresses 0 .. PT-1), and streams them to the engine, one
// word per clock while the engine is ready. Both memories are read
// synchronously: the address goes out in one clock and the data comes back
// in the next, where it is presented to the engine as a valid word. The
// controller issues exactly the number of words a word needs (the engine
// must keep ready high until it has them all), then waits for
// the engine's word_done before starting the next model, and reports done
// when the engine has decided the last word.
// Reading the whole input utterance once per word model (P*T*W words) and
// the models once per utterance follows the source design; the Flash layout
// and the handshake are this design's choices.
module recog_bus_ctrl
  import wr_pkg::*;
#(
  parameter int unsigned N   = N_STATES,
  parameter int unsigned P   = P_DIM,
  parameter int unsigned FAW = 19,   // Flash word address width
  parameter int unsigned SAW = 11    // SRAM word address width
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 start,
  input  logic [WIDX_W:0]      num_words,
  input  logic [7:0]           num_frames,
  output logic                 busy,
  output logic                 done,
  // engine
  output logic                 eng_start,
  output logic                 eng_in_valid,
  output logic [DW-1:0]        eng_in_data,
  input  logic                 eng_in_ready,
  input  logic                 eng_word_done,
  input  logic                 eng_done,
  // Flash (read only)
  output logic                 flash_re,
  output logic [FAW-1:0]       flash_addr,
  input  logic [DW-1:0]        flash_rdata,
  // SRAM read port
  output logic                 sram_re,
  output logic [SAW-1:0]       sram_addr,
  input  logic [DW-1:0]        sram_rdata
);
  localparam int unsigned MW = (3 + 2 * P) * N;

  typedef enum logic [1:0] {S_IDLE, S_FEED, S_WAIT_WORD, S_WAIT_DONE} state_e;
  state_e state;

  logic [WIDX_W:0]  words_left;
  logic [FAW-1:0]   base;
  logic [19:0]      cnt, total;
  logic             issue, from_flash_q, valid_q;

  assign total     = 20'(MW) + 20'(P) * 20'(num_frames);
  assign issue     = state == S_FEED && eng_in_ready && cnt < total;
  assign flash_re  = issue && cnt < 20'(MW);
  assign sram_re   = issue && cnt >= 20'(MW);
  assign flash_addr = base + FAW'(cnt);
  assign sram_addr  = SAW'(cnt - 20'(MW));

  assign eng_in_valid = valid_q;
  assign eng_in_data  = from_flash_q ? flash_rdata : sram_rdata;
  assign busy         = state != S_IDLE;

  // the engine stays ready for a whole word once it has started taking it
  a_ready_held: assert property (@(posedge clk) disable iff (!rst_n) valid_q |-> eng_in_ready);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE; words_left <= '0; base <= '0; cnt <= '0;
      from_flash_q <= 1'b0; valid_q <= 1'b0; eng_start <= 1'b0; done <= 1'b0;
    end else begin
      eng_start    <= 1'b0;
      done         <= 1'b0;
      valid_q      <= issue;
      from_flash_q <= flash_re;
      case (state)
        S_IDLE: if (start) begin
          state      <= S_FEED;
          eng_start  <= 1'b1;
          words_left <= num_words;
          base       <= '0;
          cnt        <= '0;
        end
        S_FEED: begin
          if (issue) cnt <= cnt + 1'b1;
          if (issue && cnt == total - 1'b1) state <= S_WAIT_WORD;
        end
        S_WAIT_WORD: if (eng_word_done) begin
          cnt  <= '0;
          base <= base + FAW'(MW);
          words_left <= words_left - 1'b1;
          state <= (words_left == 1) ? S_WAIT_DONE : S_FEED;
        end
        S_WAIT_DONE: if (eng_done) begin
          state <= S_IDLE;
          done  <= 1'b1;
        end
        default: state <= S_IDLE;
      endcase
    end
  end
endmodule
