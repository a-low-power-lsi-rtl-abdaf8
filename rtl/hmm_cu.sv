// Control unit (CU) of the HMM recognition engine.
// For each of num_words word models it runs three phases:
//   LOAD    (3+2P)N words arrive on the 16-bit input stream and are written
//           into the register arrays: u_jp into MRA1 and s_jp into MRA2 (state
//           by state, P words each), then w_j, a_jj, a_(j-1)j into MRA3.
//   COMPUTE P*T input vector elements arrive; each is broadcast to the PE1
//           array while MRA1/MRA2 are read at column p.
//   FINISH  wait for the PE1 pipeline and the likelihood unit to drain, ask
//           for the final minimum and hand the word score and index to PE3.
// The stream uses valid/ready: a word moves when in_valid and in_ready are both
// high, and in_ready is high only in LOAD and COMPUTE. With a gap-free stream a
// word takes (3+2P)N + PT clocks plus a fixed drain of about N + 16 clocks;
// word_done pulses when the word has been decided, done when the last has.
// Phase order and cycle budget follow the source design; the stream handshake,
// the data order and the drain sequence are this design's choices.
module hmm_cu
  import wr_pkg::*;
#(
  parameter int unsigned N = N_STATES,
  parameter int unsigned P = P_DIM,
  localparam int unsigned RW = $clog2(N),
  localparam int unsigned CW = $clog2(P)
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                start,
  input  logic [WIDX_W:0]     num_words,    // 1 .. 1024
  input  logic [7:0]          num_frames,   // T, 1 .. 255
  input  logic                in_valid,
  output logic                in_ready,
  // register array writes
  output logic                mra1_we,
  output logic                mra2_we,
  output logic                mra3_we,
  output logic [RW-1:0]       wr_row,
  output logic [CW-1:0]       wr_col,
  // output probability unit control
  output logic [CW-1:0]       rd_col,
  output logic                pe_valid,
  output logic                pe_first,
  output logic                pe_last,
  output logic                pe_first_frame,
  // likelihood / decision control
  input  logic                lu_busy,
  output logic                final_req,
  input  logic                score_valid,
  output logic                pe3_clear,
  output logic [WIDX_W-1:0]   word_index,
  output logic                word_done,
  output logic                busy,
  output logic                done
);
  typedef enum logic [2:0] {S_IDLE, S_LOAD, S_COMP, S_DRAIN, S_FINAL, S_WAIT} state_e;
  state_e state;

  logic [1:0]      load_arr;   // 0: MRA1, 1: MRA2, 2: MRA3
  logic [RW-1:0]   row;
  logic [CW-1:0]   col;
  logic [7:0]      frame;
  logic [3:0]      drain;
  logic [WIDX_W:0] words_left;

  logic take;
  assign in_ready = (state == S_LOAD) || (state == S_COMP);
  assign take     = in_valid && in_ready;

  logic [CW-1:0] col_last;
  assign col_last = (load_arr == 2'd2) ? CW'(MRA3_COLS - 1) : CW'(P - 1);

  assign mra1_we = take && state == S_LOAD && load_arr == 2'd0;
  assign mra2_we = take && state == S_LOAD && load_arr == 2'd1;
  assign mra3_we = take && state == S_LOAD && load_arr == 2'd2;
  assign wr_row  = row;
  assign wr_col  = col;

  assign rd_col         = col;
  assign pe_valid       = take && state == S_COMP;
  assign pe_first       = col == '0;
  assign pe_last        = 32'(col) == P - 1;
  assign pe_first_frame = frame == '0;

  assign busy = state != S_IDLE;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE; load_arr <= '0; row <= '0; col <= '0; frame <= '0;
      drain <= '0; words_left <= '0; word_index <= '0;
      final_req <= 1'b0; pe3_clear <= 1'b0; word_done <= 1'b0; done <= 1'b0;
    end else begin
      final_req <= 1'b0;
      pe3_clear <= 1'b0;
      word_done <= 1'b0;
      done      <= 1'b0;
      case (state)
        S_IDLE: if (start) begin
          state      <= S_LOAD;
          load_arr   <= '0; row <= '0; col <= '0;
          words_left <= num_words;
          word_index <= '0;
          pe3_clear  <= 1'b1;
        end
        S_LOAD: if (take) begin
          if (col == col_last) begin
            col <= '0;
            if (32'(row) == N - 1) begin
              row <= '0;
              if (load_arr == 2'd2) begin
                state <= S_COMP;
                frame <= '0;
              end
              load_arr <= load_arr + 1'b1;
            end else row <= row + 1'b1;
          end else col <= col + 1'b1;
        end
        S_COMP: if (take) begin
          if (32'(col) == P - 1) begin
            col <= '0;
            if (frame == num_frames - 8'd1) begin
              state <= S_DRAIN;
              drain <= '0;
            end
            frame <= frame + 1'b1;
          end else col <= col + 1'b1;
        end
        S_DRAIN: begin
          // PE1 pipeline (4) + RA1 load (1), then the likelihood unit
          if (drain != 4'd7) drain <= drain + 1'b1;
          else if (!lu_busy) begin
            state     <= S_FINAL;
            final_req <= 1'b1;
          end
        end
        S_FINAL: if (score_valid) begin
          state     <= S_WAIT;
          word_done <= 1'b1;
        end
        S_WAIT: begin
          // PE3 has taken the score in the S_FINAL -> S_WAIT edge
          if (words_left == 1) begin
            state <= S_IDLE;
            done  <= 1'b1;
          end else begin
            state      <= S_LOAD;
            load_arr   <= '0;
            word_index <= word_index + 1'b1;
          end
          words_left <= words_left - 1'b1;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  a_no_take_idle: assert property (@(posedge clk) disable iff (!rst_n)
                                   state == S_IDLE |-> !in_ready);
endmodule
