// Isolated word recognizer: speech analysis unit plus HMM recognition engine
// behind one control/bus controller, with ports for an A/D converter, an
// external SRAM and an external Flash memory.
// A start pulse begins an utterance of num_frames frames. The speech analysis
// unit samples the A/D converter at 11.025 kHz, and for every 128-sample
// frame computes P = 16 FFT cepstrum coefficients (window, FFT, log power,
// IFFT), which it writes into SRAM. When the last frame is stored, the
// recognition phase starts: for each of num_words word models, the model is
// read from Flash into the engine's register arrays and the whole utterance
// is read from SRAM through the engine. When the last model is scored,
// word_id = {1'b1, index of the best word} and best_score are valid and done
// pulses; word_id[10] is cleared again by the next start.
// Memory ports: SRAM is one 16-bit port shared by the two phases (writes
// during analysis, synchronous reads during recognition); Flash is read-only
// with synchronous reads. adc_clk pulses once per sample to start the A/D
// converter; adc_data is taken on that pulse.
// The block structure, bus widths (16-bit memory and internal bus, 12-bit
// A/D, 24-bit FFT/logarithm link, 11-bit word ID) and the analysis-then-
// recognition schedule follow the source design; the phase control and the
// memory interface timing are this design's choices.
module word_recognizer_top
  import wr_pkg::*;
#(
  parameter int unsigned DIV  = 907,   // system clock / sampling rate
  parameter int unsigned NFFT = 128,   // samples per frame (11.6 ms)
  parameter int unsigned FAW  = 19,
  parameter int unsigned SAW  = 11
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      start,
  input  logic [WIDX_W:0]           num_words,
  input  logic [7:0]                num_frames,
  output logic                      busy,
  output logic                      done,
  output logic                      overrun,
  // A/D converter
  input  logic [11:0]               adc_data,
  output logic                      adc_clk,
  // external SRAM
  output logic                      sram_we,
  output logic                      sram_re,
  output logic [SAW-1:0]            sram_addr,
  output logic [DW-1:0]             sram_wdata,
  input  logic [DW-1:0]             sram_rdata,
  // external Flash
  output logic                      flash_re,
  output logic [FAW-1:0]            flash_addr,
  input  logic [DW-1:0]             flash_rdata,
  // result
  output logic [WIDX_W:0]           word_id,
  output logic signed [SCORE_W-1:0] best_score
);
  localparam int unsigned AW  = $clog2(NFFT);
  localparam int unsigned CAW = $clog2(2 * NFFT);

  // ---------------- speech analysis unit ----------------
  logic               samp_enable, sample_valid;
  logic signed [15:0] sample;
  sampling #(.DIV(DIV)) u_sampling (
    .clk, .rst_n, .enable(samp_enable), .adc_data, .adc_clk, .sample_valid, .sample
  );

  logic                fft_wr_en, fft_start, fft_scale, fft_busy, fft_done;
  logic [AW-1:0]       fft_wr_addr, fft_rd_addr;
  logic signed [23:0]  fft_wr_re, fft_wr_im, fft_rd_re, fft_rd_im;
  logic [1:0]          fft_op;
  logic [CAW-1:0]      coef_addr;
  logic signed [15:0]  coef_data;

  fft_unit #(.NFFT(NFFT)) u_fft (
    .clk, .rst_n, .wr_en(fft_wr_en), .wr_addr(fft_wr_addr), .wr_re(fft_wr_re),
    .wr_im(fft_wr_im), .rd_addr(fft_rd_addr), .rd_re(fft_rd_re), .rd_im(fft_rd_im),
    .start(fft_start), .op(fft_op), .scale(fft_scale), .busy(fft_busy), .done(fft_done),
    .coef_addr, .coef_data
  );
  coef_rom #(.NFFT(NFFT)) u_rom (.addr(coef_addr), .data(coef_data));

  logic               log_start, log_busy, log_done;
  logic [23:0]        log_x;
  logic signed [23:0] log_y;
  log_stl u_log (
    .clk, .rst_n, .start(log_start), .x(log_x), .busy(log_busy), .done(log_done), .y(log_y)
  );

  logic               an_busy, an_done, an_sram_we;
  logic [SAW-1:0]     an_sram_addr;
  logic [15:0]        an_sram_wdata;
  analysis_ctrl #(.NFFT(NFFT), .SAW(SAW)) u_an (
    .clk, .rst_n, .start(start && !busy), .num_frames, .busy(an_busy), .done(an_done), .overrun,
    .samp_enable, .sample_valid, .sample,
    .fft_wr_en, .fft_wr_addr, .fft_wr_re, .fft_wr_im, .fft_rd_addr, .fft_rd_re, .fft_rd_im,
    .fft_start, .fft_op, .fft_scale, .fft_done,
    .log_start, .log_x, .log_done, .log_y,
    .sram_we(an_sram_we), .sram_addr(an_sram_addr), .sram_wdata(an_sram_wdata)
  );

  // ---------------- speech recognition unit ----------------
  logic                      rc_busy, rc_done, eng_start, eng_in_valid, eng_in_ready;
  logic                      eng_busy, eng_word_done, eng_done;
  logic [DW-1:0]             eng_in_data;
  logic [SAW-1:0]            rc_sram_addr;
  logic [WIDX_W-1:0]         best_index;
  logic signed [DELTA_W-1:0] word_score;

  recog_bus_ctrl #(.FAW(FAW), .SAW(SAW)) u_rc (
    .clk, .rst_n, .start(an_done), .num_words, .num_frames, .busy(rc_busy), .done(rc_done),
    .eng_start, .eng_in_valid, .eng_in_data, .eng_in_ready, .eng_word_done, .eng_done,
    .flash_re, .flash_addr, .flash_rdata, .sram_re, .sram_addr(rc_sram_addr), .sram_rdata
  );

  hmm_engine u_engine (
    .clk, .rst_n, .start(eng_start), .num_words, .num_frames,
    .in_valid(eng_in_valid), .in_data(eng_in_data), .in_ready(eng_in_ready),
    .busy(eng_busy), .word_done(eng_word_done), .done(eng_done),
    .best_index, .best_score, .word_score
  );

  // ---------------- control / bus control ----------------
  assign sram_we    = an_sram_we;
  assign sram_addr  = an_busy ? an_sram_addr : rc_sram_addr;
  assign sram_wdata = an_sram_wdata;
  assign busy       = an_busy || rc_busy;

  logic result_valid;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      result_valid <= 1'b0;
      done         <= 1'b0;
    end else begin
      done <= rc_done;
      if (start && !busy) result_valid <= 1'b0;
      else if (rc_done)   result_valid <= 1'b1;
    end
  end
  assign word_id = {result_valid, best_index};

  a_one_phase: assert property (@(posedge clk) disable iff (!rst_n) !(an_busy && rc_busy));
endmodule
