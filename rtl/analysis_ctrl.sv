// Speech analysis controller: turns the sample stream into cepstrum input
// vectors, frame by frame, and stores them in the external SRAM.
// Samples from the sampling unit go into a 128-entry circular buffer; each
// time it fills, the frame is processed:
//   COPY    128 samples into the FFT memory (sample * 2^7, 24 bits)
//   WINDOW  Hamming window by the FFT circuit's multiplier
//   FFT     forward transform, halved at every stage
//   LOG     for each bin k: power (Xr^2 + Xi^2) >> 20, saturated to 24 bits,
//           log2 by the STL logarithm circuit, written back as real point k
//           (bins k and bitrev(k) are done as a pair, so that no bin is
//           overwritten before it is read)
//   IFFT    inverse transform of the log power spectrum, halved per stage
//   STORE   cepstrum coefficients c_1 .. c_P, each >>> 8 and saturated to
//           16 bits, written to SRAM address frame * P + p
// After num_frames frames, done pulses and sampling stops. A frame takes
// about 11,900 clocks; at 10 MHz a frame lasts 116,100 clocks (128 samples at
// 11.025 kHz), so processing keeps up. If a new frame fills before the last
// was taken, `overrun` is raised (it stays set until the next start).
// Frame length, windowing, FFT cepstrum and storing input vectors in SRAM
// follow the source design; the sample buffer, the power squarer, the
// scalings and the choice of c_1 .. c_P are this design's choices.
// fft_wr_im is constant zero on purpose: both the frame samples and the log
// power spectrum are real, and the port is kept so the FFT circuit stays a
// complex one.
module analysis_ctrl
  import wr_pkg::*;
#(
  parameter int unsigned NFFT = 128,
  parameter int unsigned P    = P_DIM,
  parameter int unsigned SAW  = 11,   // SRAM address width
  localparam int unsigned AW  = $clog2(NFFT)
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  start,
  input  logic [7:0]            num_frames,
  output logic                  busy,
  output logic                  done,
  output logic                  overrun,
  // sampling unit
  output logic                  samp_enable,
  input  logic                  sample_valid,
  input  logic signed [15:0]    sample,
  // FFT/IFFT circuit
  output logic                  fft_wr_en,
  output logic [AW-1:0]         fft_wr_addr,
  output logic signed [23:0]    fft_wr_re,
  output logic signed [23:0]    fft_wr_im,
  output logic [AW-1:0]         fft_rd_addr,
  input  logic signed [23:0]    fft_rd_re,
  input  logic signed [23:0]    fft_rd_im,
  output logic                  fft_start,
  output logic [1:0]            fft_op,
  output logic                  fft_scale,
  input  logic                  fft_done,
  // logarithm circuit
  output logic                  log_start,
  output logic [23:0]           log_x,
  input  logic                  log_done,
  input  logic signed [23:0]    log_y,
  // SRAM write port
  output logic                  sram_we,
  output logic [SAW-1:0]        sram_addr,
  output logic [15:0]           sram_wdata
);
  localparam logic [1:0] OP_WINDOW = 2'd0, OP_FFT = 2'd1, OP_IFFT = 2'd2;

  typedef enum logic [3:0] {
    S_IDLE, S_WAIT_FRAME, S_COPY, S_WIN, S_FFT, S_LOG_SEL, S_LOG_REQ,
    S_LOG_WAIT, S_LOG_WR2, S_IFFT, S_STORE
  } state_e;
  state_e state;

  logic signed [15:0] sbuf [NFFT];
  logic [AW-1:0]      wptr, idx;
  logic               frame_ready;
  logic [7:0]         frame;
  logic               cmd_sent;
  logic               phase;     // 0: bin idx, 1: its bit-reversed partner
  logic signed [23:0] y0, y1;    // log values waiting to be written

  function automatic logic [AW-1:0] rev(input logic [AW-1:0] a);
    for (int i = 0; i < int'(AW); i++) rev[i] = a[AW-1-i];
  endfunction

  // power of the bin being read
  logic signed [47:0] pr2, pi2;
  logic        [48:0] pwr;
  always_comb begin
    pr2 = fft_rd_re * fft_rd_re;
    pi2 = fft_rd_im * fft_rd_im;
    pwr = (49'(pr2) + 49'(pi2)) >> 20;
  end
  assign log_x = (pwr > 49'hFF_FFFF) ? 24'hFF_FFFF : pwr[23:0];

  // cepstrum coefficient to a 16-bit input vector element
  logic signed [23:0] cep;
  assign cep = fft_rd_re >>> FRAC_BITS;

  // sample buffer fill
  always_ff @(posedge clk) if (samp_enable && sample_valid) sbuf[wptr] <= sample;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wptr <= '0; frame_ready <= 1'b0; overrun <= 1'b0;
    end else begin
      if (start && state == S_IDLE) begin
        wptr <= '0; frame_ready <= 1'b0; overrun <= 1'b0;
      end else begin
        if (state == S_COPY && idx == '0) frame_ready <= 1'b0;
        if (samp_enable && sample_valid) begin
          wptr <= wptr + 1'b1;
          if (wptr == AW'(NFFT - 1)) begin
            frame_ready <= 1'b1;
            if (frame_ready) overrun <= 1'b1;
          end
        end
      end
    end
  end

  always_comb begin
    fft_wr_en   = 1'b0;
    fft_wr_addr = idx;
    fft_wr_re   = '0;
    fft_wr_im   = '0;
    fft_rd_addr = idx;
    if (state == S_COPY) begin
      fft_wr_en = 1'b1;
      fft_wr_re = 24'(sbuf[idx]) <<< 7;
    end else if (state == S_LOG_REQ) begin
      fft_rd_addr = phase ? rev(idx) : idx;
    end else if (state == S_LOG_WAIT && log_done && (phase || rev(idx) == idx)) begin
      fft_wr_en = 1'b1;
      fft_wr_re = phase ? y0 : log_y;
    end else if (state == S_LOG_WR2) begin
      fft_wr_en   = 1'b1;
      fft_wr_addr = rev(idx);
      fft_wr_re   = y1;
    end else if (state == S_STORE) begin
      fft_rd_addr = idx + 1'b1;
    end
  end

  assign sram_we    = state == S_STORE;
  assign sram_addr  = SAW'(frame) * SAW'(P) + SAW'(idx);
  assign sram_wdata = (cep > 24'sd32767) ? 16'h7FFF :
                      (cep < -24'sd32768) ? 16'h8000 : cep[15:0];

  assign busy        = state != S_IDLE;
  assign samp_enable = busy;
  assign fft_start   = (state == S_WIN || state == S_FFT || state == S_IFFT) && !cmd_sent;
  assign fft_op      = (state == S_WIN) ? OP_WINDOW : (state == S_FFT) ? OP_FFT : OP_IFFT;
  assign fft_scale   = 1'b1;
  assign log_start   = state == S_LOG_REQ;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE; idx <= '0; frame <= '0; cmd_sent <= 1'b0; done <= 1'b0;
      phase <= 1'b0; y0 <= '0; y1 <= '0;
    end else begin
      done <= 1'b0;
      case (state)
        S_IDLE: if (start) begin
          state <= S_WAIT_FRAME;
          frame <= '0;
        end
        S_WAIT_FRAME: if (frame_ready) begin
          state <= S_COPY;
          idx   <= '0;
        end
        S_COPY: begin
          idx <= idx + 1'b1;
          if (idx == AW'(NFFT - 1)) begin state <= S_WIN; cmd_sent <= 1'b0; end
        end
        S_WIN, S_FFT, S_IFFT: begin
          cmd_sent <= 1'b1;
          if (cmd_sent && fft_done) begin
            cmd_sent <= 1'b0;
            idx      <= '0;
            case (state)
              S_WIN:   state <= S_FFT;
              S_FFT:   state <= S_LOG_SEL;
              default: state <= S_STORE;
            endcase
          end
        end
        // Bin k's log value becomes IFFT input point k, which the FFT
        // memory keeps at rev(k): bins k and rev(k) are read before either
        // is overwritten, so they are handled as a pair.
        S_LOG_SEL: begin
          phase <= 1'b0;
          if (rev(idx) < idx) idx <= idx + 1'b1;   // done with its partner
          else state <= S_LOG_REQ;
        end
        S_LOG_REQ: state <= S_LOG_WAIT;
        S_LOG_WAIT: if (log_done) begin
          if (!phase && rev(idx) != idx) begin
            y0    <= log_y;
            phase <= 1'b1;
            state <= S_LOG_REQ;
          end else if (phase) begin
            y1    <= log_y;
            state <= S_LOG_WR2;
          end else begin
            idx   <= idx + 1'b1;
            state <= (idx == AW'(NFFT - 1)) ? S_IFFT : S_LOG_SEL;
          end
        end
        S_LOG_WR2: begin
          idx   <= idx + 1'b1;
          state <= (idx == AW'(NFFT - 1)) ? S_IFFT : S_LOG_SEL;
        end
        S_STORE: begin
          idx <= idx + 1'b1;
          if (32'(idx) == P - 1) begin
            idx   <= '0;
            frame <= frame + 1'b1;
            if (frame == num_frames - 8'd1) begin state <= S_IDLE; done <= 1'b1; end
            else state <= S_WAIT_FRAME;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end
endmodule
