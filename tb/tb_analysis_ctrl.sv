// Testbench for analysis_ctrl with the FFT/IFFT circuit, coefficient ROM and
// logarithm circuit it drives. Samples are fed directly (one every 100
// clocks), T frames of them; every input vector element written to SRAM is
// compared with a floating-point FFT cepstrum of the same samples, and the
// addresses, write count, done pulse and absence of overrun are checked, and
// the processing time of each frame (window start to its last SRAM write) is
// measured against the 128 x 907 clocks a frame lasts at 10 MHz. A second
// run feeds samples far too fast (one every 20 clocks) and expects overrun.
module tb_analysis_ctrl;
  import tb_util_pkg::*;
  localparam int T = 3;
  int gap = 100;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic start = 0, busy, done, overrun, samp_enable, sample_valid = 0;
  logic signed [15:0] sample = 0;
  logic fft_wr_en, fft_start, fft_scale, fft_busy, fft_done, log_start, log_busy, log_done, sram_we;
  logic [6:0] fft_wr_addr, fft_rd_addr;
  logic signed [23:0] fft_wr_re, fft_wr_im, fft_rd_re, fft_rd_im, log_y;
  logic [1:0] fft_op;
  logic [23:0] log_x;
  logic [10:0] sram_addr;
  logic [15:0] sram_wdata;
  logic [7:0] coef_addr;
  logic signed [15:0] coef_data;
  logic [15:0] mem [P * T];
  int checks = 0, failures = 0, nwr = 0;

  analysis_ctrl dut (.clk, .rst_n, .start, .num_frames(8'(T)), .busy, .done, .overrun,
    .samp_enable, .sample_valid, .sample, .fft_wr_en, .fft_wr_addr, .fft_wr_re, .fft_wr_im,
    .fft_rd_addr, .fft_rd_re, .fft_rd_im, .fft_start, .fft_op, .fft_scale, .fft_done,
    .log_start, .log_x, .log_done, .log_y, .sram_we, .sram_addr, .sram_wdata);
  fft_unit u_fft (.clk, .rst_n, .wr_en(fft_wr_en), .wr_addr(fft_wr_addr), .wr_re(fft_wr_re),
    .wr_im(fft_wr_im), .rd_addr(fft_rd_addr), .rd_re(fft_rd_re), .rd_im(fft_rd_im),
    .start(fft_start), .op(fft_op), .scale(fft_scale), .busy(fft_busy), .done(fft_done),
    .coef_addr, .coef_data);
  coef_rom u_rom (.addr(coef_addr), .data(coef_data));
  log_stl u_log (.clk, .rst_n, .start(log_start), .x(log_x), .busy(log_busy), .done(log_done), .y(log_y));

  always @(posedge clk) if (sram_we && rst_n) begin
    nwr++;
    if (int'(sram_addr) < P * T) mem[sram_addr] <= sram_wdata;
    else begin failures++; $display("FAIL SRAM address %0d", sram_addr); end
  end

  // per-frame processing time: from the window command to the frame's last write
  int t_win = -1, cyc = 0, maxproc = 0;
  always @(posedge clk) begin
    cyc++;
    if (rst_n && fft_start && fft_op == 2'd0) t_win = cyc;
    if (rst_n && sram_we && int'(sram_addr) % P == P - 1 && t_win >= 0) begin
      if (cyc - t_win > maxproc) maxproc = cyc - t_win;
      t_win = -1;
    end
  end

  // sample source: 12-bit codes turned into 16-bit samples as the sampling unit does
  int n = 0;
  initial begin
    wait (rst_n);
    forever begin
      repeat (gap - 1) @(negedge clk);
      sample = $signed({~adc_code(n)[11], adc_code(n)[10:0], 4'b0});
      sample_valid = samp_enable;
      @(negedge clk);
      if (sample_valid) n++;
      sample_valid = 0;
    end
  end

  initial begin
    real c [P];
    int maxerr = 0, e;
    repeat (3) @(negedge clk); rst_n = 1;
    @(negedge clk); start = 1; @(negedge clk); start = 0;
    while (!done) @(negedge clk);
    for (int f = 0; f < T; f++) begin
      ref_cepstrum(f, c);
      for (int p = 0; p < P; p++) begin
        e = $rtoi(real'($signed(mem[f * P + p])) - c[p]); if (e < 0) e = -e;
        if (e > maxerr) maxerr = e;
        checks++;
        if (e > 3) begin failures++; $display("FAIL frame %0d c%0d: %0d, reference %.2f", f, p + 1, $signed(mem[f * P + p]), c[p]); end
      end
    end
    $display("max cepstrum error %0d LSB, frame processing %0d clocks", maxerr, maxproc);
    checks += 3;
    if (maxproc == 0 || maxproc > 128 * 907) begin failures++; $display("FAIL frame processing time"); end
    if (nwr != P * T) begin failures++; $display("FAIL %0d SRAM writes", nwr); end
    if (overrun) begin failures++; $display("FAIL overrun"); end
    repeat (3) @(negedge clk);
    checks++;
    if (busy || samp_enable) begin failures++; $display("FAIL still busy"); end
    // second run: samples arrive faster than frames can be processed
    gap = 20;
    @(negedge clk); start = 1; @(negedge clk); start = 0;
    while (!done && !overrun) @(negedge clk);
    checks++;
    if (!overrun) begin failures++; $display("FAIL overrun not detected"); end
    while (!done) @(negedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (200000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
