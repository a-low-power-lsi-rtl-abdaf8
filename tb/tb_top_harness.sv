// End-to-end test body for word_recognizer_top (instantiated at its default
// parameters). Plays a synthetic utterance of T frames into the A/D port,
// checks every stored input vector element against a floating-point FFT
// cepstrum of the same samples, then checks the recognized word and its score
// against a behavioural HMM model run on the stored vectors and the Flash
// contents, and the recognition time against W * ((3+2P)N + PT) clocks plus
// a small per-word drain. Counts how often each mechanism ran and fails any
// that never did.
module tb_top_harness #(
  parameter int W   = 8,
  parameter int T   = 6,
  parameter int TOL = 3,   // allowed cepstrum error, in LSBs of the 16-bit word
  parameter int MAXCYC = 20_000_000
);
  import tb_util_pkg::*;
  localparam int NFFT = 128;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic start = 0;
  logic busy, done, overrun, adc_clk;
  logic [11:0] adc_data;
  logic sram_we, sram_re, flash_re;
  logic [10:0] sram_addr;
  logic [15:0] sram_wdata, sram_rdata, flash_rdata;
  logic [18:0] flash_addr;
  logic [10:0] word_id;
  logic signed [15:0] best_score;

  word_recognizer_top dut (
    .clk, .rst_n, .start, .num_words(11'(W)), .num_frames(8'(T)), .busy, .done, .overrun,
    .adc_data, .adc_clk, .sram_we, .sram_re, .sram_addr, .sram_wdata, .sram_rdata,
    .flash_re, .flash_addr, .flash_rdata, .word_id, .best_score
  );
  sram_model #(.AW(11)) u_sram (.clk, .we(sram_we), .re(sram_re), .addr(sram_addr),
                                .wdata(sram_wdata), .rdata(sram_rdata));
  flash_model #(.AW(19)) u_flash (.clk, .re(flash_re), .addr(flash_addr), .rdata(flash_rdata));

  // A/D converter: presents sample n until the n-th conversion strobe
  int n_adc = 0;
  assign adc_data = adc_code(n_adc);
  always @(posedge clk) if (adc_clk && rst_n) n_adc <= n_adc + 1;

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // mechanism counters
  int n_window, n_fft, n_ifft, n_log, n_pair, n_sram_wr, n_flash_rd, n_words, n_better, n_kept, n_adcs;
  always @(posedge clk) if (rst_n) begin
    if (dut.fft_start && dut.fft_op == 2'd0) n_window++;
    if (dut.fft_start && dut.fft_op == 2'd1 && dut.fft_scale) n_fft++;
    if (dut.fft_start && dut.fft_op == 2'd2 && dut.fft_scale) n_ifft++;
    if (dut.log_start) n_log++;
    if (dut.log_start && dut.u_an.phase) n_pair++;
    if (sram_we) n_sram_wr++;
    if (flash_re) n_flash_rd++;
    if (dut.eng_word_done) n_words++;
    if (dut.u_engine.u_pe3.better) n_better++;
    if (dut.u_engine.u_pe3.in_valid && !dut.u_engine.u_pe3.better) n_kept++;
    if (adc_clk) n_adcs++;
  end

  initial begin
    logic [15:0] o [];
    real c [P];
    longint sc [], bs;
    int bi, maxerr, t_an, t_end;
    o = new[P * T];
    sc = new[W];
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk); start = 1; @(negedge clk); start = 0;
    while (!dut.an_done) @(negedge clk);
    t_an = int'($time / 10);
    // input vectors in SRAM against the reference cepstrum
    maxerr = 0;
    for (int f = 0; f < T; f++) begin
      ref_cepstrum(f, c);
      for (int p = 0; p < P; p++) begin
        int e;
        o[f * P + p] = u_sram.mem[f * P + p];
        e = $rtoi(real'($signed(o[f * P + p])) - c[p]);
        if (e < 0) e = -e;
        if (e > maxerr) maxerr = e;
        if (f == 0 && p < 4) $display("frame 0 c%0d: hw %0d ref %0.2f", p + 1, $signed(o[p]), c[p]);
      end
    end
    $display("cepstrum: max error %0d LSB over %0d elements", maxerr, P * T);
    check(maxerr <= TOL, "cepstrum error too large");
    // recognition result against the behavioural model
    bs = (longint'(1) << 15) - 1; bi = 0;
    for (int wd = 0; wd < W; wd++) begin
      sc[wd] = model_score(wd, T, o);
      if (sat(sc[wd] >>> 8, 16) < bs) begin bs = sat(sc[wd] >>> 8, 16); bi = wd; end
    end
    while (!done) @(negedge clk);
    t_end = int'($time / 10);
    $display("word %0d recognized, score %0d (model: word %0d, score %0d)", word_id[9:0], best_score, bi, bs);
    check(word_id == {1'b1, 10'(bi)}, "recognized word");
    check(longint'(best_score) == bs, "best score");
    $display("recognition: %0d clocks for %0d words (budget W((3+2P)N+PT) = %0d)",
             t_end - t_an, W, W * (MW + P * T));
    check(t_end - t_an <= W * (MW + P * T + 32), "recognition time");
    check(!overrun, "frame overrun");
    $display("mechanisms: adc %0d window %0d fft %0d ifft %0d log %0d pairs %0d sram_wr %0d flash_rd %0d words %0d better %0d kept %0d",
             n_adcs, n_window, n_fft, n_ifft, n_log, n_pair, n_sram_wr, n_flash_rd, n_words, n_better, n_kept);
    check(n_adcs >= NFFT * T, "sampling");
    check(n_window == T, "windowing");
    check(n_fft == T, "scaled FFT");
    check(n_ifft == T, "scaled IFFT");
    check(n_log == NFFT * T, "logarithm");
    check(n_pair > 0, "bit-reversed pair handling");
    check(n_sram_wr == P * T, "input vector writes");
    check(n_flash_rd == W * MW, "model loads");
    check(n_words == W, "words scored");
    check(n_better > 0, "decision update");
    check(n_kept > 0 || W == 1, "decision hold");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (MAXCYC) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
