// Testbench for recog_bus_ctrl with the Flash and SRAM models and an
// emulated engine (ready during a word, word_done a few clocks after the
// last item). Checks that each word receives exactly the
// model words of Flash region w followed by the SRAM input vectors, in order,
// and that done follows the engine's done.
module tb_recog_bus_ctrl;
  import tb_util_pkg::*;
  localparam int W = 3, T = 4, TOTAL = MW + P * T;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic start = 0, busy, done, eng_start, eng_in_valid, eng_in_ready;
  logic eng_word_done = 0, eng_done = 0, flash_re, sram_re;
  logic [15:0] eng_in_data, flash_rdata, sram_rdata;
  logic [18:0] flash_addr;
  logic [10:0] sram_addr;
  int checks = 0, failures = 0;

  recog_bus_ctrl dut (.clk, .rst_n, .start, .num_words(11'(W)), .num_frames(8'(T)), .busy, .done,
    .eng_start, .eng_in_valid, .eng_in_data, .eng_in_ready, .eng_word_done, .eng_done,
    .flash_re, .flash_addr, .flash_rdata, .sram_re, .sram_addr, .sram_rdata);
  flash_model u_flash (.clk, .re(flash_re), .addr(flash_addr), .rdata(flash_rdata));
  sram_model u_sram (.clk, .we(1'b0), .re(sram_re), .addr(sram_addr), .wdata(16'h0), .rdata(sram_rdata));

  // emulated engine: ready from the start of a word until its last item,
  // word_done three clocks later, done one clock after the last word_done
  int word = -1, got = 0, nstart = 0, ndone = 0, wait_wd = -1;
  logic run = 0, last_wd = 0;
  assign eng_in_ready = run;
  always @(posedge clk) begin
    eng_word_done <= 0;
    eng_done <= last_wd;
    last_wd <= 0;
    if (eng_start && rst_n) begin nstart++; word = 0; got = 0; run <= 1; end
    if (eng_in_valid && eng_in_ready) begin
      logic [15:0] e;
      e = (got < MW) ? flash_word(word * MW + got) : u_sram.mem[got - MW];
      checks++;
      if (eng_in_data != e) begin failures++; $display("FAIL word %0d item %0d: %h expected %h", word, got, eng_in_data, e); end
      got++;
      if (got == TOTAL) begin run <= 0; wait_wd = 3; end
    end else if (eng_in_valid && rst_n) begin
      failures++; checks++; $display("FAIL valid while not ready");
    end
    if (wait_wd > 0) wait_wd--;
    else if (wait_wd == 0) begin
      wait_wd = -1;
      eng_word_done <= 1;
      word++; got = 0;
      if (word == W) last_wd <= 1; else run <= 1;
    end
    if (done && rst_n) ndone++;
  end

  initial begin
    for (int i = 0; i < P * T; i++) u_sram.mem[i] = 16'($urandom);
    repeat (3) @(negedge clk); rst_n = 1;
    @(negedge clk); start = 1; @(negedge clk); start = 0;
    while (!done) @(negedge clk);
    repeat (3) @(negedge clk);
    checks += 3;
    if (nstart != 1) begin failures++; $display("FAIL engine starts %0d", nstart); end
    if (word != W) begin failures++; $display("FAIL %0d words fed", word); end
    if (ndone != 1 || busy) begin failures++; $display("FAIL done"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
