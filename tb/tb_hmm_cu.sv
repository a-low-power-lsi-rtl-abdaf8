// Testbench for hmm_cu: streams W words (with random gaps) and checks the
// control sequence: MRA1/MRA2/MRA3 write counts and row/column order, the
// PE1 element flags (first/last/first frame) and read column, in_ready low
// outside the load and compute phases, the final request after the drain,
// word_done per word with the right word index, pe3_clear at start and done
// after the last word. The likelihood unit is emulated (busy, score_valid).
module tb_hmm_cu;
  localparam int N = 12, P = 16, W = 3, T = 5;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic start = 0, in_valid = 0, in_ready;
  logic mra1_we, mra2_we, mra3_we;
  logic [3:0] wr_row, wr_col, rd_col;
  logic pe_valid, pe_first, pe_last, pe_first_frame;
  logic lu_busy = 0, final_req, score_valid = 0, pe3_clear, word_done, busy, done;
  logic [9:0] word_index;
  int checks = 0, failures = 0;
  int n1, n2, n3, npe, nfinal, nwd, nclear, ndone, k1, k2, k3, kpe;

  hmm_cu dut (.clk, .rst_n, .start, .num_words(11'(W)), .num_frames(8'(T)), .in_valid, .in_ready,
              .mra1_we, .mra2_we, .mra3_we, .wr_row, .wr_col, .rd_col,
              .pe_valid, .pe_first, .pe_last, .pe_first_frame,
              .lu_busy, .final_req, .score_valid, .pe3_clear, .word_index, .word_done, .busy, .done);

  task automatic fail(input string s); failures++; $display("FAIL %s", s); endtask

  // emulated likelihood unit: final minimum answers N + 1 clocks later
  int fin_cnt = -1;
  always @(negedge clk) begin
    score_valid = 0;
    if (fin_cnt > 0) fin_cnt--;
    else if (fin_cnt == 0) begin score_valid = 1; fin_cnt = -1; end
    if (final_req) fin_cnt = N;
  end

  always @(posedge clk) if (rst_n) begin
    if (mra1_we) begin checks++; if (wr_row != 4'(k1 / P) || wr_col != 4'(k1 % P)) fail("MRA1 order"); k1++; n1++; end
    if (mra2_we) begin checks++; if (wr_row != 4'(k2 / P) || wr_col != 4'(k2 % P)) fail("MRA2 order"); k2++; n2++; end
    if (mra3_we) begin checks++; if (wr_row != 4'(k3 / 3) || wr_col != 4'(k3 % 3)) fail("MRA3 order"); k3++; n3++; end
    if (pe_valid) begin
      checks++;
      if (pe_first != (kpe % P == 0) || pe_last != (kpe % P == P - 1) || rd_col != 4'(kpe % P)
          || pe_first_frame != (kpe < P)) fail("PE flags");
      kpe++; npe++;
    end
    if (final_req) nfinal++;
    if (pe3_clear) nclear++;
    if (word_done) begin
      checks++;
      if (word_index != 10'(nwd)) fail("word index");
      nwd++; k1 = 0; k2 = 0; k3 = 0; kpe = 0;
    end
    if (done) ndone++;
  end

  initial begin
    repeat (2) @(negedge clk); rst_n = 1; @(negedge clk);
    checks++; if (in_ready) fail("ready while idle");
    start = 1; @(negedge clk); start = 0;
    for (int w = 0; w < W; w++) begin
      for (int i = 0; i < (3 + 2 * P) * N + P * T; i++) begin
        while ($urandom_range(4) == 0) begin in_valid = 0; @(negedge clk); end
        in_valid = 1;
        while (!in_ready) @(negedge clk);
        @(negedge clk);
      end
      in_valid = 0;
      checks++; if (in_ready) fail("ready after the last element");
      while (!word_done) @(negedge clk);
      @(negedge clk);
    end
    while (!done && !busy) @(negedge clk);
    repeat (3) @(negedge clk);
    checks += 7;
    if (n1 != W * N * P) fail("MRA1 count");
    if (n2 != W * N * P) fail("MRA2 count");
    if (n3 != W * N * 3) fail("MRA3 count");
    if (npe != W * P * T) fail("PE element count");
    if (nfinal != W) fail("final requests");
    if (nclear != 1) fail("pe3 clear");
    if (ndone != 1 || busy) fail("done");
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
