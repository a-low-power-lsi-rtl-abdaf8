// Self-checking testbench for hmm_engine. Generates random word models and a
// random utterance, streams them in (optionally with gaps), and compares every
// word score, the decided word and its score against a behavioural model of
// equations (1)-(4) written with the same fixed-point rules. Also checks the
// per-word cycle budget (3+2P)N + PT plus a small drain allowance.
module tb_hmm_engine;
  import wr_pkg::*;
  localparam int N = 12, P = 16, W = 5, T = 12;
  localparam int MW = (3 + 2 * P) * N;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic start = 0;
  logic in_valid = 0;
  logic [15:0] in_data = 0;
  logic in_ready, busy, word_done, done;
  logic [9:0] best_index;
  logic signed [15:0] best_score;
  logic signed [23:0] word_score;

  hmm_engine dut (
    .clk, .rst_n, .start, .num_words(11'(W)), .num_frames(8'(T)),
    .in_valid, .in_data, .in_ready, .busy, .word_done, .done,
    .best_index, .best_score, .word_score
  );

  int checks = 0, failures = 0;
  logic signed [15:0] u [W][N][P], s [W][N][P], wv [W][N], aself [W][N], ain [W][N];
  logic signed [15:0] o [T][P];
  longint ref_score [W];

  function automatic longint sat(longint v, int w);
    longint hi = (longint'(1) << (w - 1)) - 1, lo = -(longint'(1) << (w - 1));
    return v > hi ? hi : (v < lo ? lo : v);
  endfunction

  function automatic longint model_word(int wd);
    longint d [N], nd [N], lb, x, best;
    longint INF = (longint'(1) << 23) - 1;
    for (int t = 0; t < T; t++) begin
      for (int j = 0; j < N; j++) begin
        lb = wv[wd][j];
        for (int p = 0; p < P; p++) begin
          x  = sat(longint'(o[t][p]) + u[wd][j][p], 13);
          x  = sat((x * x) >>> 8, 16);
          x  = sat((x * s[wd][j][p]) >>> 8, 16);
          lb = sat(lb + x, 18);
        end
        if (t == 0) best = (j == 0) ? 0 : INF;
        else begin
          longint c1, c2;
          c1 = (j == 0) ? INF : sat(d[j-1] + ain[wd][j], 24);
          c2 = sat(d[j] + aself[wd][j], 24);
          best = c1 < c2 ? c1 : c2;
        end
        nd[j] = (best == INF) ? INF : sat(best + lb, 24);
      end
      d = nd;
    end
    best = INF;
    for (int j = 0; j < N; j++) if (d[j] < best) best = d[j];
    return best;
  endfunction

  bit gaps;
  // Drives one stream word; called and returning at a falling edge. A word
  // whose valid meets a high ready at a falling edge moves at the next rise.
  task automatic send(input logic [15:0] v);
    if (gaps) while ($urandom_range(3) == 0) begin in_valid = 0; @(negedge clk); end
    in_valid = 1; in_data = v;
    while (!in_ready) @(negedge clk);
    @(negedge clk);
    in_valid = 0;
  endtask

  int word_seen;
  always @(negedge clk) if (word_done) begin
    checks++;
    if (longint'(word_score) != ref_score[word_seen]) begin
      failures++;
      $display("FAIL word %0d score %0d expected %0d", word_seen, word_score, ref_score[word_seen]);
    end
    word_seen++;
  end

  task automatic run(input bit with_gaps);
    longint bs; int bi; longint t0, t1;
    gaps = with_gaps;
    word_seen = 0;
    for (int wd = 0; wd < W; wd++) ref_score[wd] = model_word(wd);
    $display("model scores: %0d %0d %0d", ref_score[0], ref_score[1], ref_score[2]);
    bs = (longint'(1) << 15) - 1; bi = 0;
    for (int wd = 0; wd < W; wd++)
      if (sat(ref_score[wd] >>> 8, 16) < bs) begin bs = sat(ref_score[wd] >>> 8, 16); bi = wd; end
    @(negedge clk); start = 1; @(negedge clk); start = 0;
    for (int wd = 0; wd < W; wd++) begin
      while (!in_ready) @(negedge clk);
      t0 = $time / 10;
      for (int j = 0; j < N; j++) for (int p = 0; p < P; p++) send(u[wd][j][p]);
      for (int j = 0; j < N; j++) for (int p = 0; p < P; p++) send(s[wd][j][p]);
      for (int j = 0; j < N; j++) begin send(wv[wd][j]); send(aself[wd][j]); send(ain[wd][j]); end
      for (int t = 0; t < T; t++) for (int p = 0; p < P; p++) send(o[t][p]);
      while (!word_done) @(negedge clk);
      t1 = $time / 10;
      if (!with_gaps) begin
        checks++;
        if (t1 - t0 > MW + P * T + N + 20) begin
          failures++; $display("FAIL word took %0d cycles", t1 - t0);
        end
        $display("word %0d: %0d cycles (budget (3+2P)N+PT = %0d)", wd, t1 - t0, MW + P * T);
      end
    end
    while (!done) @(negedge clk);
    @(negedge clk);
    checks++;
    if (best_index != 10'(bi) || longint'(best_score) != bs) begin
      failures++;
      $display("FAIL decision %0d/%0d expected %0d/%0d", best_index, best_score, bi, bs);
    end
    checks++;
    if (word_seen != W) begin failures++; $display("FAIL %0d word scores seen", word_seen); end
  endtask

  initial begin
    for (int wd = 0; wd < W; wd++)
      for (int j = 0; j < N; j++) begin
        for (int p = 0; p < P; p++) begin
          u[wd][j][p] = 16'($signed($urandom_range(1600)) - 800);
          s[wd][j][p] = 16'($urandom_range(200));
        end
        wv[wd][j]    = 16'($signed($urandom_range(2000)) - 1000);
        aself[wd][j] = 16'($urandom_range(300));
        ain[wd][j]   = 16'($urandom_range(300));
      end
    // make some values saturate the 13-bit adder
    u[0][0][0] = 16'sh7000; s[1][3][2] = 16'sh7fff;
    for (int t = 0; t < T; t++) for (int p = 0; p < P; p++)
      o[t][p] = 16'($signed($urandom_range(1600)) - 800);
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1;
    run(0);
    // second utterance with a stalling stream, different data
    for (int t = 0; t < T; t++) for (int p = 0; p < P; p++)
      o[t][p] = 16'($signed($urandom_range(1200)) - 600);
    run(1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired: cu state %0d, words seen %0d", dut.u_cu.state, word_seen);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
