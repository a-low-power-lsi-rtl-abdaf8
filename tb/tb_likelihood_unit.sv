// Testbench for likelihood_unit: feeds T frames of random output
// probabilities, one every P = 16 clocks as RA1 would, checks RA2 against the
// Viterbi recursion after every frame, checks that each frame finishes within
// P clocks (N/NPE = 6 busy clocks), and checks the final minimum and its
// N-clock sequencing.
module tb_likelihood_unit;
  localparam int N = 12, P = 16, T = 7;
  localparam longint INF = (longint'(1) << 23) - 1;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic ra1_valid = 0, ra1_first = 0, final_req = 0, busy, score_valid;
  logic [N-1:0][17:0] ra1;
  logic [N-1:0][15:0] a_in_lane, a_self_lane;
  logic signed [23:0] score;
  longint d [N];
  int checks = 0, failures = 0;

  likelihood_unit dut (.*);

  function automatic longint sat(longint v, int wd);
    longint hi = (longint'(1) << (wd - 1)) - 1, lo = -(longint'(1) << (wd - 1));
    return v > hi ? hi : (v < lo ? lo : v);
  endfunction

  initial begin
    longint nd [N], best, c1, c2;
    int busy_cycles, cyc;
    for (int j = 0; j < N; j++) begin
      a_in_lane[j] = 16'($urandom_range(500)); a_self_lane[j] = 16'($urandom_range(500));
    end
    repeat (2) @(negedge clk); rst_n = 1; @(negedge clk);
    for (int t = 0; t < T; t++) begin
      for (int j = 0; j < N; j++) ra1[j] = 18'($signed($urandom_range(60000)) - 10000);
      for (int j = 0; j < N; j++) begin
        if (t == 0) best = (j == 0) ? 0 : INF;
        else begin
          c1 = (j == 0) ? INF : sat(d[j-1] + a_in_lane[j], 24);
          c2 = sat(d[j] + a_self_lane[j], 24);
          best = c1 < c2 ? c1 : c2;
        end
        nd[j] = (best == INF) ? INF : sat(best + longint'($signed(ra1[j])), 24);
      end
      d = nd;
      ra1_valid = 1; ra1_first = (t == 0);
      @(negedge clk); ra1_valid = 0;
      busy_cycles = 0;
      for (int c = 0; c < P - 1; c++) begin
        if (busy) busy_cycles++;
        @(negedge clk);
      end
      checks++;
      if (busy_cycles != N / 2) begin failures++; $display("FAIL frame %0d busy %0d clocks", t, busy_cycles); end
      for (int j = 0; j < N; j++) begin
        checks++;
        if (longint'(dut.ra2[j]) != d[j]) begin failures++; $display("FAIL t%0d ra2[%0d] = %0d expected %0d", t, j, dut.ra2[j], d[j]); end
      end
    end
    best = INF;
    for (int j = 0; j < N; j++) if (d[j] < best) best = d[j];
    final_req = 1; @(negedge clk); final_req = 0;
    cyc = 1;
    while (!score_valid) begin @(negedge clk); cyc++; end
    checks += 2;
    if (longint'(score) != best) begin failures++; $display("FAIL score %0d expected %0d", score, best); end
    if (cyc != N + 1) begin failures++; $display("FAIL final took %0d clocks", cyc); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (5000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
