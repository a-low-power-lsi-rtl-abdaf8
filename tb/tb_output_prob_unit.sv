// Testbench for output_prob_unit: random per-state u/s/w lanes, several
// frames streamed back to back; after each frame RA1 must hold the N values
// of equation (1), loaded together one clock after the PE results, with
// ra1_first set only for the first frame, and hold them until the next frame.
module tb_output_prob_unit;
  localparam int N = 12, P = 16, T = 6;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic in_valid = 0, in_first = 0, in_last = 0, in_first_frame = 0;
  logic signed [15:0] o = 0;
  logic [N-1:0][15:0] u_lane, s_lane, w_lane;
  logic ra1_valid, ra1_first;
  logic [N-1:0][17:0] ra1;
  logic signed [15:0] uu [P][N], ss [P][N];
  logic signed [15:0] ov [T][P];
  int checks = 0, failures = 0, nframe = 0, p_cur = 0;

  output_prob_unit dut (.*);

  // the register arrays: lane j holds state j's value for the current p
  always_comb for (int j = 0; j < N; j++) begin u_lane[j] = uu[p_cur][j]; s_lane[j] = ss[p_cur][j]; end

  function automatic longint sat(longint v, int wd);
    longint hi = (longint'(1) << (wd - 1)) - 1, lo = -(longint'(1) << (wd - 1));
    return v > hi ? hi : (v < lo ? lo : v);
  endfunction

  function automatic longint ref_logb(int t, int j);
    longint acc = longint'($signed(w_lane[j])), x;
    for (int p = 0; p < P; p++) begin
      x = sat(longint'(ov[t][p]) + uu[p][j], 13);
      x = sat((x * x) >>> 8, 16);
      x = sat((x * ss[p][j]) >>> 8, 16);
      acc = sat(acc + x, 18);
    end
    return acc;
  endfunction

  always @(negedge clk) if (rst_n && ra1_valid) begin
    checks++;
    if (ra1_first != (nframe == 0)) begin failures++; $display("FAIL first tag frame %0d", nframe); end
    for (int j = 0; j < N; j++) begin
      checks++;
      if (longint'($signed(ra1[j])) != ref_logb(nframe, j)) begin
        failures++; $display("FAIL frame %0d state %0d: %0d expected %0d", nframe, j, $signed(ra1[j]), ref_logb(nframe, j));
      end
    end
    nframe++;
  end

  initial begin
    for (int p = 0; p < P; p++) for (int j = 0; j < N; j++) begin
      uu[p][j] = 16'($signed($urandom_range(1000)) - 500);
      ss[p][j] = 16'($urandom_range(300));
    end
    for (int j = 0; j < N; j++) w_lane[j] = 16'($signed($urandom_range(2000)) - 1000);
    for (int t = 0; t < T; t++) for (int p = 0; p < P; p++) ov[t][p] = 16'($signed($urandom_range(1000)) - 500);
    repeat (2) @(negedge clk); rst_n = 1; @(negedge clk);
    for (int t = 0; t < T; t++)
      for (int p = 0; p < P; p++) begin
        in_valid = 1; in_first = (p == 0); in_last = (p == P - 1); in_first_frame = (t == 0);
        o = ov[t][p]; p_cur = p;
        @(negedge clk);
      end
    in_valid = 0;
    repeat (10) @(negedge clk);
    checks++;
    if (nframe != T) begin failures++; $display("FAIL %0d frames delivered", nframe); end
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
