// Testbench for pe2: random and corner-case operands (impossible paths,
// saturation, first frame, first state) against a behavioural model of the
// left-right Viterbi update, equations (2) and (3).
module tb_pe2;
  logic first_frame, is_first_state;
  logic signed [23:0] delta_prev, delta_self, delta_new;
  logic signed [15:0] a_in, a_self;
  logic signed [17:0] logb;
  int checks = 0, failures = 0;
  localparam longint INF = (longint'(1) << 23) - 1;

  pe2 dut (.*);

  function automatic longint sat(longint v, int wd);
    longint hi = (longint'(1) << (wd - 1)) - 1, lo = -(longint'(1) << (wd - 1));
    return v > hi ? hi : (v < lo ? lo : v);
  endfunction

  initial begin
    for (int k = 0; k < 3000; k++) begin
      longint c1, c2, best, e;
      first_frame    = ($urandom_range(9) == 0);
      is_first_state = ($urandom_range(5) == 0);
      delta_prev = (k % 7 == 0) ? 24'(INF) : 24'($signed($urandom_range(2000000)) - 300000);
      delta_self = (k % 11 == 0) ? 24'(INF) : 24'($signed($urandom_range(2000000)) - 300000);
      if (k % 13 == 0) delta_self = 24'sh7ffff0;
      a_in   = 16'($urandom_range(2000));
      a_self = 16'($urandom_range(2000));
      logb   = 18'($signed($urandom_range(200000)) - 100000);
      #1;
      c1 = is_first_state ? INF : sat(longint'(delta_prev) + a_in, 24);
      c2 = sat(longint'(delta_self) + a_self, 24);
      best = c1 < c2 ? c1 : c2;
      if (first_frame) best = is_first_state ? 0 : INF;
      e = (best == INF) ? INF : sat(best + logb, 24);
      checks++;
      if (longint'(delta_new) != e) begin
        failures++;
        $display("FAIL ff=%0d fs=%0d dp=%0d ds=%0d ai=%0d as=%0d lb=%0d got %0d exp %0d",
                 first_frame, is_first_state, delta_prev, delta_self, a_in, a_self, logb, delta_new, e);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #100000;
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
