// Testbench for pe3: a clear followed by a sequence of word scores; after
// each one the kept score and word index must equal the running minimum
// (ties keep the earlier word). A second sequence after another clear checks
// that clear forgets the first.
module tb_pe3;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic clear = 0, in_valid = 0;
  logic signed [15:0] in_score = 0, best_score;
  logic [9:0] in_index = 0, best_index;
  int checks = 0, failures = 0, n_upd = 0, n_keep = 0;

  pe3 dut (.*);

  task automatic run_seq(input int len);
    longint bs = 32767; int bi = 0;
    @(negedge clk); clear = 1; @(negedge clk); clear = 0;
    for (int i = 0; i < len; i++) begin
      in_valid = 1; in_index = 10'(i);
      in_score = (i % 9 == 4) ? 16'(bs) : 16'($signed($urandom_range(60000)) - 30000);
      if (longint'(in_score) < bs) begin bs = in_score; bi = i; n_upd++; end else n_keep++;
      @(negedge clk);
      in_valid = 0;
      if ($urandom_range(1)) @(negedge clk);
      checks++;
      if (longint'(best_score) != bs || best_index != 10'(bi)) begin
        failures++; $display("FAIL step %0d: %0d/%0d expected %0d/%0d", i, best_score, best_index, bs, bi);
      end
    end
  endtask

  initial begin
    repeat (2) @(negedge clk); rst_n = 1;
    run_seq(60);
    run_seq(40);
    checks++;
    if (n_upd == 0 || n_keep == 0) begin failures++; $display("FAIL update/keep not both seen"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (2000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
