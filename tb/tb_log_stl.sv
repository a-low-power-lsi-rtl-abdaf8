// Testbench for log_stl: log2 of random 24-bit values (spread over all
// exponents), powers of two and 0, against the real logarithm, within 12 LSB
// of Q7.16. Checks that done comes K + 2 = 18 clocks after start.
module tb_log_stl;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic start = 0, busy, done;
  logic [23:0] x = 0;
  logic signed [23:0] y;
  int checks = 0, failures = 0, maxerr = 0;

  log_stl dut (.*);

  task automatic one(input logic [23:0] v);
    int cyc = 0, e;
    real r;
    @(negedge clk); x = v; start = 1;
    @(negedge clk); start = 0; x = '0;
    cyc = 1;
    while (!done) begin @(negedge clk); cyc++; end
    r = (v == 0) ? 0.0 : $ln(real'(v)) / $ln(2.0) * 65536.0;
    e = $rtoi(r - real'(y)); if (e < 0) e = -e;
    if (e > maxerr) maxerr = e;
    checks += 2;
    if (e > 12) begin failures++; $display("FAIL log2(%0d) = %0d expected %0.1f", v, y, r); end
    if (cyc != 17) begin failures++; $display("FAIL latency %0d", cyc + 1); end
  endtask

  initial begin
    repeat (2) @(negedge clk); rst_n = 1;
    one(0); one(1); one(2); one(3); one(24'hFFFFFF); one(24'h800000);
    for (int i = 0; i < 24; i++) one(24'(1) << i);
    for (int i = 0; i < 400; i++) one(24'($urandom) >> $urandom_range(23));
    $display("max error %0d LSB", maxerr);
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
