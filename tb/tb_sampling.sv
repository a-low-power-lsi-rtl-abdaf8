// Testbench for sampling (DIV = 10): checks the strobe period, the captured
// sample (offset binary to two's complement, times 16), that nothing happens
// while enable is low, and the count of samples in a fixed window.
module tb_sampling;
  localparam int DIV = 10;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic enable = 0, adc_clk, sample_valid;
  logic [11:0] adc_data = 0;
  logic signed [15:0] sample;
  int checks = 0, failures = 0, cyc = 0, last = -1, nsamp = 0;
  logic [11:0] at_strobe = 0;

  sampling #(.DIV(DIV)) dut (.*);

  always @(negedge clk) begin
    cyc++;
    adc_data = 12'($urandom);
    if (adc_clk) begin
      at_strobe = adc_data;
      if (last >= 0) begin
        checks++;
        if (cyc - last != DIV) begin failures++; $display("FAIL period %0d", cyc - last); end
      end
      last = cyc;
    end
    if (sample_valid) begin
      nsamp++;
      checks++;
      if (sample != $signed({~at_strobe[11], at_strobe[10:0], 4'b0})) begin
        failures++; $display("FAIL sample %0d from code %0d", sample, at_strobe);
      end
    end
    if (!enable && adc_clk) begin
      failures++; checks++; $display("FAIL activity while disabled");
    end
  end

  initial begin
    repeat (3) @(negedge clk); rst_n = 1;
    repeat (50) @(negedge clk);
    enable = 1;
    repeat (DIV * 30) @(negedge clk);
    enable = 0;
    @(negedge clk);
    checks++;
    if (nsamp != 30) begin failures++; $display("FAIL %0d samples", nsamp); end
    repeat (50) @(negedge clk);
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
