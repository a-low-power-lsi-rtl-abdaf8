// Testbench for coef_rom: every entry against its formula (Hamming window,
// cosine and sine of 2 pi k / 128), Q1.15, rounded, clipped at 32767.
module tb_coef_rom;
  localparam int NFFT = 128;
  localparam real PI = 3.14159265358979323846;
  logic [7:0] addr;
  logic signed [15:0] data;
  int checks = 0, failures = 0;

  coef_rom dut (.*);

  function automatic int q15(input real v);
    real r = v * 32768.0;
    int q = $rtoi(r >= 0.0 ? r + 0.5 : r - 0.5);
    return q > 32767 ? 32767 : q;
  endfunction

  initial begin
    for (int a = 0; a < 2 * NFFT; a++) begin
      int e;
      if (a < NFFT) e = q15(0.54 - 0.46 * $cos(2.0 * PI * a / (NFFT - 1)));
      else if (a < NFFT + NFFT / 2) e = q15($cos(2.0 * PI * (a - NFFT) / NFFT));
      else e = q15($sin(2.0 * PI * (a - NFFT - NFFT / 2) / NFFT));
      addr = 8'(a); #1;
      checks++;
      if (int'(data) != e) begin failures++; $display("FAIL addr %0d: %0d expected %0d", a, data, e); end
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
