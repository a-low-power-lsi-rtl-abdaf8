// Self-checking testbench for fft_unit with coef_rom. Checks the window
// operation exactly against (x * round(32768 * hamming)) >>> 15, a scaled
// forward FFT against a floating-point DFT divided by NFFT, and a scaled
// inverse FFT of a known spectrum against its floating-point inverse DFT
// divided by NFFT, all within 256 LSB (2^-15 of full scale; the Q1.15 coefficients clip 1.0 to 32767/32768). Also checks the cycle count
// of a transform (7 stages x 64 butterflies x 10 clocks for NFFT = 128).
module tb_fft_unit;
  localparam int NFFT = 128;
  localparam real PI = 3.14159265358979323846;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic wr_en = 0, start = 0, scale = 1;
  logic [6:0] wr_addr = 0, rd_addr = 0;
  logic signed [23:0] wr_re = 0, wr_im = 0, rd_re, rd_im;
  logic [1:0] op = 0;
  logic busy, done;
  logic [7:0] coef_addr;
  logic signed [15:0] coef_data;

  fft_unit dut (.clk, .rst_n, .wr_en, .wr_addr, .wr_re, .wr_im, .rd_addr, .rd_re, .rd_im,
                .start, .op, .scale, .busy, .done, .coef_addr, .coef_data);
  coef_rom rom (.addr(coef_addr), .data(coef_data));

  int checks = 0, failures = 0;
  real xr [NFFT], xi [NFFT];
  int  max_err;

  task automatic load();
    for (int n = 0; n < NFFT; n++) begin
      @(negedge clk);
      wr_en = 1; wr_addr = 7'(n);
      wr_re = 24'($rtoi(xr[n])); wr_im = 24'($rtoi(xi[n]));
    end
    @(negedge clk); wr_en = 0;
  endtask

  task automatic run_op(input logic [1:0] o, output int cycles);
    @(negedge clk); op = o; start = 1;
    @(negedge clk); start = 0;
    cycles = 1;
    while (!done) begin @(negedge clk); cycles++; end
  endtask

  task automatic compare_dft(input bit inverse);
    real er, ei, ang;
    int d;
    max_err = 0;
    for (int k = 0; k < NFFT; k++) begin
      er = 0; ei = 0;
      for (int n = 0; n < NFFT; n++) begin
        ang = (inverse ? 2.0 : -2.0) * PI * k * n / NFFT;
        er += xr[n] * $cos(ang) - xi[n] * $sin(ang);
        ei += xr[n] * $sin(ang) + xi[n] * $cos(ang);
      end
      er /= NFFT; ei /= NFFT;
      rd_addr = 7'(k); #1;
      d = $rtoi(er - real'(rd_re)); if (d < 0) d = -d; if (d > max_err) max_err = d;
      d = $rtoi(ei - real'(rd_im)); if (d < 0) d = -d; if (d > max_err) max_err = d;
    end
    checks++;
    if (max_err > 256) begin failures++; $display("FAIL FFT%s max error %0d", inverse ? " inverse" : " forward", max_err); end
    else $display("FFT%s max error %0d LSB", inverse ? " inverse" : " forward", max_err);
  endtask

  initial begin
    int cyc;
    repeat (2) @(negedge clk); rst_n = 1;
    // window
    for (int n = 0; n < NFFT; n++) begin xr[n] = real'($signed($urandom_range(8000000)) - 4000000); xi[n] = 0; end
    load();
    run_op(2'd0, cyc);
    for (int n = 0; n < NFFT; n++) begin
      longint w, expv;
      real r;
      r = (0.54 - 0.46 * $cos(2.0 * PI * n / (NFFT - 1))) * 32768.0 + 0.5;
      w = longint'($rtoi(r)); if (w > 32767) w = 32767;
      expv = (longint'($rtoi(xr[n])) * w) >>> 15;
      // before a transform the memory holds the points in bit-reversed order
      rd_addr = {<<{7'(n)}}; #1;
      checks++;
      if (longint'(rd_re) != expv) begin failures++; $display("FAIL window n=%0d got %0d exp %0d", n, rd_re, expv); end
    end
    // forward FFT of random complex data
    for (int n = 0; n < NFFT; n++) begin
      xr[n] = real'($signed($urandom_range(8000000)) - 4000000);
      xi[n] = real'($signed($urandom_range(8000000)) - 4000000);
    end
    load();
    run_op(2'd1, cyc);
    checks++;
    if (cyc > 7 * 64 * 10 + 2) begin failures++; $display("FAIL FFT took %0d clocks", cyc); end
    $display("FFT: %0d clocks", cyc);
    compare_dft(0);
    // inverse FFT of a two-tone spectrum plus noise
    for (int n = 0; n < NFFT; n++) begin
      xr[n] = real'($signed($urandom_range(200000)) - 100000);
      xi[n] = real'($signed($urandom_range(200000)) - 100000);
    end
    xr[3] = 6000000; xi[125] = -5000000;
    load();
    run_op(2'd2, cyc);
    compare_dft(1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
