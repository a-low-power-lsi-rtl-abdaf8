// Testbench helpers shared by the system-level testbenches: the contents of
// the Flash model (a hash of the address, so no table is stored), the A/D
// test signal, and a behavioural model of the HMM scoring (equations (1)-(4)
// with the fixed-point rules documented in pe1/pe2) used as the reference,
// and a floating-point FFT cepstrum scaled like the analysis hardware.
package tb_util_pkg;
  localparam int N = 12, P = 16, MW = (3 + 2 * P) * N;

  function automatic int unsigned hash32(input int unsigned a);
    int unsigned x = a * 32'h9E3779B1 + 32'h7F4A7C15;
    x ^= x >> 15; x *= 32'h2C1B3C6D; x ^= x >> 12; x *= 32'h297A2D39; x ^= x >> 15;
    return x;
  endfunction

  // Training word at Flash address a: model a / MW, field a % MW.
  function automatic logic [15:0] flash_word(input int unsigned a);
    int unsigned i = a % MW, h = hash32(a);
    if (i < N * P)     return 16'($signed(int'(h % 101)) - 50);          // u_jp
    if (i < 2 * N * P) return 16'(h % 400);                               // s_jp
    case ((i - 2 * N * P) % 3)
      0:       return 16'($signed(int'(h % 2001)) - 1000);                // w_j
      default: return 16'(h % 300);                                       // a_jj, a_(j-1)j
    endcase
  endfunction

  // 12-bit offset-binary A/D code of sample n: two tones plus uniform noise.
  function automatic logic [11:0] adc_code(input int n);
    real v;
    v = 900.0 * $sin(2.0 * 3.14159265358979 * n * 9.0 / 128.0 + 0.3 * (n / 128))
      + 450.0 * $sin(2.0 * 3.14159265358979 * n * (21.0 + (n / 128) % 5) / 128.0)
      + real'(int'(hash32(n + 32'h1000_0000) % 701) - 350);
    return 12'(2048 + $rtoi(v));
  endfunction

  function automatic longint sat(longint v, int w);
    longint hi = (longint'(1) << (w - 1)) - 1, lo = -(longint'(1) << (w - 1));
    return v > hi ? hi : (v < lo ? lo : v);
  endfunction

  // Path cost min_j delta_T(j) of word model wd for input vectors o[t*P+p].
  function automatic longint model_score(input int wd, input int T, ref logic [15:0] o []);
    longint d [N], nd [N], lb, x, best;
    longint INF = (longint'(1) << 23) - 1;
    int unsigned base = wd * MW;
    for (int t = 0; t < T; t++) begin
      for (int j = 0; j < N; j++) begin
        lb = longint'($signed(flash_word(base + 2 * N * P + 3 * j)));
        for (int p = 0; p < P; p++) begin
          x  = sat(longint'($signed(o[t * P + p])) + longint'($signed(flash_word(base + j * P + p))), 13);
          x  = sat((x * x) >>> 8, 16);
          x  = sat((x * longint'($signed(flash_word(base + N * P + j * P + p)))) >>> 8, 16);
          lb = sat(lb + x, 18);
        end
        if (t == 0) best = (j == 0) ? 0 : INF;
        else begin
          longint c1, c2;
          c1 = (j == 0) ? INF : sat(d[j-1] + longint'($signed(flash_word(base + 2 * N * P + 3 * j + 2))), 24);
          c2 = sat(d[j] + longint'($signed(flash_word(base + 2 * N * P + 3 * j + 1))), 24);
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
  // floating-point FFT cepstrum of frame f, scaled like the hardware
  localparam int NFFT = 128;
  localparam real PI = 3.14159265358979323846;

  function automatic void ref_cepstrum(input int f, output real c [P]);
    real xw [NFFT], lg [NFFT], re, im, pw, wq;
    for (int n = 0; n < NFFT; n++) begin
      longint x, w;
      x  = longint'($signed(adc_code(f * NFFT + n) ^ 12'h800)) <<< 11;
      wq = (0.54 - 0.46 * $cos(2.0 * PI * n / (NFFT - 1))) * 32768.0 + 0.5;
      w  = longint'($rtoi(wq)); if (w > 32767) w = 32767;
      xw[n] = real'((x * w) >>> 15);
    end
    for (int k = 0; k < NFFT; k++) begin
      re = 0; im = 0;
      for (int n = 0; n < NFFT; n++) begin
        re += xw[n] * $cos(2.0 * PI * k * n / NFFT);
        im -= xw[n] * $sin(2.0 * PI * k * n / NFFT);
      end
      re /= NFFT; im /= NFFT;
      pw = $floor((re * re + im * im) / 1048576.0);
      if (pw > 16777215.0) pw = 16777215.0;
      lg[k] = (pw < 1.0) ? 0.0 : $ln(pw) / $ln(2.0);
    end
    for (int p = 0; p < P; p++) begin
      c[p] = 0;
      for (int k = 0; k < NFFT; k++) c[p] += lg[k] * $cos(2.0 * PI * k * (p + 1) / NFFT);
      c[p] = c[p] / NFFT * 65536.0 / 256.0;
    end
  endfunction

endpackage
