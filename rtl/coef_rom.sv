// Window/twiddle coefficient ROM of the speech analysis unit.
// One 16-bit read port (combinational). Three regions, for an NFFT-point FFT:
//   addr [0, NFFT)              window w[n] = 0.54 - 0.46 cos(2 pi n / (NFFT-1))
//   addr [NFFT, NFFT*3/2)       cos(2 pi k / NFFT),  k = addr - NFFT
//   addr [NFFT*3/2, NFFT*2)     sin(2 pi k / NFFT),  k = addr - NFFT*3/2
// All values are signed Q1.15, rounded to nearest and clipped to 32767.
// The table is computed from these formulas at elaboration time with integer
// arithmetic only: the angle 2 pi n / m is split into a quadrant and a
// remainder in [0, pi/2), whose cosine and sine come from Taylor series in
// Q2.30 fixed point (error far below one Q1.15 step). A 16-bit coefficient
// ROM holding the window and the twiddle factors is from the source design;
// the Hamming window and the memory map are this design's choices.
module coef_rom #(
  parameter int unsigned NFFT = 128,
  localparam int unsigned AW  = $clog2(2 * NFFT)
) (
  input  logic [AW-1:0]       addr,
  output logic signed [15:0]  data
);
  localparam longint ONE   = 64'sd1 << 30;
  localparam longint PI_Q  = 64'sd3373259426;   // round(pi * 2^30)
  localparam longint H054  = 64'sd579820585;    // round(0.54 * 2^30)
  localparam longint H046  = 64'sd493921239;    // round(0.46 * 2^30)

  logic signed [15:0] rom [2 * NFFT];

  // cos (want_sin = 0) or sin (want_sin = 1) of x in [0, pi/2), both Q2.30
  function automatic longint taylor(input longint x, input bit want_sin);
    longint x2, t, acc;
    x2  = (x * x) >>> 30;
    t   = want_sin ? x : ONE;
    acc = t;
    for (int k = 1; k <= 9; k++) begin
      longint d;
      d   = want_sin ? longint'((2 * k) * (2 * k + 1)) : longint'((2 * k - 1) * (2 * k));
      t   = -(((t * x2) >>> 30) / d);
      acc = acc + t;
    end
    return acc;
  endfunction

  // cos(2 pi n / m) (want_sin = 0) or sin(2 pi n / m), Q2.30
  function automatic longint trig(input longint n, input longint m, input bit want_sin);
    longint q, r, x, c, s;
    q = (4 * n) / m;
    r = (4 * n) % m;
    x = (PI_Q * r) / (2 * m);
    c = taylor(x, 1'b0);
    s = taylor(x, 1'b1);
    case (q % 4)
      0: return want_sin ?  s :  c;
      1: return want_sin ?  c : -s;
      2: return want_sin ? -s : -c;
      default: return want_sin ? -c : s;
    endcase
  endfunction

  // Q2.30 to Q1.15, rounded half away from zero, clipped
  function automatic logic signed [15:0] q15(input longint v);
    longint r;
    r = (v >= 0) ? (v + (64'sd1 <<< 14)) >>> 15 : -((-v + (64'sd1 <<< 14)) >>> 15);
    if (r > 32767) return 16'sd32767;
    if (r < -32768) return -16'sd32768;
    return 16'(r);
  endfunction

  initial begin
    for (int n = 0; n < int'(NFFT); n++)
      rom[n] = q15(H054 - ((H046 * trig(longint'(n), longint'(NFFT) - 1, 1'b0)) >>> 30));
    for (int k = 0; k < int'(NFFT / 2); k++) begin
      rom[NFFT + k]            = q15(trig(longint'(k), longint'(NFFT), 1'b0));
      rom[NFFT + NFFT / 2 + k] = q15(trig(longint'(k), longint'(NFFT), 1'b1));
    end
  end

  assign data = rom[addr];
endmodule
