// FFT/IFFT circuit: in-place radix-2 decimation-in-time FFT on NFFT complex
// 24-bit points, built around one 24x16 multiplier and one 24+24 adder/
// subtracter as in the source design.
// Data memory: NFFT words of {re, im}. The write port stores point n at the
// bit-reversed address, so after a transform the read port, which reads the
// memory directly, returns X[k] at address k (before a transform, point n is
// found at the bit-reversed address). Operations (op, then a start pulse):
//   OP_WINDOW  x[n].re <= x[n].re * w[n]          2 clocks per point
//   OP_FFT     forward transform, W = cos - j sin
//   OP_IFFT    inverse transform, W = cos + j sin (no 1/N beyond scaling)
// A butterfly takes 10 clocks: load A and B into Reg1 (Xr, Xi, Yr, Yi); four
// multiplies with cos/sin from the coefficient ROM build the rotated B in
// Reg2 (A, B); four add/subtract steps form A + WB and A - WB, each halved when
// `scale` is set (the 1/2 scaling flag); write back. An NFFT = 128 transform
// takes 7 * 64 * 10 = 4480 clocks. Products are taken as (x * c) >>> 15 with
// Q1.15 coefficients; sums saturate to 24 bits when not halved.
// Coefficient ROM port: coef_addr out, coef_data in (combinational ROM).
// busy is high while an operation runs; done pulses when it ends. The host
// ports may be used only while busy is low.
// The datapath resources and widths follow the source design; the
// micro-sequence, the internal data memory and the bit-reversed store are
// this design's choices.
module fft_unit #(
  parameter int unsigned NFFT = 128,
  parameter int unsigned DW   = 24,
  localparam int unsigned AW  = $clog2(NFFT),
  localparam int unsigned CAW = $clog2(2 * NFFT)
) (
  input  logic                  clk,
  input  logic                  rst_n,
  // host access
  input  logic                  wr_en,
  input  logic [AW-1:0]         wr_addr,
  input  logic signed [DW-1:0]  wr_re,
  input  logic signed [DW-1:0]  wr_im,
  input  logic [AW-1:0]         rd_addr,
  output logic signed [DW-1:0]  rd_re,
  output logic signed [DW-1:0]  rd_im,
  // command
  input  logic                  start,
  input  logic [1:0]            op,
  input  logic                  scale,
  output logic                  busy,
  output logic                  done,
  // coefficient ROM
  output logic [CAW-1:0]        coef_addr,
  input  logic signed [15:0]    coef_data
);
  localparam logic [1:0] OP_WINDOW = 2'd0, OP_FFT = 2'd1, OP_IFFT = 2'd2;

  typedef enum logic [3:0] {
    S_IDLE, S_RD, S_M1, S_M2, S_M3, S_M4, S_A1, S_A2, S_A3, S_A4, S_WR,
    S_WRD, S_WMUL
  } state_e;
  state_e state;

  logic signed [DW-1:0] mem_re [NFFT];
  logic signed [DW-1:0] mem_im [NFFT];

  logic signed [DW-1:0] xr, xi, yr, yi;   // Reg1
  logic signed [DW-1:0] ra, rb;           // Reg2
  logic [1:0]           op_q;
  logic                 scale_q;
  logic [$clog2(AW+1)-1:0] stage;
  logic [AW-1:0]        bfly;             // butterfly (or point) counter

  function automatic logic [AW-1:0] bitrev(input logic [AW-1:0] a);
    for (int i = 0; i < int'(AW); i++) bitrev[i] = a[AW-1-i];
  endfunction

  // butterfly addressing
  logic [AW-1:0] half, pos, ia, ib, tw;
  always_comb begin
    half = AW'(1) << stage;
    pos  = bfly & (half - 1'b1);
    ia   = ((bfly >> stage) << (stage + 1)) | pos;
    ib   = ia | half;
    tw   = pos << (AW - 1 - int'(stage));
  end

  // coefficient select (the Selector of the datapath)
  always_comb begin
    case (state)
      S_M1, S_M3: coef_addr = CAW'(NFFT) + CAW'(tw);                 // cos
      S_M2, S_M4: coef_addr = CAW'(NFFT) + CAW'(NFFT / 2) + CAW'(tw); // sin
      default:    coef_addr = CAW'(bitrev(bfly));                     // window
    endcase
  end

  // shared multiplier 24 x 16 and adder/subtracter
  logic signed [DW-1:0] mul_a, mul_p;
  logic signed [DW+15:0] mul_full;
  logic signed [DW-1:0] as_a, as_b, as_r;
  logic                 as_sub, as_halve;
  logic signed [DW:0]   as_full;
  localparam logic signed [DW:0] MAXV = (DW+1)'((64'sd1 <<< (DW - 1)) - 1);
  localparam logic signed [DW:0] MINV = -(DW+1)'(64'sd1 <<< (DW - 1));

  always_comb begin
    case (state)
      S_M1, S_M4: mul_a = yr;
      S_M2, S_M3: mul_a = yi;
      default:    mul_a = xr;
    endcase
    mul_full = mul_a * coef_data;
    mul_p    = DW'(mul_full >>> 15);

    as_halve = 1'b0;
    as_sub   = 1'b0;
    as_a     = ra;
    as_b     = mul_p;
    case (state)
      S_M2: begin as_a = ra; as_b = mul_p; as_sub = (op_q == OP_IFFT); end
      S_M4: begin as_a = rb; as_b = mul_p; as_sub = (op_q != OP_IFFT); end
      S_A1: begin as_a = xr; as_b = ra; as_sub = 1'b1; as_halve = scale_q; end
      S_A2: begin as_a = xr; as_b = ra; as_sub = 1'b0; as_halve = scale_q; end
      S_A3: begin as_a = xi; as_b = rb; as_sub = 1'b1; as_halve = scale_q; end
      S_A4: begin as_a = xi; as_b = rb; as_sub = 1'b0; as_halve = scale_q; end
      default: ;
    endcase
    as_full = as_sub ? (DW+1)'(as_a) - (DW+1)'(as_b) : (DW+1)'(as_a) + (DW+1)'(as_b);
    if (as_halve) as_r = DW'(as_full >>> 1);
    else if (as_full > MAXV) as_r = DW'(MAXV);
    else if (as_full < MINV) as_r = DW'(MINV);
    else as_r = DW'(as_full);
  end

  assign rd_re = mem_re[rd_addr];
  assign rd_im = mem_im[rd_addr];
  assign busy  = state != S_IDLE;

  always_ff @(posedge clk) begin
    if (wr_en && state == S_IDLE) begin
      mem_re[bitrev(wr_addr)] <= wr_re;
      mem_im[bitrev(wr_addr)] <= wr_im;
    end else if (state == S_WR) begin
      mem_re[ia] <= xr; mem_im[ia] <= xi;
      mem_re[ib] <= yr; mem_im[ib] <= yi;
    end else if (state == S_WMUL) begin
      mem_re[bfly] <= mul_p;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE; done <= 1'b0; op_q <= '0; scale_q <= 1'b0;
      stage <= '0; bfly <= '0;
      xr <= '0; xi <= '0; yr <= '0; yi <= '0; ra <= '0; rb <= '0;
    end else begin
      done <= 1'b0;
      case (state)
        S_IDLE: if (start) begin
          op_q    <= op;
          scale_q <= scale;
          stage   <= '0;
          bfly    <= '0;
          state   <= (op == OP_WINDOW) ? S_WRD : S_RD;
        end
        S_WRD:  begin xr <= mem_re[bfly]; state <= S_WMUL; end
        S_WMUL: begin
          bfly <= bfly + 1'b1;
          if (bfly == AW'(NFFT - 1)) begin state <= S_IDLE; done <= 1'b1; end
          else state <= S_WRD;
        end
        S_RD: begin
          xr <= mem_re[ia]; xi <= mem_im[ia];
          yr <= mem_re[ib]; yi <= mem_im[ib];
          state <= S_M1;
        end
        S_M1: begin ra <= mul_p; state <= S_M2; end  // Yr*c
        S_M2: begin ra <= as_r;  state <= S_M3; end  // +/- Yi*s  -> re(WB)
        S_M3: begin rb <= mul_p; state <= S_M4; end  // Yi*c
        S_M4: begin rb <= as_r;  state <= S_A1; end  // -/+ Yr*s  -> im(WB)
        S_A1: begin yr <= as_r;  state <= S_A2; end
        S_A2: begin xr <= as_r;  state <= S_A3; end
        S_A3: begin yi <= as_r;  state <= S_A4; end
        S_A4: begin xi <= as_r;  state <= S_WR; end
        S_WR: begin
          state <= S_RD;
          if (bfly == AW'(NFFT / 2 - 1)) begin
            bfly <= '0;
            if (32'(stage) == AW - 1) begin state <= S_IDLE; done <= 1'b1; end
            stage <= stage + 1'b1;
          end else bfly <= bfly + 1'b1;
        end
        default: state <= S_IDLE;
      endcase
    end
  end
endmodule
