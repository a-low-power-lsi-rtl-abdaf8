// Logarithm circuit using sequential table lookup (STL).
// Computes y = log2(x) for a 24-bit unsigned x, as a signed Q7.16 value.
// Cycle 1 normalises x to a mantissa m in [1, 2) and an exponent e (leading
// one position). Then, for k = 1 .. K, one step per clock: if m * (1 + 2^-k)
// is still below 2, m takes that value (a shift and an add) and the table
// entry log2(1 + 2^-k) is added to an accumulator. When the steps end, m is
// within a factor (1 + 2^-K) of 2, so log2(x) = e + 1 - accumulator.
// The table holds round(2^16 * log2(1 + 2^-k)) for k = 1 .. 16.
// x = 0 has no logarithm; it returns 0, as x = 1 does.
// Interface: pulse start with x; done pulses K + 2 clocks later with y valid
// (y holds until the next start). The STL method is named by the source
// design; the number format and iteration count are this design's choices.
module log_stl #(
  parameter int unsigned XW = 24,
  parameter int unsigned K  = 16
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 start,
  input  logic [XW-1:0]        x,
  output logic                 busy,
  output logic                 done,
  output logic signed [23:0]   y
);
  localparam int unsigned EW = $clog2(XW);

  function automatic logic [16:0] lut(input int k);
    case (k)
      1: return 17'd38336;  2: return 17'd21098;  3: return 17'd11136;
      4: return 17'd5732;   5: return 17'd2909;   6: return 17'd1466;
      7: return 17'd736;    8: return 17'd369;    9: return 17'd184;
      10: return 17'd92;    11: return 17'd46;    12: return 17'd23;
      13: return 17'd12;    14: return 17'd6;     15: return 17'd3;
      16: return 17'd1;
      default: return 17'd0;
    endcase
  endfunction

  logic [XW:0]   m;       // Q1.(XW-1) with one guard bit
  logic [EW-1:0] e;
  logic [21:0]   acc;
  logic [4:0]    k;
  logic          run, zero;

  logic [XW:0]   m_try;
  assign m_try = m + (m >> k);

  logic [EW-1:0] lead;
  always_comb begin
    lead = '0;
    for (int i = 0; i < int'(XW); i++) if (x[i]) lead = EW'(i);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      m <= '0; e <= '0; acc <= '0; k <= '0; run <= 1'b0; zero <= 1'b0;
      done <= 1'b0; y <= '0;
    end else begin
      done <= 1'b0;
      if (start) begin
        e    <= lead;
        m    <= (XW+1)'(x) << (XW - 1 - int'(lead));
        zero <= (x == '0);
        acc  <= '0;
        k    <= 5'd1;
        run  <= 1'b1;
      end else if (run) begin
        if (m_try[XW] == 1'b0) begin  // still below 2.0
          m   <= m_try;
          acc <= acc + 22'(lut(int'(k)));
        end
        if (32'(k) == K) begin
          run  <= 1'b0;
          done <= 1'b1;
          if (zero) y <= '0;
          else y <= (24'(e) << 16) + 24'sd65536 - 24'(acc) - ((m_try[XW] == 1'b0) ? 24'(lut(int'(k))) : 24'd0);
        end
        k <= k + 1'b1;
      end
    end
  end

  assign busy = run;
endmodule
