// Sampling unit: takes 12-bit samples from the external A/D converter at the
// speech sampling rate and hands them on as 16-bit words.
// A counter divides the system clock by DIV (907 gives 11.025 kHz from a
// 10 MHz clock). At the end of each period adc_clk pulses for one clock to
// start the converter, and the word on adc_data is captured. The converter's
// offset-binary code is turned into two's complement (MSB inverted) and
// scaled to 16 bits (shifted left by 4); sample_valid pulses with it one
// clock after adc_clk. While enable is low the divider is held at zero.
// The four low bits of sample are therefore always zero.
// The 12-bit input, 16-bit output and 11.025 kHz rate follow the source
// design; the divider, the strobe and the code conversion are this design's.
module sampling #(
  parameter int unsigned DIV = 907
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               enable,
  input  logic [11:0]        adc_data,
  output logic               adc_clk,
  output logic               sample_valid,
  output logic signed [15:0] sample
);
  localparam int unsigned CW = $clog2(DIV + 1);
  logic [CW-1:0] cnt;

  assign adc_clk = enable && (32'(cnt) == DIV - 1);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt <= '0; sample_valid <= 1'b0; sample <= '0;
    end else begin
      sample_valid <= 1'b0;
      if (!enable) cnt <= '0;
      else if (adc_clk) begin
        cnt          <= '0;
        sample       <= {~adc_data[11], adc_data[10:0], 4'b0000};
        sample_valid <= 1'b1;
      end else cnt <= cnt + 1'b1;
    end
  end
endmodule
