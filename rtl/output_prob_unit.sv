// Output probability calculation unit: N PE1s working as a SIMD array plus
// the register array RA1 that hands their results to the likelihood unit.
// Every clock the control unit broadcasts one input vector element o_tp to
// all PE1s; PE j takes u_jp and s_jp from lane j of MRA1/MRA2 and w_j from
// lane j of MRA3. When a frame's last element has been accumulated, all N
// values log b_j(o_t) are copied into RA1 together and ra1_valid pulses for
// one clock; RA1 then holds them for P cycles while the next frame is
// accumulated. ra1_first marks the results of frame t = 1.
// The array of N PEs fed from register arrays and RA1 follow the source
// design; the frame tagging is this design's choice.
module output_prob_unit
  import wr_pkg::*;
#(
  parameter int unsigned N = N_STATES
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       in_valid,
  input  logic                       in_first,
  input  logic                       in_last,
  input  logic                       in_first_frame,
  input  logic signed [DW-1:0]       o,
  input  logic [N-1:0][DW-1:0]       u_lane,
  input  logic [N-1:0][DW-1:0]       s_lane,
  input  logic [N-1:0][DW-1:0]       w_lane,
  output logic                       ra1_valid,
  output logic                       ra1_first,
  output logic [N-1:0][LOGB_W-1:0]   ra1
);
  logic [N-1:0]             pe_valid;
  logic [N-1:0][LOGB_W-1:0] pe_logb;
  // first-frame tag travelling alongside the 4-stage PE pipeline
  logic [3:0]               ff_pipe;

  for (genvar j = 0; j < N; j++) begin : g_pe
    pe1 u_pe1 (
      .clk, .rst_n, .in_valid, .in_first, .in_last, .o,
      .u(u_lane[j]), .s(s_lane[j]), .w(w_lane[j]),
      .logb_valid(pe_valid[j]), .logb(pe_logb[j])
    );
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ff_pipe   <= '0;
      ra1_valid <= 1'b0;
      ra1_first <= 1'b0;
      ra1       <= '0;
    end else begin
      ff_pipe   <= {ff_pipe[2:0], in_valid && in_first_frame};
      ra1_valid <= pe_valid[0];
      if (pe_valid[0]) begin
        ra1       <= pe_logb;
        ra1_first <= ff_pipe[3];
      end
    end
  end
endmodule
