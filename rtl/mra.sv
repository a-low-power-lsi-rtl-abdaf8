// Multiple port register array (MRA1, MRA2, MRA3 of the recognition engine).
// Holds one word model's worth of training data as ROWS x COLS registers of
// DW bits, one row per HMM state. It is written one word per clock from the
// 16-bit bus (wr_en, wr_row, wr_col, wr_data) and has NRD read ports; each
// read port selects a column and returns that column of every row at once,
// so all N processing elements get their own operand in the same cycle.
// Reads are combinational; a write is visible on the next cycle.
// The register-array idea and the per-state organisation follow the source
// design; the exact port set (column-wide read ports) is this design's choice.
module mra #(
  parameter int unsigned ROWS = 12,
  parameter int unsigned COLS = 16,
  parameter int unsigned DW   = 16,
  parameter int unsigned NRD  = 1,
  localparam int unsigned RW  = (ROWS > 1) ? $clog2(ROWS) : 1,
  localparam int unsigned CW  = (COLS > 1) ? $clog2(COLS) : 1
) (
  input  logic                 clk,
  input  logic                 wr_en,
  input  logic [RW-1:0]        wr_row,
  input  logic [CW-1:0]        wr_col,
  input  logic [DW-1:0]        wr_data,
  input  logic [NRD-1:0][CW-1:0] rd_col,
  output logic [NRD-1:0][ROWS-1:0][DW-1:0] rd_data
);
  logic [DW-1:0] regs [ROWS][COLS];

  always_ff @(posedge clk) begin
    if (wr_en && 32'(wr_row) < ROWS && 32'(wr_col) < COLS) regs[wr_row][wr_col] <= wr_data;
  end

  always_comb begin
    for (int r = 0; r < NRD; r++)
      for (int i = 0; i < ROWS; i++)
        rd_data[r][i] = (32'(rd_col[r]) < COLS) ? regs[i][rd_col[r]] : '0;
  end
endmodule
