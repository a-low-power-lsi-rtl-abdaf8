// Behavioural model of the external Flash memory holding the word models:
// a read (re) returns tb_util_pkg::flash_word(addr) on rdata after the next
// clock edge, so the contents are computed rather than stored.
module flash_model #(
  parameter int unsigned AW = 19
) (
  input  logic          clk,
  input  logic          re,
  input  logic [AW-1:0] addr,
  output logic [15:0]   rdata
);
  initial rdata = '0;
  always_ff @(posedge clk) if (re) rdata <= tb_util_pkg::flash_word(32'(addr));
endmodule
