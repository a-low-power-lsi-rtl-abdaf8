// Behavioural model of the external SRAM (16-bit words): writes on the clock
// edge when we is high; a read (re) returns the addressed word on rdata after
// the next clock edge. Contents start at zero.
module sram_model #(
  parameter int unsigned AW = 11
) (
  input  logic          clk,
  input  logic          we,
  input  logic          re,
  input  logic [AW-1:0] addr,
  input  logic [15:0]   wdata,
  output logic [15:0]   rdata
);
  logic [15:0] mem [2**AW];
  initial for (int i = 0; i < 2**AW; i++) mem[i] = '0;
  always_ff @(posedge clk) begin
    if (we) mem[addr] <= wdata;
    if (re) rdata <= mem[addr];
  end
endmodule
