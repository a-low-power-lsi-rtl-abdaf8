// Testbench for mra: fills a 12x16 array through the write port in random
// order, then reads every column through two read ports at once and compares
// each row against a shadow copy; also checks that a write is visible on
// the next clock and leaves other entries alone.
module tb_mra;
  localparam int ROWS = 12, COLS = 16;
  logic clk = 0;
  always #5 clk = ~clk;
  logic wr_en = 0;
  logic [3:0] wr_row = 0, wr_col = 0;
  logic [15:0] wr_data = 0;
  logic [1:0][3:0] rd_col = 0;
  logic [1:0][ROWS-1:0][15:0] rd_data;
  logic [15:0] shadow [ROWS][COLS];
  int checks = 0, failures = 0;

  mra #(.ROWS(ROWS), .COLS(COLS), .DW(16), .NRD(2)) dut (.*);

  task automatic wr(input int r, input int c, input logic [15:0] d);
    @(negedge clk); wr_en = 1; wr_row = 4'(r); wr_col = 4'(c); wr_data = d;
    @(negedge clk); wr_en = 0;
    shadow[r][c] = d;
  endtask

  initial begin
    for (int r = 0; r < ROWS; r++) for (int c = 0; c < COLS; c++) wr(r, c, 16'($urandom));
    for (int k = 0; k < 100; k++) wr($urandom_range(ROWS - 1), $urandom_range(COLS - 1), 16'($urandom));
    for (int c = 0; c < COLS; c++) begin
      rd_col[0] = 4'(c); rd_col[1] = 4'(COLS - 1 - c); #1;
      for (int r = 0; r < ROWS; r++) begin
        checks += 2;
        if (rd_data[0][r] != shadow[r][c]) begin failures++; $display("FAIL port0 r%0d c%0d", r, c); end
        if (rd_data[1][r] != shadow[r][COLS - 1 - c]) begin failures++; $display("FAIL port1 r%0d c%0d", r, c); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (5000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
