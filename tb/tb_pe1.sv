// Testbench for pe1: streams frames of P = 16 random elements back to back
// (and some with gaps), including values that saturate the 13-bit adder, the
// 16-bit multipliers and the 18-bit accumulator, and compares each finished
// log b value with a behavioural model of equation (1). Checks that the result
// appears 4 clocks after the frame's last element.
module tb_pe1;
  localparam int P = 16;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic in_valid = 0, in_first = 0, in_last = 0;
  logic signed [15:0] o = 0, u = 0, s = 0, w = 0;
  logic logb_valid;
  logic signed [17:0] logb;
  int checks = 0, failures = 0, n_sat = 0;

  pe1 dut (.*);

  function automatic longint sat(longint v, int wd);
    longint hi = (longint'(1) << (wd - 1)) - 1, lo = -(longint'(1) << (wd - 1));
    return v > hi ? hi : (v < lo ? lo : v);
  endfunction

  longint expq [$];
  int     last_cycle [$];
  int     cyc = 0;
  always @(posedge clk) cyc++;

  always @(negedge clk) if (rst_n && logb_valid) begin
    checks += 2;
    if (expq.size() == 0) begin failures++; $display("FAIL unexpected result"); end
    else begin
      longint e;
      int lc;
      e  = expq.pop_front();
      lc = last_cycle.pop_front();
      if (longint'(logb) != e) begin failures++; $display("FAIL logb %0d expected %0d", logb, e); end
      if (cyc - lc != 4) begin failures++; $display("FAIL latency %0d", cyc - lc); end
    end
  end

  task automatic frame(input int mode, input bit gaps);
    longint acc, x;
    logic signed [15:0] ov [P], uv [P], sv [P];
    w = 16'($signed($urandom_range(4000)) - 2000);
    acc = w;
    for (int p = 0; p < P; p++) begin
      case (mode)
        0: begin ov[p] = 16'($signed($urandom_range(1000)) - 500); uv[p] = 16'($signed($urandom_range(1000)) - 500); sv[p] = 16'($urandom_range(300)); end
        1: begin ov[p] = 16'($urandom); uv[p] = 16'($urandom); sv[p] = 16'($urandom); end  // saturating
        default: begin ov[p] = 16'sh7fff; uv[p] = 16'sh7fff; sv[p] = 16'sh7fff; end   // accumulator clips
      endcase
      x = sat(longint'(ov[p]) + uv[p], 13);
      if (x != longint'(ov[p]) + uv[p]) n_sat++;
      x = sat((x * x) >>> 8, 16);
      x = sat((x * sv[p]) >>> 8, 16);
      acc = sat(acc + x, 18);
    end
    expq.push_back(acc);
    for (int p = 0; p < P; p++) begin
      if (gaps && $urandom_range(2) == 0) begin in_valid = 0; @(negedge clk); end
      in_valid = 1; in_first = (p == 0); in_last = (p == P - 1);
      o = ov[p]; u = uv[p]; s = sv[p];
      if (p == P - 1) last_cycle.push_back(cyc);
      @(negedge clk);
    end
    in_valid = 0;
  endtask

  initial begin
    repeat (2) @(negedge clk); rst_n = 1; @(negedge clk);
    for (int f = 0; f < 20; f++) frame(f % 5 == 3 ? 1 : 0, f >= 10);
    frame(2, 0);
    repeat (8) @(negedge clk);
    checks++;
    if (expq.size() != 0) begin failures++; $display("FAIL %0d results missing", expq.size()); end
    checks++;
    if (n_sat == 0) begin failures++; $display("FAIL no saturation exercised"); end
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
