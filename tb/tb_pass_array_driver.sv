// tb_pass_array_driver: self-checking test of the pass-array gate drive.
// For random codes (and the extremes 0 and 255) it checks one clock later that
// exactly the cells 0..code-1 conduct, that PMOS and NMOS gates of each cell
// are complementary, that nothing changes on an edge without `load`, and that
// the assist gates follow `droop_n` with no clock.
`timescale 1ns/1ps
module tb_pass_array_driver;
  localparam int unsigned NC = 255, NA = 32;

  logic clk = 1'b0, rst_n = 1'b0, droop_n = 1'b1, load = 1'b0;
  logic [7:0] code = '0;
  logic [NC-1:0] pmos_gate_n, nmos_gate;
  logic [NA-1:0] assist_gate_n;
  int checks = 0, failures = 0;

  always #10 clk = ~clk;

  pass_array_driver dut (
    .clk(clk), .rst_n(rst_n), .load(load), .code(code), .droop_n(droop_n),
    .pmos_gate_n(pmos_gate_n), .nmos_gate(nmos_gate), .assist_gate_n(assist_gate_n));

  task automatic check_code(input int c);
    int ones;
    bit ok;
    @(negedge clk);
    code = 8'(c);
    load = 1'b1;
    @(negedge clk);
    load = 1'b0;
    code = ~code;   // must not be taken without load
    @(negedge clk);
    ones = $countones(nmos_gate);
    ok = (ones == c) && (pmos_gate_n == ~nmos_gate);
    for (int i = 0; i < NC; i++) if (nmos_gate[i] != (i < c)) ok = 1'b0;
    checks++;
    if (!ok) begin
      failures++; $display("FAIL: code=%0d cells on=%0d", c, ones);
    end
  endtask

  initial begin
    #15;  // one clock edge inside reset
    checks++;
    if (nmos_gate != '0 || pmos_gate_n != '1) begin
      failures++; $display("FAIL: cells not off in reset");
    end
    rst_n = 1'b1;
    check_code(0);
    check_code(255);
    check_code(1);
    for (int i = 0; i < 300; i++) check_code($urandom_range(0, 255));
    // assist path: no clock edge between the change and the check
    @(posedge clk); #3;
    droop_n = 1'b0; #1;
    checks++;
    if (assist_gate_n != '0) begin failures++; $display("FAIL: assist not on"); end
    droop_n = 1'b1; #1;
    checks++;
    if (assist_gate_n != '1) begin failures++; $display("FAIL: assist not off"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
