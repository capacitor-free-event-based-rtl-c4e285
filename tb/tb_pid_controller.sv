// tb_pid_controller: self-checking test of the PID with a reference model.
// Random errors, error differences and parameter sets are applied; the model
// keeps its own integrator I = sum(Ki*e) and computes
//   MV = floor((Kp*e + I + Kd*de) / 16), clamped to 0..255,
// with the anti-windup rule (no integration while clamped in the direction of
// e). Long runs of same-sign errors drive the output into both clamps. The
// code must appear one clock after `valid_in` and hold between samples.
`timescale 1ns/1ps
module tb_pid_controller;
  import dldo_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  logic valid_in = 1'b0, valid_out, sat_hi, sat_lo;
  err_t e = '0; derr_t de = '0; pid_gains_t gains = '0;
  logic [7:0] code, code_next;
  int checks = 0, failures = 0, n_hi = 0, n_lo = 0, n_hold = 0;

  always #10 clk = ~clk;

  pid_controller dut (
    .clk(clk), .rst_n(rst_n), .valid_in(valid_in), .e(e), .de(de), .gains(gains),
    .code(code), .code_next(code_next), .valid_out(valid_out), .sat_hi(sat_hi), .sat_lo(sat_lo));

  longint m_i = 0;

  task automatic step(input int ev, input int dev, input int kp, input int ki, input int kd);
    longint icand, mv;
    int exp_code;
    bit hi, lo;
    @(negedge clk);
    e = err_t'(ev); de = derr_t'(dev);
    gains = '{kp: 8'(kp), ki: 8'(ki), kd: 8'(kd)};
    valid_in = 1'b1;
    icand = m_i + longint'(ki) * ev;
    if (icand > 32767) icand = 32767;
    if (icand < -32768) icand = -32768;
    mv = longint'(kp) * ev + icand + longint'(kd) * dev;
    mv = mv >>> 4;
    hi = (mv > 255); lo = (mv < 0);
    exp_code = hi ? 255 : lo ? 0 : int'(mv);
    if (!((hi && ev > 0) || (lo && ev < 0))) m_i = icand;
    else n_hold++;
    if (hi) n_hi++;
    if (lo) n_lo++;
    #1;
    checks++;
    if (int'(code_next) != exp_code) begin
      failures++; $display("FAIL: code_next=%0d exp=%0d", code_next, exp_code);
    end
    @(negedge clk);
    valid_in = 1'b0;
    checks++;
    if (!valid_out || int'(code) != exp_code || sat_hi != hi || sat_lo != lo) begin
      failures++;
      $display("FAIL: e=%0d de=%0d k=%0d/%0d/%0d code=%0d exp=%0d", ev, dev, kp, ki, kd, code, exp_code);
    end
    // hold between samples: change the inputs, code must not move
    e = err_t'($urandom_range(0, 40) - 20);
    @(negedge clk);
    checks++;
    if (int'(code) != exp_code || valid_out) begin
      failures++; $display("FAIL: code did not hold");
    end
  endtask

  initial begin
    int prev;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    // drive up into the upper clamp, then down into the lower one
    prev = 0;
    for (int i = 0; i < 80; i++) begin step(40, 40 - prev, 16, 8, 4); prev = 40; end
    for (int i = 0; i < 160; i++) begin step(-50, -50 - prev, 8, 8, 4); prev = -50; end
    // random traffic
    for (int i = 0; i < 500; i++) begin
      int ev;
      ev = $urandom_range(0, 120) - 60;
      step(ev, ev - prev, $urandom_range(0, 32), $urandom_range(0, 16), $urandom_range(0, 16));
      prev = ev;
    end
    checks++;
    if (n_hi == 0 || n_lo == 0 || n_hold == 0) begin
      failures++; $display("FAIL: clamps/anti-windup not exercised %0d %0d %0d", n_hi, n_lo, n_hold);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #200000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
