// tb_dynamic_gain_ctrl: self-checking test of error computation and gain
// scheduling. Random ADC codes (near and far from the target, moving towards
// and away from it) are applied with `valid_in`; e, de and the selected
// parameter set (combinational) are compared with a reference model before the
// clock edge, and the registered state after it. Between samples the
// difference must be taken against the last sampled error. Every one of the
// four states must be reached.
`timescale 1ns/1ps
module tb_dynamic_gain_ctrl;
  import dldo_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  logic valid_in = 1'b0;
  logic [7:0] adc_data = '0, vref_code = 8'd149;
  err_t e; derr_t de; gain_state_e last_state; pid_gains_t gains;
  int checks = 0, failures = 0;
  int state_hits [4] = '{0, 0, 0, 0};

  always #10 clk = ~clk;

  dynamic_gain_ctrl dut (
    .clk(clk), .rst_n(rst_n), .valid_in(valid_in), .adc_data(adc_data),
    .vref_code(vref_code), .e(e), .de(de), .gains(gains),
    .last_state(last_state));

  int ref_eprev = 0;

  task automatic apply(input int code, input int ref_code);
    int exp_e, exp_de, exp_s;
    bit lg, dv;
    @(negedge clk);
    adc_data  = 8'(code);
    vref_code = 8'(ref_code);
    valid_in  = 1'b1;
    exp_e  = ref_code - code;
    exp_de = exp_e - ref_eprev;
    lg = (exp_e >= 16) || (exp_e <= -16);
    dv = (exp_e > 0 && exp_de > 0) || (exp_e < 0 && exp_de < 0);
    exp_s = (lg ? 2 : 0) + (dv ? 1 : 0);
    ref_eprev = exp_e;
    #1;
    checks++;
    if (int'(e) != exp_e || int'(de) != exp_de || gains != DEFAULT_GAINS[exp_s]) begin
      failures++;
      $display("FAIL: code=%0d ref=%0d e=%0d/%0d de=%0d/%0d", code, ref_code, e, exp_e, de, exp_de);
    end
    @(negedge clk);
    valid_in = 1'b0;
    checks++;
    if (int'(last_state) != exp_s) begin
      failures++; $display("FAIL: state=%0d expected %0d", last_state, exp_s);
    end
    state_hits[exp_s]++;
    // no sample on this edge: e_prev and the state must hold
    adc_data = 8'(code + 1);
    #1;
    checks++;
    if (int'(de) != (exp_e - 1) - exp_e) begin
      failures++; $display("FAIL: e_prev changed without valid_in");
    end
    @(negedge clk);
    checks++;
    if (int'(last_state) != exp_s) begin
      failures++; $display("FAIL: state changed without valid_in");
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    // a run towards the target from far below, then past it, then away
    for (int c = 60; c < 240; c += 9) apply(c, 149);
    for (int i = 0; i < 300; i++) begin
      int r, c;
      r = $urandom_range(40, 220);
      c = r + $urandom_range(0, 60) - 30;
      apply(c, r);
    end
    for (int s = 0; s < 4; s++) begin
      checks++;
      if (state_hits[s] == 0) begin
        failures++; $display("FAIL: state %0d never reached", s);
      end
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
