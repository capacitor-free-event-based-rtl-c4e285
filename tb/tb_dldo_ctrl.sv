// tb_dldo_ctrl: closed-loop test of the whole regulator controller at its
// default parameters. The controller is wrapped with models of the oscillator,
// the ADC front end and the analog plant (pass array, output node, load,
// window comparators, droop detector). VREF = 0.70 V (code 149 of a 1.2 V
// full scale), dead zone 0.65..0.75 V.
// Sequence: start-up from 0 V at VIN = 1.0 V and 20 mA; load step 20 -> 50 mA;
// load step 50 -> 20 mA; line steps VIN 1.0 -> 0.8 -> 1.0 V; an overload of
// 90 mA (above what 255 cells carry) and back to 20 mA; a slow load ramp
// 20 -> 35 mA. After each, VOUT must be
// inside the dead zone when the loop falls asleep, within a time limit.
// Checked throughout: ADC results agree with the held VOUT; the conducting
// cells equal the PID code after each update; no clock edge and no
// code change while asleep; valid results every 10 clocks while awake.
// Mechanisms counted (each must occur): wake-up by event, sleep in the dead
// zone, a dead-zone sample that leaves the code alone, droop assist, every
// gain state, PID clamp at the top.
`timescale 1ns/1ps
module tb_dldo_ctrl;
  import dldo_pkg::*;

  localparam real FS = 1.2;
  localparam real LSB = FS / 256.0;

  logic rst_n = 1'b1;   // falls at 1 ns so that the asynchronous reset sees an edge
  // The comparator window is held wide open until reset has been applied: with
  // VOUT at 0 V the wake-up event would otherwise be active from time 0, and a
  // two-state simulator would never see the falling edge of the flops'
  // asynchronous clear.
  real  vrefh = 9.9, vrefl = -9.9;
  logic osc_clk, osc_en, event_o, asleep;
  logic above_h, below_l, droop_n;
  logic adc_sample, adc_cmp, adc_valid, pass_code_valid, sample_in_zone, sat_hi, sat_lo;
  logic [2:0] flash_therm;
  logic [7:0] dac_code, adc_data, pass_code;
  logic [7:0] vref_code = 8'd149;
  logic [254:0] pmos_gate_n, nmos_gate;
  logic [31:0] assist_gate_n;
  gain_state_e gain_state;
  logic [15:0] wakeups;
  real vin = 1.0, i_load = 20.0e-3, vout, vheld;
  int cells_on;

  int checks = 0, failures = 0;
  int n_sleep = 0, n_droop = 0, n_sat_hi = 0;
  int state_hits [4] = '{0, 0, 0, 0};

  ring_osc_model osc (.en(osc_en), .clk(osc_clk));

  dldo_ctrl dut (
    .osc_clk(osc_clk), .rst_n(rst_n), .vref_code(vref_code),
    .above_h(above_h), .below_l(below_l), .osc_en(osc_en), .event_o(event_o),
    .asleep(asleep), .adc_sample(adc_sample), .adc_flash_therm(flash_therm),
    .adc_dac_code(dac_code), .adc_cmp(adc_cmp), .droop_n(droop_n),
    .pmos_gate_n(pmos_gate_n), .nmos_gate(nmos_gate), .assist_gate_n(assist_gate_n),
    .adc_data(adc_data), .adc_valid(adc_valid), .pass_code(pass_code),
    .pass_code_valid(pass_code_valid), .sample_in_zone(sample_in_zone), .gain_state(gain_state),
    .pid_sat_hi(sat_hi), .pid_sat_lo(sat_lo), .wakeups(wakeups));

  adc_frontend_model #(.BITS(8), .FLASH_BITS(2), .FS(FS)) afe (
    .vin(vout), .sample(adc_sample), .dac_code(dac_code),
    .flash_therm(flash_therm), .cmp(adc_cmp), .vheld(vheld));

  dldo_plant_model plant (
    .vin(vin), .i_load(i_load), .vrefh(vrefh), .vrefl(vrefl), .pmos_gate_n(pmos_gate_n), .nmos_gate(nmos_gate),
    .assist_gate_n(assist_gate_n), .vout(vout), .above_h(above_h),
    .below_l(below_l), .droop_n(droop_n), .cells_on(cells_on));

  // ---- continuous checks -------------------------------------------------
  int exp_adc_q[$];
  always @(negedge adc_sample) if (rst_n) begin
    int c;
    c = (vout <= 0.0) ? 0 : int'($floor(vout / LSB));
    exp_adc_q.push_back(c > 255 ? 255 : c);
  end

  int last_valid_t = -1, clk_count = 0, n_zone = 0;
  bit zone_prev = 1'b0;
  always @(posedge osc_clk) begin
    clk_count++;
    if (asleep) begin
      failures++; $display("FAIL: clock edge while asleep at %0t", $time);
    end
    if (adc_valid && rst_n) begin
      checks++;
      if (exp_adc_q.size() == 0 || int'(adc_data) != exp_adc_q.pop_front()) begin
        failures++; $display("FAIL: ADC result %0d at %0t", adc_data, $time);
      end
      if (last_valid_t >= 0 && clk_count - last_valid_t != 10) begin
        failures++; $display("FAIL: ADC spacing %0d", clk_count - last_valid_t);
      end
      last_valid_t = clk_count;
    end
    // a result taken inside the dead zone must not update the code
    if (zone_prev && pass_code_valid) begin
      failures++; $display("FAIL: code updated from a dead-zone sample at %0t", $time);
    end
    zone_prev = sample_in_zone;
    if (sample_in_zone) n_zone++;
    if (pass_code_valid) begin
      // code and gate lines were both updated on the previous edge
      checks++;
      if (cells_on != int'(pass_code)) begin
        failures++; $display("FAIL: cells_on=%0d code=%0d", cells_on, pass_code);
      end
      state_hits[int'(gain_state)]++;
      if (sat_hi) n_sat_hi++;
    end
  end

  // a new conversion sequence starts after each wake-up
  always @(posedge asleep) begin
    n_sleep++;
    last_valid_t = -1;
    exp_adc_q.delete();
  end

  always @(negedge droop_n) n_droop++;

  // armed by the first sleep entry after reset
  logic [7:0] code_at_sleep;
  bit         sleep_seen = 1'b0;
  always @(posedge asleep) if (rst_n) begin
    code_at_sleep = pass_code;
    sleep_seen    = 1'b1;
  end
  always @(pass_code) if (sleep_seen && asleep && rst_n && pass_code != code_at_sleep) begin
    failures++; $display("FAIL: code changed while asleep");
  end

  // ---- sequence ----------------------------------------------------------
  task automatic settle(input string what, input real limit_ns);
    realtime t0;
    t0 = $realtime;
    #50;
    fork
      wait (asleep && !event_o);
      #(limit_ns);
    join_any
    disable fork;
    checks++;
    if (!asleep) begin
      failures++;
      $display("FAIL: %s: not settled in %0.0f ns (vout=%0.3f code=%0d)", what, limit_ns, vout, pass_code);
    end else begin
      $display("%s: asleep after %0.0f ns, vout=%0.4f V, code=%0d, cells=%0d",
               what, $realtime - t0, vout, pass_code, cells_on);
      checks++;
      if (vout < 0.65 || vout > 0.75) begin
        failures++; $display("FAIL: %s: vout %0.3f outside dead zone", what, vout);
      end
    end
    #2000;   // stay asleep: the code must hold and VOUT stay put
    checks++;
    if (!asleep || vout < 0.65 || vout > 0.75) begin
      failures++; $display("FAIL: %s: did not stay settled", what);
    end
  endtask

  initial begin
    int w0;
    #1  rst_n = 1'b0;
    #24 rst_n = 1'b1;
    vrefh = 0.75;
    vrefl = 0.65;
    settle("start-up 0 -> 0.70 V", 20000.0);
    w0 = int'(wakeups);
    i_load = 50.0e-3;
    settle("load 20 -> 50 mA", 20000.0);
    i_load = 20.0e-3;
    settle("load 50 -> 20 mA", 20000.0);
    vin = 0.8;
    settle("line 1.0 -> 0.8 V", 20000.0);
    // overload: 90 mA cannot be carried at VIN = 0.8 V; the PID must clamp at
    // full scale without winding up, and recover once the load returns
    vin = 1.0;
    settle("line 0.8 -> 1.0 V", 20000.0);
    i_load = 90.0e-3;
    #4000;
    checks++;
    if (pass_code != 8'd255 || asleep) begin
      failures++; $display("FAIL: overload: code=%0d asleep=%b", pass_code, asleep);
    end
    i_load = 20.0e-3;
    settle("overload 90 -> 20 mA", 20000.0);
    // slow load ramp: VOUT drifts out of the window with a small, growing error
    for (int k = 0; k < 100; k++) begin
      #40;
      i_load += 0.15e-3;
    end
    settle("load ramp 20 -> 35 mA in 4 us", 20000.0);
    // mechanisms
    checks++;
    if (int'(wakeups) - w0 < 3) begin failures++; $display("FAIL: wake-ups %0d", int'(wakeups) - w0); end
    checks++;
    if (n_sleep < 4) begin failures++; $display("FAIL: sleeps %0d", n_sleep); end
    checks++;
    if (n_droop == 0) begin failures++; $display("FAIL: droop assist never fired"); end
    checks++;
    if (n_zone == 0) begin failures++; $display("FAIL: no dead-zone sample was ever held"); end
    checks++;
    if (n_sat_hi == 0) begin failures++; $display("FAIL: PID never clamped"); end
    for (int s = 0; s < 4; s++) begin
      checks++;
      if (state_hits[s] == 0) begin failures++; $display("FAIL: gain state %0d never used", s); end
    end
    $display("mechanisms: wakeups=%0d sleeps=%0d droop=%0d dead-zone holds=%0d sat_hi=%0d states=%0d/%0d/%0d/%0d",
             wakeups, n_sleep, n_droop, n_zone, n_sat_hi, state_hits[0], state_hits[1], state_hits[2], state_hits[3]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #120000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
