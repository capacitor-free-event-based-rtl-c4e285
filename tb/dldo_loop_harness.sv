// dldo_loop_harness: one closed regulation loop for simulation only. It wraps
// the controller `dldo_ctrl` (at its default parameters) with the models of the
// enable-controlled oscillator, the ADC front end and the analog plant (pass
// array, output node, load, window comparators, droop detector), so that a
// testbench can run several loops side by side, each from its own oscillator.
// PERIOD_NS sets the oscillator period; everything else follows the default
// models (1 mS per cell, 200 pF, 1.2 V ADC full scale).
// Inputs are the operating point (reset, VIN, load current, window thresholds,
// target code); outputs are VOUT and the loop's state for the testbench to
// check. `t_enter` is the last time VOUT entered the window, which gives the
// settling time of a step; `clk_edges` counts oscillator edges.
`timescale 1ns/1ps
module dldo_loop_harness #(
  parameter real PERIOD_NS = 20.0
) (
  input  logic       rst_n,
  input  real        vin,
  input  real        i_load,
  input  real        vrefh,
  input  real        vrefl,
  input  logic [7:0] vref_code,
  output real        vout,
  output logic       asleep,
  output logic       event_o,
  output logic [7:0] pass_code,
  output realtime    t_enter,
  output int         clk_edges
);
  import dldo_pkg::*;

  logic osc_clk, osc_en;
  logic above_h, below_l, droop_n;
  logic adc_sample, adc_cmp, adc_valid, pass_code_valid, sample_in_zone, sat_hi, sat_lo;
  logic [2:0] flash_therm;
  logic [7:0] dac_code, adc_data;
  logic [254:0] pmos_gate_n, nmos_gate;
  logic [31:0] assist_gate_n;
  gain_state_e gain_state;
  logic [15:0] wakeups;
  real vheld;
  int cells_on;

  ring_osc_model #(.PERIOD_NS(PERIOD_NS)) osc (.en(osc_en), .clk(osc_clk));

  dldo_ctrl dut (
    .osc_clk(osc_clk), .rst_n(rst_n), .vref_code(vref_code),
    .above_h(above_h), .below_l(below_l), .osc_en(osc_en), .event_o(event_o),
    .asleep(asleep), .adc_sample(adc_sample), .adc_flash_therm(flash_therm),
    .adc_dac_code(dac_code), .adc_cmp(adc_cmp), .droop_n(droop_n),
    .pmos_gate_n(pmos_gate_n), .nmos_gate(nmos_gate), .assist_gate_n(assist_gate_n),
    .adc_data(adc_data), .adc_valid(adc_valid), .pass_code(pass_code),
    .pass_code_valid(pass_code_valid), .sample_in_zone(sample_in_zone), .gain_state(gain_state),
    .pid_sat_hi(sat_hi), .pid_sat_lo(sat_lo), .wakeups(wakeups));

  adc_frontend_model #(.BITS(8), .FLASH_BITS(2), .FS(1.2)) afe (
    .vin(vout), .sample(adc_sample), .dac_code(dac_code),
    .flash_therm(flash_therm), .cmp(adc_cmp), .vheld(vheld));

  dldo_plant_model plant (
    .vin(vin), .i_load(i_load), .vrefh(vrefh), .vrefl(vrefl),
    .pmos_gate_n(pmos_gate_n), .nmos_gate(nmos_gate),
    .assist_gate_n(assist_gate_n), .vout(vout), .above_h(above_h),
    .below_l(below_l), .droop_n(droop_n), .cells_on(cells_on));

  initial begin
    t_enter   = 0;
    clk_edges = 0;
  end
  always @(negedge event_o) t_enter = $realtime;
  always @(posedge osc_clk) clk_edges++;

endmodule
