// tb_dldo_workloads: the regulator's operating sweep in closed loop, at the
// controller's default parameters. For the three reference voltages 0.55,
// 0.65 and 0.75 V (dead zone +/-50 mV around each), input voltages 0.6, 0.8
// and 1.0 V, and load currents 5, 20 and 50 mA, it moves the operating point,
// waits for the loop to fall asleep and records VOUT.
// Points the pass array can reach (VIN - I/(255 cells) above the lower window
// edge) must end asleep inside the window. At points that even the assist
// cells cannot reach, the PID must sit at full scale with the loop awake.
// Points in between are run but not checked. From the settled voltages it prints the load
// regulation (5 -> 50 mA at VIN = 1.0 V) and the line regulation
// (0.8 -> 1.0 V at 20 mA) for each reference, and the fraction of time the
// oscillator ran. These figures depend on the plant model and the dead-zone
// width and are printed for information only.
`timescale 1ns/1ps
module tb_dldo_workloads;
  import dldo_pkg::*;

  localparam real FS = 1.2;
  localparam real LSB = FS / 256.0;
  localparam real G_CELL = 1.0e-3;
  localparam real HALF_WIN = 0.05;

  logic rst_n = 1'b1;   // falls at 1 ns so that the asynchronous reset sees an edge
  // The comparator window is held wide open until reset has been applied: with
  // VOUT at 0 V the wake-up event would otherwise be active from time 0, and a
  // two-state simulator would never see the falling edge of the flops'
  // asynchronous clear.
  logic osc_clk, osc_en, event_o, asleep;
  logic above_h, below_l, droop_n;
  logic adc_sample, adc_cmp, adc_valid, pass_code_valid, sample_in_zone, sat_hi, sat_lo;
  logic [2:0] flash_therm;
  logic [7:0] dac_code, adc_data, pass_code;
  logic [7:0] vref_code = 8'd0;
  logic [254:0] pmos_gate_n, nmos_gate;
  logic [31:0] assist_gate_n;
  gain_state_e gain_state;
  logic [15:0] wakeups;
  real vin = 1.0, i_load = 5.0e-3, vout, vheld, vrefh = 9.9, vrefl = -9.9;
  int cells_on;
  int checks = 0, failures = 0;

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

  dldo_plant_model #(.G_CELL(G_CELL)) plant (
    .vin(vin), .i_load(i_load), .vrefh(vrefh), .vrefl(vrefl),
    .pmos_gate_n(pmos_gate_n), .nmos_gate(nmos_gate),
    .assist_gate_n(assist_gate_n), .vout(vout), .above_h(above_h),
    .below_l(below_l), .droop_n(droop_n), .cells_on(cells_on));

  int clk_edges = 0;
  always @(posedge osc_clk) clk_edges++;

  const real VREFS [3] = '{0.55, 0.65, 0.75};
  const real VINS  [3] = '{0.6, 0.8, 1.0};
  const real LOADS [3] = '{5.0e-3, 20.0e-3, 50.0e-3};
  real vres [3][3][3];
  bit  ok   [3][3][3];
  int  n_fit = 0, n_nofit = 0;

  task automatic run_point(input int r, input int v, input int l);
    real vmax, vmax_assist;
    realtime t0;
    vin    = VINS[v];
    i_load = LOADS[l];
    vmax   = VINS[v] - LOADS[l] / (255.0 * G_CELL);
    vmax_assist = VINS[v] - LOADS[l] / (287.0 * G_CELL);   // with the assist cells
    t0 = $realtime;
    #50;
    if (vmax > vrefl + 0.01) begin
      fork
        wait (asleep && !event_o);
        #30000;
      join_any
      disable fork;
      checks++;
      if (!asleep || vout < vrefl || vout > vrefh) begin
        failures++;
        $display("FAIL: vref=%0.2f vin=%0.1f load=%0.0f mA: vout=%0.4f asleep=%b code=%0d",
                 VREFS[r], VINS[v], LOADS[l] * 1e3, vout, asleep, pass_code);
      end
      vres[r][v][l] = vout;
      ok[r][v][l]   = 1'b1;
      n_fit++;
      $display("vref=%0.2f vin=%0.1f load=%2.0f mA: asleep after %5.0f ns, vout=%0.4f, code=%0d",
               VREFS[r], VINS[v], LOADS[l] * 1e3, $realtime - t0, vout, pass_code);
    end else if (vmax_assist > vrefl - 0.01) begin
      // marginal: only the droop assist cells could reach the window
      #10000;
      ok[r][v][l] = 1'b0;
      $display("vref=%0.2f vin=%0.1f load=%2.0f mA: marginal (max %0.3f V), not checked",
               VREFS[r], VINS[v], LOADS[l] * 1e3, vmax);
    end else begin
      #10000;
      checks++;
      if (pass_code != 8'd255 || asleep) begin
        failures++;
        $display("FAIL: vref=%0.2f vin=%0.1f load=%0.0f mA out of reach: code=%0d asleep=%b",
                 VREFS[r], VINS[v], LOADS[l] * 1e3, pass_code, asleep);
      end
      ok[r][v][l] = 1'b0;
      n_nofit++;
      $display("vref=%0.2f vin=%0.1f load=%2.0f mA: out of reach (max %0.3f V), code held at %0d",
               VREFS[r], VINS[v], LOADS[l] * 1e3, vmax, pass_code);
    end
    #1000;
  endtask

  initial begin
    #1  rst_n = 1'b0;
    #24 rst_n = 1'b1;
    for (int r = 0; r < 3; r++) begin
      vref_code = 8'($rtoi(VREFS[r] / LSB + 0.5));
      vrefh = VREFS[r] + HALF_WIN;
      vrefl = VREFS[r] - HALF_WIN;
      for (int v = 0; v < 3; v++)
        for (int l = 0; l < 3; l++)
          run_point(r, v, l);
    end
    for (int r = 0; r < 3; r++) begin
      if (ok[r][2][0] && ok[r][2][2])
        $display("vref=%0.2f: load regulation %0.3f mV/mA (5 -> 50 mA, VIN 1.0 V)",
                 VREFS[r], (vres[r][2][0] - vres[r][2][2]) * 1e3 / 45.0);
      if (ok[r][1][1] && ok[r][2][1])
        $display("vref=%0.2f: line regulation %0.3f V/V (0.8 -> 1.0 V, 20 mA)",
                 VREFS[r], (vres[r][2][1] - vres[r][1][1]) / 0.2);
    end
    $display("oscillator ran %0.1f %% of the time", 100.0 * real'(clk_edges) * 20.0 / $realtime);
    checks++;
    if (n_fit < 12 || n_nofit == 0) begin
      failures++; $display("FAIL: sweep covered %0d reachable and %0d unreachable points", n_fit, n_nofit);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #2000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
