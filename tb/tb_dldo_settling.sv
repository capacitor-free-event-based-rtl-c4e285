// tb_dldo_settling: settling time of the closed loop for a load step, at the
// three oscillator frequencies 50, 100 and 200 MHz. Three independent loops
// (controller at its default parameters plus oscillator, ADC and plant models)
// run side by side from the same stimulus: VIN = 1.0 V, target 0.65 V (code
// 139 of a 1.2 V full scale) with a 0.60 .. 0.70 V dead zone, load 20 mA,
// then a step to 50 mA and back to 20 mA.
// For each step and loop it checks that the loop falls asleep with VOUT in the
// window, and measures the settling time from the step to the last time VOUT
// entered the window. It checks that VOUT did leave the window (so that the
// step really woke the loop) and that the loop at 200 MHz settles no later
// than the one at 50 MHz. It prints the settling times in ns and in ADC
// conversions, and the number of oscillator edges each loop needed.
`timescale 1ns/1ps
module tb_dldo_settling;

  localparam int  N = 3;
  localparam real PERIODS [N] = '{20.0, 10.0, 5.0};   // 50, 100, 200 MHz

  logic rst_n = 1'b1;   // falls at 1 ns so that the asynchronous reset sees an edge
  // The window is held wide open until reset has been applied (see the
  // harness: with VOUT at 0 V the event would otherwise be present at time 0).
  real  vin = 1.0, i_load = 20.0e-3, vrefh = 9.9, vrefl = -9.9;
  logic [7:0] vref_code = 8'd139;

  real     vout      [N];
  logic    asleep    [N];
  logic    event_o   [N];
  logic [7:0] pass_code [N];
  realtime t_enter   [N];
  int      clk_edges [N];

  for (genvar k = 0; k < N; k++) begin : g_loop
    dldo_loop_harness #(.PERIOD_NS(PERIODS[k])) loop (
      .rst_n(rst_n), .vin(vin), .i_load(i_load), .vrefh(vrefh), .vrefl(vrefl),
      .vref_code(vref_code), .vout(vout[k]), .asleep(asleep[k]),
      .event_o(event_o[k]), .pass_code(pass_code[k]), .t_enter(t_enter[k]),
      .clk_edges(clk_edges[k]));
  end

  int checks = 0, failures = 0;

  function automatic bit all_settled();
    for (int k = 0; k < N; k++)
      if (!asleep[k] || event_o[k]) return 1'b0;
    return 1'b1;
  endfunction

  // Wait until every loop is asleep, at most limit_ns.
  task automatic wait_all(input real limit_ns);
    realtime t0;
    t0 = $realtime;
    #100;
    while (!all_settled() && $realtime - t0 < limit_ns) #10;
  endtask

  task automatic step(input string what, input real new_load, output real ts_ns [N]);
    realtime t_step;
    int e0 [N];
    for (int k = 0; k < N; k++) e0[k] = clk_edges[k];
    t_step = $realtime;
    i_load = new_load;
    wait_all(30000.0);
    for (int k = 0; k < N; k++) begin
      checks++;
      if (!asleep[k] || vout[k] < vrefl || vout[k] > vrefh) begin
        failures++;
        $display("FAIL: %s at %0.0f MHz: asleep=%b vout=%0.4f", what,
                 1000.0 / PERIODS[k], asleep[k], vout[k]);
      end
      checks++;
      if (t_enter[k] <= t_step) begin
        failures++;
        $display("FAIL: %s at %0.0f MHz: VOUT never left the window", what,
                 1000.0 / PERIODS[k]);
      end
      ts_ns[k] = t_enter[k] - t_step;
      $display("%s at %3.0f MHz: settled in %5.0f ns (%4.1f conversions), %0d clock edges, vout=%0.4f, code=%0d",
               what, 1000.0 / PERIODS[k], ts_ns[k], ts_ns[k] / (10.0 * PERIODS[k]),
               clk_edges[k] - e0[k], vout[k], pass_code[k]);
    end
    checks++;
    if (ts_ns[N-1] > ts_ns[0]) begin
      failures++;
      $display("FAIL: %s: 200 MHz settled later than 50 MHz", what);
    end
  endtask

  initial begin
    real ts_up [N], ts_down [N];
    #1  rst_n = 1'b0;
    #24 rst_n = 1'b1;
    vrefh = 0.70;
    vrefl = 0.60;
    wait_all(30000.0);
    for (int k = 0; k < N; k++) begin
      checks++;
      if (!asleep[k]) begin
        failures++; $display("FAIL: start-up at %0.0f MHz did not settle", 1000.0 / PERIODS[k]);
      end
    end
    #2000;
    step("load 20 -> 50 mA", 50.0e-3, ts_up);
    #2000;
    step("load 50 -> 20 mA", 20.0e-3, ts_down);
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
