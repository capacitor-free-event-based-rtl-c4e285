// tb_event_detector: self-checking test of the event-driven clock control,
// run with the oscillator model so that the clock really stops.
// Checks: the oscillator stops after exactly DWELL_CLKS+2 clocks inside the
// dead zone (two of them for the synchroniser); it stays stopped; an event
// raises `osc_en` with no clock edge; an event in the middle of the dwell
// restarts the count; the wake-up counter counts each wake-up; `event_sync`
// is the event two clock edges late.
`timescale 1ns/1ps
module tb_event_detector;
  localparam int unsigned DWELL = 32;

  logic rst_n = 1'b1, above_h = 1'b0, below_l = 1'b0;
  logic clk, osc_en, event_o, event_sync, asleep, sleep_entry;
  logic [15:0] wakeups;
  int checks = 0, failures = 0, edges = 0;

  ring_osc_model osc (.en(osc_en), .clk(clk));

  event_detector dut (   // default DWELL_CLKS = 32
    .clk(clk), .rst_n(rst_n), .above_h(above_h), .below_l(below_l),
    .event_o(event_o), .event_sync(event_sync), .osc_en(osc_en), .asleep(asleep), .sleep_entry(sleep_entry), .wakeups(wakeups));

  // sleep_entry must be high exactly on the edge that sets asleep
  int n_entry = 0;
  always @(posedge clk) begin
    edges++;
    if (sleep_entry) begin
      n_entry++;
      #1;
      checks++;
      if (!asleep) begin failures++; $display("FAIL: sleep_entry without sleep"); end
    end
  end

  // event_sync is the event as sampled two clock edges earlier
  logic h0 = 1'b1, h1 = 1'b1;
  always @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      h0 = 1'b1; h1 = 1'b1;
    end else begin
      h1 = h0; h0 = event_o;
    end
  end
  always @(negedge clk) if (rst_n) begin
    checks++;
    if (event_sync != h1) begin failures++; $display("FAIL: event_sync %b at %0t", event_sync, $time); end
  end

  task automatic expect_eq(input string what, input int got, input int exp);
    checks++;
    if (got != exp) begin
      failures++; $display("FAIL: %s = %0d, expected %0d", what, got, exp);
    end
  endtask

  // Count clock edges from now until the oscillator stops.
  task automatic edges_to_sleep(output int n);
    int e0;
    e0 = edges;
    wait (asleep);
    n = edges - e0;
  endtask

  initial begin
    int n, e0;
    #1  rst_n = 1'b0;     // the asynchronous reset needs an edge
    #24 rst_n = 1'b1;     // the oscillator is already running (osc_en = 1)
    edges_to_sleep(n);
    expect_eq("clocks to sleep after reset", n, DWELL + 2);
    expect_eq("osc_en while asleep", int'(osc_en), 0);
    e0 = edges;
    #1000;
    expect_eq("clock edges while asleep", edges - e0, 0);

    // VOUT drops below VREFL: wake-up with no clock
    below_l = 1'b1;
    #0.1;
    expect_eq("osc_en right after event", int'(osc_en), 1);
    expect_eq("event_o", int'(event_o), 1);
    #400;
    expect_eq("asleep while event held", int'(asleep), 0);
    below_l = 1'b0;
    edges_to_sleep(n);
    expect_eq("clocks to sleep after event", n, DWELL + 2);
    expect_eq("wakeups after first", int'(wakeups), 1);   // counted on first clock

    // second wake-up (VOUT above VREFH), with a short glitch during the dwell
    #333 above_h = 1'b1;
    #0.1;
    expect_eq("osc_en on above_h", int'(osc_en), 1);
    #60 above_h = 1'b0;
    e0 = edges;
    wait (edges == e0 + 10);
    #3 above_h = 1'b1;
    #5 above_h = 1'b0;
    edges_to_sleep(n);
    // the glitch clears the count asynchronously: a full DWELL follows it
    // (without it only DWELL+2-10 clocks would remain)
    expect_eq("clocks to sleep after glitch", n, DWELL);
    expect_eq("wakeups", int'(wakeups), 2);
    expect_eq("sleep entries", n_entry, 3);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #20000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
