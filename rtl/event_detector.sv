// event_detector: event-driven clock control of the DLDO feedback loop.
//
// Two window comparators report VOUT above VREFH (`above_h`) and below VREFL
// (`below_l`). Outside that dead zone an event is present, and `event_o`
// follows the comparators without a clock. The event clears the `asleep` state
// asynchronously, so `osc_en` rises and the oscillator starts even though no
// clock is running: the loop wakes itself. While the loop runs, a counter
// counts clocks during which the (synchronised) comparators show VOUT inside
// the dead zone; any sample outside clears it. After DWELL_CLKS consecutive
// clocks inside, `asleep` is set and `osc_en` falls, which stops the oscillator
// and with it the ADC, the gain control and the PID; the pass-array code is
// held. Waking again needs only the event, not a clock.
//
// Timing: `osc_en` rises in the same instant as the event (combinational path
// through the asynchronous clear). It falls on the clock edge that completes
// DWELL_CLKS in-window clocks, counted after the two-flop synchroniser.
// `sleep_entry` is high during the clock whose closing edge sets `asleep`, so
// other blocks can reset their sequencing on that edge. `event_sync` is the
// event as seen through the synchroniser (two clocks late), for clocked logic
// that must know whether VOUT is in the dead zone. `wakeups` counts
// sleep-to-run transitions for observation.
//
// Stopping the oscillator in the dead zone and waking on an event follow the
// design. The synchroniser, the DWELL_CLKS default (3.2 conversion periods at
// 10 clocks each) and the wake-up counter are this design's own choices.
module event_detector #(
  parameter int unsigned DWELL_CLKS = 32,
  parameter int unsigned CNT_W      = 16
) (
  input  logic             clk,       // oscillator clock, stops while asleep
  input  logic             rst_n,
  input  logic             above_h,   // VOUT > VREFH
  input  logic             below_l,   // VOUT < VREFL
  output logic             event_o,   // VOUT outside the dead zone
  output logic             event_sync, // event_o after the two-flop synchroniser
  output logic             osc_en,    // oscillator enable
  output logic             asleep,
  output logic             sleep_entry, // high on the last clock edge before sleep
  output logic [CNT_W-1:0] wakeups
);

  localparam int unsigned DW = $clog2(DWELL_CLKS + 1);

  logic          wake_rst_n;
  logic [1:0]    ev_sync;
  logic [DW-1:0] dwell;

  assign event_o    = above_h | below_l;
  // Asynchronous clear of the sleep state and dwell count on any event.
  assign wake_rst_n = rst_n & ~event_o;
  assign osc_en     = ~asleep;
  assign event_sync = ev_sync[1];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) ev_sync <= 2'b11;
    else        ev_sync <= {ev_sync[0], event_o};
  end

  always_ff @(posedge clk or negedge wake_rst_n) begin
    if (!wake_rst_n) begin
      dwell  <= '0;
      asleep <= 1'b0;
    end else if (ev_sync[1]) begin
      dwell  <= '0;
    end else if (dwell == DW'(DWELL_CLKS - 1)) begin
      dwell  <= '0;
      asleep <= 1'b1;
    end else if (!asleep) begin
      dwell  <= dwell + 1'b1;
    end
  end

  // Count wake-ups. The clock stops right after the edge that sets `asleep`,
  // so the flag `slept` is set on that same edge and the wake-up is counted on
  // the first clock after the oscillator restarts.
  logic going_to_sleep, slept;
  assign sleep_entry    = going_to_sleep;
  assign going_to_sleep = !asleep && !ev_sync[1] && (dwell == DW'(DWELL_CLKS - 1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      slept   <= 1'b0;
      wakeups <= '0;
    end else if (going_to_sleep) begin
      slept   <= 1'b1;
    end else if (slept && !asleep) begin
      slept   <= 1'b0;
      wakeups <= wakeups + 1'b1;
    end
  end

endmodule
