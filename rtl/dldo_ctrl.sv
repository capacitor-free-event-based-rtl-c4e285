// dldo_ctrl: digital controller of the event-driven, capacitor-free DLDO.
//
// The loop is: VOUT -> Flash-SAR ADC -> dynamic gain control (error, error
// difference, PID parameter set) -> PID -> pass-array gate drive -> VOUT.
// Everything that is clocked runs on `osc_clk`, the output of the on-chip
// oscillator, and the oscillator runs only while `osc_en` is high. The event
// detector raises `osc_en` without a clock as soon as the window comparators
// see VOUT outside the VREFL..VREFH dead zone, and drops it after VOUT has stayed
// inside for DWELL_CLKS clocks. An ADC result taken while VOUT is in the dead
// zone is a no-event sample: the PID and the gate lines keep their values, so
// the code freezes as soon as VOUT is inside the window and cannot walk out of
// it again while the dwell runs. While the oscillator is stopped no logic
// toggles, the last pass-array code is held, and the regulation loop cannot
// limit-cycle. A droop detector outside this module drives `droop_n` low on a
// fast VOUT drop, which turns on assist cells with no clock involved.
//
// Analog parts sit outside and connect through the ports: the oscillator
// (`osc_en` / `osc_clk`), the window comparators (`above_h`, `below_l`), the
// ADC's sample-and-hold, capacitive DAC and comparators (`adc_*`), the droop
// detector (`droop_n`) and the pass transistors (`*_gate*`).
//
// Timing at the defaults: one ADC result every 10 clocks (200 ns at 50 MHz),
// the first one 10 clocks after a wake-up, because the ADC is sent back to its
// sample phase on the edge that stops the clock. The error, the gain set and
// the new PID output are combinational from the result; the PID code and the
// gate lines are registered together on the edge that ends the ADC's `valid`
// clock, if the synchronised event is present on that clock. The pass array therefore changes 1 clock after the result, and VOUT
// has 2 clocks to settle before the sample-and-hold takes the next sample.
//
// The block structure, and the dead zone as a range in which no correction is
// made, follow the design. Gating the PID update with the synchronised event
// (rather than with a digital compare of the ADC result), the clock-domain
// arrangement (one clock for all blocks, asynchronous reset only, because the
// clock may be stopped) are this design's own choices.
module dldo_ctrl
  import dldo_pkg::*;
#(
  parameter int unsigned DWELL_CLKS             = 32,
  parameter int unsigned E_LARGE                = 16,
  parameter pid_gains_t  GAIN_TABLE [4]         = DEFAULT_GAINS,
  parameter int unsigned N_CELLS                = 2**CODE_BITS - 1,
  parameter int unsigned N_ASSIST               = 32
) (
  input  logic                    osc_clk,
  input  logic                    rst_n,
  input  logic [ADC_BITS-1:0]     vref_code,       // target VOUT as an ADC code
  // window comparators and oscillator
  input  logic                    above_h,
  input  logic                    below_l,
  output logic                    osc_en,
  output logic                    event_o,
  output logic                    asleep,
  // ADC analog front end
  output logic                    adc_sample,
  input  logic [2:0]              adc_flash_therm,
  output logic [ADC_BITS-1:0]     adc_dac_code,
  input  logic                    adc_cmp,
  // droop detector and pass array
  input  logic                    droop_n,
  output logic [N_CELLS-1:0]      pmos_gate_n,
  output logic [N_CELLS-1:0]      nmos_gate,
  output logic [N_ASSIST-1:0]     assist_gate_n,
  // observation
  output logic [ADC_BITS-1:0]     adc_data,
  output logic                    adc_valid,
  output logic [CODE_BITS-1:0]    pass_code,
  output logic                    pass_code_valid, // pulses when pass_code is updated
  output logic                    sample_in_zone,  // ADC result ignored: VOUT in the dead zone
  output gain_state_e             gain_state,
  output logic                    pid_sat_hi,
  output logic                    pid_sat_lo,
  output logic [15:0]             wakeups
);

  err_t       err;
  derr_t      derr;
  pid_gains_t gains;
  logic [CODE_BITS-1:0] code_next;
  logic       sleep_entry;
  logic       event_sync;
  logic       pid_update;

  // Only samples taken while an event is present correct the code.
  assign pid_update     = adc_valid &  event_sync;
  assign sample_in_zone = adc_valid & ~event_sync;

  event_detector #(.DWELL_CLKS(DWELL_CLKS), .CNT_W(16)) u_event (
    .clk     (osc_clk),
    .rst_n   (rst_n),
    .above_h (above_h),
    .below_l (below_l),
    .event_o (event_o),
    .event_sync (event_sync),
    .osc_en  (osc_en),
    .asleep      (asleep),
    .sleep_entry (sleep_entry),
    .wakeups     (wakeups)
  );

  flash_sar_ctrl #(.BITS(ADC_BITS), .FLASH_BITS(2), .CLKS(CLKS_PER_SAMPLE)) u_adc (
    .clk         (osc_clk),
    .rst_n       (rst_n),
    .restart     (sleep_entry),
    .sample      (adc_sample),
    .flash_therm (adc_flash_therm),
    .dac_code    (adc_dac_code),
    .cmp         (adc_cmp),
    .data        (adc_data),
    .valid       (adc_valid)
  );

  dynamic_gain_ctrl #(.BITS(ADC_BITS), .E_LARGE(E_LARGE), .GAIN_TABLE(GAIN_TABLE)) u_gain (
    .clk       (osc_clk),
    .rst_n     (rst_n),
    .valid_in  (adc_valid),
    .adc_data  (adc_data),
    .vref_code (vref_code),
    .e          (err),
    .de         (derr),
    .gains      (gains),
    .last_state (gain_state)
  );

  pid_controller #(.CODE_W(CODE_BITS), .INT_BITS(16), .FRAC(GAIN_FRAC)) u_pid (
    .clk       (osc_clk),
    .rst_n     (rst_n),
    .valid_in  (pid_update),
    .e         (err),
    .de        (derr),
    .gains     (gains),
    .code      (pass_code),
    .code_next (code_next),
    .valid_out (pass_code_valid),
    .sat_hi    (pid_sat_hi),
    .sat_lo    (pid_sat_lo)
  );

  pass_array_driver #(.CODE_W(CODE_BITS), .N_CELLS(N_CELLS), .N_ASSIST(N_ASSIST)) u_drv (
    .clk           (osc_clk),
    .rst_n         (rst_n),
    .load          (pid_update),
    .code          (code_next),
    .droop_n       (droop_n),
    .pmos_gate_n   (pmos_gate_n),
    .nmos_gate     (nmos_gate),
    .assist_gate_n (assist_gate_n)
  );

endmodule
