// flash_sar_ctrl: sequencer of the 8-bit Flash-SAR ADC that digitises VOUT.
//
// One conversion takes CLKS_PER_SAMPLE clocks (10 at 50 MHz gives the 5 MS/s
// of the design's ADC). It runs in three phases, counted by a phase counter:
//   sample : `sample` is high for CLKS_PER_SAMPLE-1-SAR_BITS clocks while the
//            analog sample-and-hold tracks VOUT; the value is held when it falls.
//   flash  : one clock in which 2**FLASH_BITS-1 coarse comparators (thermometer
//            input `flash_therm`, bit i means Vheld >= (i+1)*FS/2**FLASH_BITS)
//            resolve the FLASH_BITS most significant bits at once. The ones are
//            counted, so a single bubble in the thermometer costs one coarse LSB
//            at most.
//   SAR    : one clock per remaining bit, MSB first. `dac_code` presents the
//            trial code (result so far with the trial bit set) to the capacitive
//            DAC; the comparator answers `cmp` = 1 when Vheld >= V(dac_code), and
//            the trial bit is kept on that clock edge.
// After the last SAR decision `data` is updated and `valid` pulses for one clock,
// together with the first sample clock of the next conversion. So `valid`
// pulses exactly every CLKS_PER_SAMPLE clocks, and the sampled value appears
// CLKS_PER_SAMPLE - SAMPLE_CLKS + 1 clocks after `sample` falls.
// `restart`, sampled on a clock edge, abandons the conversion in progress and
// returns to the first sample clock; it is given on the edge that stops the
// clock, so that the first result after a wake-up comes from a fresh sample
// and arrives CLKS_PER_SAMPLE clocks after the clock restarts.
//
// The 8-bit resolution and the 5 MS/s rate at a 50 MHz clock follow the design.
// The split into 2 flash bits and 6 SAR bits, and the phase lengths, are this
// design's own choice. The comparators, DAC and sample-and-hold are analog and
// sit outside this module. The thermometer assertion is disabled during reset
// (`disable iff (!rst_n)`), so lint tools may note that `rst_n` is read both
// as an asynchronous reset and in clocked logic; that use is intended.
module flash_sar_ctrl
  import dldo_pkg::*;
#(
  parameter int unsigned BITS        = ADC_BITS,
  parameter int unsigned FLASH_BITS  = 2,
  parameter int unsigned CLKS        = CLKS_PER_SAMPLE
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      restart,      // back to the sample phase
  output logic                      sample,       // S/H tracks while high
  input  logic [2**FLASH_BITS-2:0]  flash_therm,  // coarse comparator outputs
  output logic [BITS-1:0]           dac_code,     // SAR trial code to the DAC
  input  logic                      cmp,          // 1: Vheld >= V(dac_code)
  output logic [BITS-1:0]           data,         // last conversion result
  output logic                      valid         // one-clock pulse per result
);

  localparam int unsigned SAR_BITS    = BITS - FLASH_BITS;
  localparam int unsigned SAMPLE_CLKS = CLKS - 1 - SAR_BITS;
  localparam int unsigned PH_FLASH    = SAMPLE_CLKS;
  localparam int unsigned PH_SAR0     = SAMPLE_CLKS + 1;
  localparam int unsigned PH_W        = $clog2(CLKS);

  initial begin
    assert (CLKS >= SAR_BITS + 2)
      else $fatal(1, "flash_sar_ctrl: CLKS too small for one sample clock");
  end

  logic [PH_W-1:0]  phase;
  logic [BITS-1:0]  result;
  logic [BITS-1:0]  trial_bit;     // one-hot weight of the bit under test
  logic [FLASH_BITS-1:0] coarse;

  // Count the ones of the thermometer code.
  always_comb begin
    coarse = '0;
    for (int i = 0; i < 2**FLASH_BITS-1; i++)
      coarse = coarse + FLASH_BITS'(flash_therm[i]);
  end

  always_comb begin
    trial_bit = '0;
    if (phase >= PH_W'(PH_SAR0))
      trial_bit[SAR_BITS-1 - (int'(phase) - PH_SAR0)] = 1'b1;
  end

  assign sample   = (phase < PH_W'(SAMPLE_CLKS));
  assign dac_code = result | trial_bit;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      phase  <= '0;
      result <= '0;
      data   <= '0;
      valid  <= 1'b0;
    end else begin
      valid <= 1'b0;
      if (restart)                     phase <= '0;
      else if (phase == PH_W'(CLKS-1)) phase <= '0;
      else                             phase <= phase + 1'b1;

      if (restart) begin
        result <= '0;
      end else if (phase == PH_W'(PH_FLASH)) begin
        result <= {coarse, {SAR_BITS{1'b0}}};
      end else if (phase >= PH_W'(PH_SAR0)) begin
        if (cmp) result <= result | trial_bit;
        if (phase == PH_W'(CLKS-1)) begin
          data  <= cmp ? (result | trial_bit) : result;
          valid <= 1'b1;
        end
      end
    end
  end

  // The coarse comparators must give a thermometer code during the flash clock.
  property p_thermometer;
    @(posedge clk) disable iff (!rst_n)
      (phase == PH_W'(PH_FLASH)) |-> ((flash_therm & (flash_therm + 1'b1)) == '0);
  endproperty
  a_thermometer: assert property (p_thermometer)
    else $error("flash_sar_ctrl: flash comparators not a thermometer code");

endmodule
