// adc_frontend_model: real-valued model of the analog half of the Flash-SAR ADC,
// for simulation only. It holds `vin` when `sample` falls (sample-and-hold),
// compares the held value with the 2**FLASH_BITS-1 coarse thresholds
// (i+1)*FS/2**FLASH_BITS for the flash stage, and compares it with the
// capacitive-DAC level dac_code*FS/2**BITS for the SAR comparator. The
// comparators are ideal and settle at once. `vheld` is exposed so that a
// testbench can work out the expected code independently of the sequencer.
module adc_frontend_model #(
  parameter int unsigned BITS       = 8,
  parameter int unsigned FLASH_BITS = 2,
  parameter real         FS         = 1.2   // full-scale input (V)
) (
  input  real                       vin,
  input  logic                      sample,
  input  logic [BITS-1:0]           dac_code,
  output logic [2**FLASH_BITS-2:0]  flash_therm,
  output logic                      cmp,
  output real                       vheld
);

  localparam real LSB = FS / real'(2**BITS);

  initial vheld = 0.0;

  always @(negedge sample) vheld = vin;

  always_comb begin
    for (int i = 0; i < 2**FLASH_BITS-1; i++)
      flash_therm[i] = (vheld >= real'(i+1) * FS / real'(2**FLASH_BITS));
    cmp = (vheld >= real'(dac_code) * LSB);
  end

endmodule
