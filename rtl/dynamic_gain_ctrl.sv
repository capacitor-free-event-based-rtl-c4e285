// dynamic_gain_ctrl: error computation and gain scheduling for the PID.
//
// On every ADC result (`valid_in`) it forms the error e = Vref - V_ADC, both as
// ADC codes, and its first difference de = e - e_prev, and picks one of four PID
// parameter sets from the size of the error and whether it is growing:
//   |e| >= E_LARGE  -> large,  otherwise small;
//   e and de of the same (nonzero) sign -> diverging, otherwise converging.
// The set comes from GAIN_TABLE, indexed by gain_state_e. e, de and `gains`
// are combinational from the ADC result, so that the PID can act on
// the same clock edge as `valid_in`: when the result is used, the loop then
// updates the pass array one clock after it and VOUT has settled before the
// next sample is held. e_prev is registered on `valid_in`; it keeps its value while the clock
// is stopped, so the first difference after a wake-up is taken against the
// last sample before sleep. `last_state` registers the chosen state for
// observation.
//
// That the error and its difference select the parameters follows the design.
// The two-by-two state split, the threshold and the table values are this
// design's own choice, sized for an 8-bit ADC with a 4.7 mV LSB.
module dynamic_gain_ctrl
  import dldo_pkg::*;
#(
  parameter int unsigned BITS               = ADC_BITS,
  parameter int unsigned E_LARGE            = 16,
  parameter pid_gains_t  GAIN_TABLE [4]     = DEFAULT_GAINS
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        valid_in,
  input  logic [BITS-1:0] adc_data,
  input  logic [BITS-1:0] vref_code,
  output err_t        e,
  output derr_t       de,
  output pid_gains_t  gains,
  output gain_state_e last_state
);

  err_t          e_prev;
  logic [BITS:0] e_abs;
  logic          is_large, diverging;
  gain_state_e   state;

  always_comb begin
    e         = err_t'({1'b0, vref_code}) - err_t'({1'b0, adc_data});
    de        = derr_t'(e) - derr_t'(e_prev);
    e_abs     = e[BITS] ? (BITS+1)'(-e) : (BITS+1)'(e);
    is_large  = (e_abs >= (BITS+1)'(E_LARGE));
    diverging = (e > 0 && de > 0) || (e < 0 && de < 0);
    unique case ({is_large, diverging})
      2'b00:   state = GS_SMALL_CONV;
      2'b01:   state = GS_SMALL_DIV;
      2'b10:   state = GS_LARGE_CONV;
      default: state = GS_LARGE_DIV;
    endcase
    gains = GAIN_TABLE[state];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      e_prev     <= '0;
      last_state <= GS_SMALL_CONV;
    end else if (valid_in) begin
      e_prev     <= e;
      last_state <= state;
    end
  end

endmodule
