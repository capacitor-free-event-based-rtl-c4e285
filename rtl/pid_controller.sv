// pid_controller: discrete PID that sets how many pass-transistor cells conduct.
//
// On each `valid_in` it evaluates the discrete form of
//   MV = Kp*e + Ki*sum(e) + Kd*de
// with the error e, its difference de and the parameter set chosen by the
// dynamic gain control. The integrator accumulates Ki*e rather than e, so that
// a change of Ki by the gain control changes only the future slope of the
// integral term and makes no step in the output (bumpless switching); for a
// constant Ki this is the same as Ki*sum(e). The sum includes the present
// error (backward Euler).
// The parameters are unsigned with GAIN_FRAC fraction bits, so the products are
// shifted right by GAIN_FRAC (arithmetic shift, rounding towards minus
// infinity). MV is clamped to 0 .. 2**CODE_W-1 and registered as `code`; it
// holds while no new sample arrives, including while the clock is stopped.
// The integrator holds Ki*sum(e) with GAIN_FRAC fraction bits, like the other
// products. Anti-windup: it is not advanced on a sample whose output is
// clamped in the direction the error pushes; it also saturates at its own width.
// `valid_out` follows `valid_in` by one clock, as does `code`. `code_next` is
// the value `code` takes on the next edge when `valid_in` is high; the pass
// array driver registers it on that same edge, so that the gate lines and
// `code` change together.
//
// The three-term form with Ki acting on the accumulated error and Kd on the
// error difference follows the design. The fixed-point format, the
// integrator width, accumulating Ki*e, and the anti-windup rule are this
// design's own choices.
module pid_controller
  import dldo_pkg::*;
#(
  parameter int unsigned CODE_W   = CODE_BITS,
  parameter int unsigned INT_BITS = 16,
  parameter int unsigned FRAC     = GAIN_FRAC
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              valid_in,
  input  err_t              e,
  input  derr_t             de,
  input  pid_gains_t        gains,
  output logic [CODE_W-1:0] code,
  output logic [CODE_W-1:0] code_next,
  output logic              valid_out,
  output logic              sat_hi,     // last MV clamped at the top
  output logic              sat_lo      // last MV clamped at zero
);

  localparam int unsigned ACC_W = INT_BITS + GAIN_BITS + 4;
  localparam logic signed [INT_BITS-1:0] I_MAX = {1'b0, {(INT_BITS-1){1'b1}}};
  localparam logic signed [INT_BITS-1:0] I_MIN = {1'b1, {(INT_BITS-1){1'b0}}};
  localparam logic signed [ACC_W-1:0] CODE_MAX = ACC_W'(2**CODE_W - 1);

  logic signed [INT_BITS-1:0] integ, integ_cand;
  logic signed [ACC_W-1:0]    integ_sum;
  logic signed [ACC_W-1:0]    p_term, i_term, d_term, mv;
  logic                       hi, lo, hold;
  logic [CODE_W-1:0]          code_now;

  assign code_next = code_now;

  always_comb begin
    integ_sum = ACC_W'(integ) + ACC_W'($signed({1'b0, gains.ki})) * ACC_W'(e);
    if (integ_sum > ACC_W'(I_MAX))      integ_cand = I_MAX;
    else if (integ_sum < ACC_W'(I_MIN)) integ_cand = I_MIN;
    else                                integ_cand = integ_sum[INT_BITS-1:0];

    p_term = ACC_W'($signed({1'b0, gains.kp})) * ACC_W'(e);
    i_term = ACC_W'(integ_cand);
    d_term = ACC_W'($signed({1'b0, gains.kd})) * ACC_W'(de);
    mv     = (p_term + i_term + d_term) >>> FRAC;

    hi = (mv > CODE_MAX);
    lo = (mv < 0);
    if (hi)      code_now = '1;
    else if (lo) code_now = '0;
    else         code_now = mv[CODE_W-1:0];
    hold = (hi && e > 0) || (lo && e < 0);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      integ     <= '0;
      code      <= '0;
      valid_out <= 1'b0;
      sat_hi    <= 1'b0;
      sat_lo    <= 1'b0;
    end else begin
      valid_out <= valid_in;
      if (valid_in) begin
        code   <= code_now;
        sat_hi <= hi;
        sat_lo <= lo;
        if (!hold) integ <= integ_cand;
      end
    end
  end

endmodule
