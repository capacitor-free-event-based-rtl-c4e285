// dldo_pkg: types and constants shared by the digital DLDO controller.
//
// The ADC resolution (8 bits) and the 10 clocks per conversion (50 MHz clock,
// 5 MS/s) follow the ADC figures of the design. The PID parameter format, the
// pass-array code width and the four gain states are this design's own choices:
// parameters are unsigned fixed point with GAIN_FRAC fraction bits, and the
// pass-array code is 8 bits wide so that one code step switches one unit cell.
package dldo_pkg;

  localparam int unsigned ADC_BITS        = 8;   // ADC resolution
  localparam int unsigned CLKS_PER_SAMPLE = 10;  // 50 MHz / 5 MS/s
  localparam int unsigned CODE_BITS       = 8;   // pass-array code width
  localparam int unsigned GAIN_BITS       = 8;   // width of Kp, Ki, Kd
  localparam int unsigned GAIN_FRAC       = 4;   // fraction bits of Kp, Ki, Kd

  // Error e = Vref - V_ADC and its first difference, both in ADC LSBs.
  typedef logic signed [ADC_BITS:0]   err_t;
  typedef logic signed [ADC_BITS+1:0] derr_t;

  // One PID parameter set (unsigned, GAIN_FRAC fraction bits each).
  typedef struct packed {
    logic [GAIN_BITS-1:0] kp;
    logic [GAIN_BITS-1:0] ki;
    logic [GAIN_BITS-1:0] kd;
  } pid_gains_t;

  // Operating state chosen by the dynamic gain control from e and de.
  typedef enum logic [1:0] {
    GS_SMALL_CONV = 2'd0,  // |e| small, error shrinking or steady
    GS_SMALL_DIV  = 2'd1,  // |e| small, error growing
    GS_LARGE_CONV = 2'd2,  // |e| large, error shrinking or steady
    GS_LARGE_DIV  = 2'd3   // |e| large, error growing
  } gain_state_e;

  // Default parameter table, indexed by gain_state_e.
  // Q4.4: 16 = 1.0, 8 = 0.5, 4 = 0.25, 1 = 0.0625.
  // The loop is mostly integral. How far one code step moves VOUT depends on
  // the load: about one ADC LSB at 20 mA, several LSBs at a few mA. Near the
  // target the integral gain is therefore low (0.0625), so that a light load
  // does not make the loop jump across the dead zone. Far from the target and
  // converging it is high (0.5) to cover the distance in few samples. When e
  // and de have the same sign the error is growing, which in this sampled loop
  // mostly follows an overshoot; the integral gain is then low again, and near
  // the target a small Kd damps the swing.
  localparam pid_gains_t DEFAULT_GAINS [4] = '{
    '{kp: 8'd1, ki: 8'd1, kd: 8'd0},   // GS_SMALL_CONV
    '{kp: 8'd1, ki: 8'd1, kd: 8'd1},   // GS_SMALL_DIV
    '{kp: 8'd1, ki: 8'd8, kd: 8'd1},   // GS_LARGE_CONV
    '{kp: 8'd1, ki: 8'd1, kd: 8'd0}    // GS_LARGE_DIV
  };

endpackage
