// pass_array_driver: gate drive for the CMOS pass-transistor array.
//
// Each unit cell of the array is a CMOS pass switch between VIN and VOUT: a
// PMOS (on when its gate is low) in parallel with an NMOS (on when its gate is
// high). The PID code is a count of cells to turn on; cell i conducts when
// i < code (thermometer decoding, so one code step switches exactly one cell
// and the current changes monotonically). The gate lines are registered on the
// controller clock when `load` is high, so that they change glitch-free, once
// per PID update, and keep their value while the clock is stopped. In the
// controller `code` is the PID's next code and `load` its update strobe, so the
// gates change on the same edge as the PID's code register.
//
// The droop assist path is separate and has no clock: while the droop detector
// drives `droop_n` low, the N_ASSIST assist PMOS cells are turned on directly,
// so extra current reaches VOUT before the sampled loop can react.
//
// PMOS and NMOS pass devices driven from the PID code, and a clock-free assist
// path, follow the design. The thermometer mapping, the 255 main cells (one per
// step of an 8-bit code), the 32 assist cells and the complementary gate pair
// per cell are this design's own choices.
module pass_array_driver
  import dldo_pkg::*;
#(
  parameter int unsigned CODE_W   = CODE_BITS,
  parameter int unsigned N_CELLS  = 2**CODE_BITS - 1,
  parameter int unsigned N_ASSIST = 32
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                load,           // register a new code
  input  logic [CODE_W-1:0]   code,
  input  logic                droop_n,        // active-low droop flag (NAND output)
  output logic [N_CELLS-1:0]  pmos_gate_n,    // low: PMOS of cell i on
  output logic [N_CELLS-1:0]  nmos_gate,      // high: NMOS of cell i on
  output logic [N_ASSIST-1:0] assist_gate_n   // low: assist PMOS on
);

  logic [N_CELLS-1:0] therm;

  always_comb begin
    for (int i = 0; i < N_CELLS; i++)
      therm[i] = (CODE_W'(i) < code);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pmos_gate_n <= '1;
      nmos_gate   <= '0;
    end else if (load) begin
      pmos_gate_n <= ~therm;
      nmos_gate   <= therm;
    end
  end

  assign assist_gate_n = {N_ASSIST{droop_n}};

endmodule
