// dldo_plant_model: real-valued model of the analog side of the regulator, for
// simulation only. It covers the CMOS pass-transistor array, the output node,
// the load, the two window comparators and the droop detector.
//   Pass array : every conducting unit cell (PMOS and NMOS both on) and every
//                assist PMOS is a conductance G_CELL between VIN and VOUT.
//   Output node: capacitance C_OUT (on-die only, no external capacitor) with a
//                load current I_LOAD that fades out below 0.1 V; VOUT is updated
//                every DT_NS with the exact solution of the linear node equation.
//   Window     : above_h = VOUT > vrefh, below_l = VOUT < vrefl, ideal.
//   Droop      : VOUT passed through a first-order high-pass (time constant
//                TAU_HP_NS) flags a fast drop when it is below -DROOP_V;
//                droop_n is the NAND of that flag and below_l, so it goes low
//                only while a fast drop has taken VOUT under the window. It
//                needs no clock.
// All values are illustrative, chosen so that 255 cells carry about 70 mA at a
// 0.3 V drop.
`timescale 1ns/1ps
module dldo_plant_model #(
  parameter int unsigned N_CELLS   = 255,
  parameter int unsigned N_ASSIST  = 32,
  parameter real G_CELL    = 1.0e-3,    // S per cell
  parameter real C_OUT     = 200.0e-12, // F
  parameter real DT_NS     = 0.5,
  parameter real TAU_HP_NS = 10.0,
  parameter real DROOP_V   = 0.03
) (
  input  real                 vin,
  input  real                 i_load,
  input  real                 vrefh,      // window comparator thresholds
  input  real                 vrefl,
  input  logic [N_CELLS-1:0]  pmos_gate_n,
  input  logic [N_CELLS-1:0]  nmos_gate,
  input  logic [N_ASSIST-1:0] assist_gate_n,
  output real                 vout,
  output logic                above_h,
  output logic                below_l,
  output logic                droop_n,
  output int                  cells_on
);

  real vhp = 0.0;

  initial vout = 0.0;

  always_comb begin
    int n;
    n = 0;
    for (int i = 0; i < N_CELLS; i++) n += int'(!pmos_gate_n[i] && nmos_gate[i]);
    cells_on = n;
  end

  always begin
    real g, il, vss, vprev;
    int na;
    #(DT_NS);
    na = 0;
    for (int i = 0; i < N_ASSIST; i++) na += int'(!assist_gate_n[i]);
    g  = G_CELL * real'(cells_on + na);
    il = (vout >= 0.1) ? i_load : i_load * (vout > 0.0 ? vout : 0.0) / 0.1;
    vprev = vout;
    if (g > 0.0) begin
      vss  = vin - il / g;
      vout = vss + (vout - vss) * $exp(-g * DT_NS * 1.0e-9 / C_OUT);
    end else begin
      vout = vout - il * DT_NS * 1.0e-9 / C_OUT;
    end
    if (vout < 0.0) vout = 0.0;
    vhp = vhp * $exp(-DT_NS / TAU_HP_NS) + (vout - vprev);
  end

  assign above_h = (vout > vrefh);
  assign below_l = (vout < vrefl);
  assign droop_n = !((vhp < -DROOP_V) && below_l);

endmodule
