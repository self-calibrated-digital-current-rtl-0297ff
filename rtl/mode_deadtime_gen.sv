// mode_deadtime_gen: mode control and deadtime generation for the totem pole.
//
// The low-frequency leg commutates with the polarity of the line voltage:
// its low-side switch conducts while v_ac > 0 and its high-side switch while
// v_ac < 0. The high-frequency leg follows the switching command c[n] of the
// hysteretic controller: c = 1 turns on the low-side HF switch, which puts
// +v_ac (positive half) or v_ac + V_link (negative half) across the
// inductor, so the current rises in both halves; c = 0 turns on the
// high-side HF switch and the current falls. With the mode OFF (deadband
// around the zero crossings, or disabled) all four switches are off. Each
// leg gets break-before-make deadtime: DT_HF clocks for the fast leg,
// DT_LF clocks for the slow leg.
// The leg roles and the deadband follow the design; the deadtime values are
// this design's, as the design does not give them.
//
// Interface: gate outputs are registered (see deadtime_leg). mode is the
// emu_pkg::cmode_e from bcm_ccm_ref.
module mode_deadtime_gen
  import emu_pkg::*;
#(
  parameter int DT_HF = 5,       // 50 ns
  parameter int DT_LF = 20       // 200 ns
) (
  input  logic   clk,
  input  logic   rst_n,
  input  cmode_e mode,
  input  logic   pol,
  input  logic   c,
  output logic   g_hs_hf,
  output logic   g_ls_hf,
  output logic   g_hs_lf,
  output logic   g_ls_lf
);

  logic run;
  assign run = (mode != MODE_OFF);

  deadtime_leg #(.DT(DT_HF)) u_hf (
    .clk, .rst_n,
    .want_hs(run && !c), .want_ls(run && c),
    .g_hs(g_hs_hf), .g_ls(g_ls_hf)
  );

  deadtime_leg #(.DT(DT_LF)) u_lf (
    .clk, .rst_n,
    .want_hs(run && !pol), .want_ls(run && pol),
    .g_hs(g_hs_lf), .g_ls(g_ls_lf)
  );

endmodule
