// switch_state_decode: leg states S_LF[n], S_HF[n] for the emulator.
//
// The emulator needs to know, every 10 ns, which switch of each totem-pole
// leg conducts: S_x = 1 when the high-side switch conducts, 0 when the
// low-side switch does. The states are read from the controller's own
// gating signals, delayed by DRV_DLY clocks to match the gate-driver
// propagation delay. While a leg is in deadtime (both gates off) the
// conducting device follows from the current direction and the reverse
// conduction of the GaN switches:
//   HF leg: i_L > 0 charges the switch node to V_link, so S_HF = 1;
//           i_L <= 0 discharges it to ground, so S_HF = 0.
//   LF leg: i_L > 0 returns through the low-side switch, so S_LF = 0;
//           i_L < 0 through the high-side switch, so S_LF = 1.
// When either leg has both gates off the inductor current cannot reverse
// (V_link exceeds |v_ac| in a boost stage), so 'no_cross' tells the
// emulator to stop the current at zero instead of letting it pass through.
//
// Interface: gate inputs are the controller outputs {HS_HF, LS_HF, HS_LF,
// LS_LF}; il_pos / il_neg are the sign of the emulated current i'_L[n-1].
// Outputs are combinational from the delay line and the sign inputs.
// Reading S_x from the gating signals and the deadtime rule follow the
// design; the delay value and the zero-current blocking are this design's.
module switch_state_decode #(
  parameter int DRV_DLY = 5          // gate-driver delay in 10 ns clocks
) (
  input  logic clk,
  input  logic rst_n,
  input  logic g_hs_hf,
  input  logic g_ls_hf,
  input  logic g_hs_lf,
  input  logic g_ls_lf,
  input  logic il_pos,               // i'_L[n-1] > 0
  input  logic il_neg,               // i'_L[n-1] < 0
  output logic s_hf,
  output logic s_lf,
  output logic no_cross
);

  // delay line, one 4-bit word per clock: {hs_hf, ls_hf, hs_lf, ls_lf}
  logic [3:0] dl [DRV_DLY+1];
  logic       hs_hf_d, ls_hf_d, hs_lf_d, ls_lf_d;

  assign dl[0] = {g_hs_hf, g_ls_hf, g_hs_lf, g_ls_lf};

  for (genvar k = 1; k <= DRV_DLY; k++) begin : g_dly
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) dl[k] <= '0;
      else        dl[k] <= dl[k-1];
    end
  end

  assign {hs_hf_d, ls_hf_d, hs_lf_d, ls_lf_d} = dl[DRV_DLY];

  always_comb begin
    if (hs_hf_d)      s_hf = 1'b1;
    else if (ls_hf_d) s_hf = 1'b0;
    else              s_hf = il_pos;        // HF deadtime

    if (hs_lf_d)      s_lf = 1'b1;
    else if (ls_lf_d) s_lf = 1'b0;
    else              s_lf = il_neg;        // LF deadtime

    no_cross = !(hs_hf_d || ls_hf_d) || !(hs_lf_d || ls_lf_d);
  end

  // the controller never turns both switches of a leg on
  a_no_shoot: assert property (@(posedge clk) disable iff (!rst_n)
                               !(g_hs_hf && g_ls_hf) && !(g_hs_lf && g_ls_lf));

endmodule
