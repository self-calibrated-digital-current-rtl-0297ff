// inductor_emulator: the digital inductor-current integrator.
//
// Every 10 ns clock (one computation interval T_comp) the emulated current
// advances by one forward-Euler step of the inductor equation
//   i'_L[n] = i'_L[n-1] + M_L * v'_L[n],     M_L = T_comp / L,
// so the emulated waveform carries the full switching-frequency ripple.
// A calibration overrides the step: when cal_sel is high the register loads
// i_cal instead (the 0/1 multiplexer in front of the state register).
// The step M_L * v'_L[n] is also brought out as 'di' so that the
// calibration unit can form i_cal = i'_L[n-1] + di + i_err without losing
// the step of the calibration cycle.
// When 'no_cross' is high (a totem-pole leg has both switches off) the
// current cannot reverse, so a step that would reach or pass zero stops at
// exactly zero; this blocking rule is this design's own addition.
//
// Interface: vl is signed ADC LSBs, ml is unsigned current LSBs per volt
// LSB, currents are emu_pkg::cur_t. il is registered (i'_L[n-1] during
// cycle n); di is combinational. Reset clears the current to zero.
module inductor_emulator
  import emu_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  vl_t  vl,          // v'_L[n]
  input  ml_t  ml,          // slope parameter M_L
  input  logic no_cross,    // current may not pass through zero
  input  logic cal_sel,     // load i_cal this cycle
  input  cur_t i_cal,
  output cur_t di,          // M_L * v'_L[n]
  output cur_t il           // i'_L
);

  cur_t nxt, integ;

  always_comb begin
    di    = cur_t'(vl) * cur_t'($signed({1'b0, ml}));
    integ = il + di;
    if (no_cross && ((il >= 0 && integ <= 0 && di < 0) ||
                     (il <= 0 && integ >= 0 && di > 0) ||
                     (il == 0)))
      integ = '0;
    nxt = cal_sel ? i_cal : integ;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) il <= '0;
    else        il <= nxt;
  end

endmodule
