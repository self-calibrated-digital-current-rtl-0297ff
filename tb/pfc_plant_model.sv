// pfc_plant_model: behavioural model of everything outside the controller,
// for testbenches only: the ac line, the totem-pole power stage with its
// gate drivers, the line inductor, the Hall-effect current sensor, the
// calibration comparator with its DAC, the line-polarity comparator and the
// two serial ADCs.
//
// Time advances by one 10 ns step per clock. The gate commands pass a
// DRV_DLY-step driver delay; a leg with both switches off conducts through
// the switch the current direction selects, and a current that reaches zero
// with a leg off stays at zero. The inductor current integrates
//   v_L = v_ac + (S_LF - S_HF) V_link   over L_H.
// The sensor is a SNS_DLY-step delay and a 1 MHz first-order low-pass; the
// comparator compares its output with the DAC level ((code - 512) / 8 A)
// and adds CMP_DLY steps. ADC codes are v_ac / 0.7 V + 512 and
// V_link / 0.7 V, rounded and clipped to 10 bits. With VDC > 0 the line is
// replaced by a constant dc input voltage.
module pfc_plant_model #(
  parameter real L_H     = 19.8e-6,  // true line inductance
  parameter real VAC_RMS = 240.0,
  parameter real F_LINE  = 60.0,
  parameter real PHI0    = -0.02,    // line phase at time zero, rad
  parameter real VLINK   = 450.0,
  parameter real VDC     = 0.0,      // > 0: dc input instead of the line
  parameter int  DRV_DLY = 5,
  parameter int  SNS_DLY = 5,
  parameter int  CMP_DLY = 4
) (
  input  logic       clk,
  input  logic       g_hs_hf, g_ls_hf, g_hs_lf, g_ls_lf,
  input  logic [9:0] dac_code,
  input  logic       vac_cs_n, vac_sclk,
  output logic       vac_sdata,
  input  logic       vlink_cs_n, vlink_sclk,
  output logic       vlink_sdata,
  output logic       vac_pos,
  output logic       v_comp
);

  localparam real DT   = 10.0e-9;
  localparam real PI   = 3.14159265358979;
  localparam real VLSB = 0.7;

  real    il = 0.0, vac = 0.0, isns = 0.0, kick = 0.0;
  real    alpha;
  longint step = 0;
  logic [3:0] gq [$];
  real    sq [$], cq [$];
  logic [9:0] vac_code, vlink_code;

  initial alpha = 1.0 - $exp(-2.0 * PI * 1.0e6 * DT);

  function automatic logic [9:0] code_of(real v, int offs);
    int c;
    c = $rtoi(v / VLSB + 0.5 + real'(offs) + 1000.0) - 1000;
    if (c < 0) c = 0;
    if (c > 1023) c = 1023;
    return 10'(c);
  endfunction

  // add a step to the true current (an error the emulator must find)
  task automatic add_current(real a);
    kick = kick + a;
  endtask

  always @(posedge clk) begin
    logic [3:0] g;
    real s_hf, s_lf, vl, inew, iref;
    bit  leg_off;
    step++;
    vac = (VDC > 0.0) ? VDC :
          VAC_RMS * $sqrt(2.0) * $sin(2.0 * PI * F_LINE * real'(step) * DT + PHI0);
    gq.push_back({g_hs_hf, g_ls_hf, g_hs_lf, g_ls_lf});
    g = (gq.size() > DRV_DLY) ? gq.pop_front() : 4'b0000;
    s_hf = g[3] ? 1.0 : g[2] ? 0.0 : (il > 0.0) ? 1.0 : 0.0;
    s_lf = g[1] ? 1.0 : g[0] ? 0.0 : (il < 0.0) ? 1.0 : 0.0;
    leg_off = (g[3:2] == 2'b00) || (g[1:0] == 2'b00);
    vl   = vac + (s_lf - s_hf) * VLINK;
    inew = il + vl * DT / L_H;
    if (leg_off && (il == 0.0 || (il > 0.0) != (inew > 0.0))) inew = 0.0;
    il   = inew + kick;
    kick = 0.0;
    // Hall sensor: delay, then 1 MHz low-pass
    sq.push_back(il);
    if (sq.size() > SNS_DLY) isns = isns + alpha * (sq.pop_front() - isns);
    // comparator against the DAC level, with its delay
    iref = real'(int'(dac_code) - 512) / 8.0;
    cq.push_back((isns > iref) ? 1.0 : 0.0);
    if (cq.size() > CMP_DLY) v_comp <= (cq.pop_front() > 0.5);
    vac_pos    <= (vac > 0.0);
    vac_code   = code_of(vac, 512);
    vlink_code = code_of(VLINK, 0);
  end

  initial begin
    v_comp  = 1'b0;
    vac_pos = 1'b0;
  end

  adc_model u_vac   (.cs_n(vac_cs_n),   .sclk(vac_sclk),   .code(vac_code),
                     .sdata(vac_sdata));
  adc_model u_vlink (.cs_n(vlink_cs_n), .sclk(vlink_sclk), .code(vlink_code),
                     .sdata(vlink_sdata));

endmodule
