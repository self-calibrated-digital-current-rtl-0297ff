// bcm_ccm_ref: peak and valley thresholds for hysteretic current control.
//
// The average inductor current must follow i_avg = i_amp * sin(wt), with the
// sign of the line voltage. The hysteretic controller keeps the emulated
// current between two thresholds, th_lo < th_hi, and this block places them:
//   BCM, while |i_avg| < i_bcm_th: the current swings from just past zero
//       (i_zvs the other way, so that every switch turns on at zero
//       voltage) to twice the average plus i_zvs, so the triangle's mean is
//       i_avg and each cycle touches zero.
//         v_ac > 0: th_lo = -i_zvs,  th_hi = 2 i_avg + i_zvs
//         v_ac < 0: th_hi = +i_zvs,  th_lo = 2 i_avg - i_zvs
//   CCM, above the threshold: a fixed band around the average,
//         th_hi = i_avg + band/2,  th_lo = i_avg - band/2.
//   OFF, in the deadband |v_ac| < db_vac around the line zero crossings,
//       or while en is low: the converter is disabled.
// The switch between modes on a preset average-current threshold, the
// slightly negative BCM valley and the deadband follow the design; the
// threshold formulas, the fixed CCM band and the deadband test on the
// sampled line voltage are this design's own reading of it.
//
// Interface: sine is Q1.15 from sine_sync, currents are emu_pkg::cur_t,
// vac is the signed line voltage in ADC LSBs. Outputs are registered.
module bcm_ccm_ref
  import emu_pkg::*;
(
  input  logic               clk,
  input  logic               rst_n,
  input  logic               en,
  input  logic signed [15:0] sine,
  input  vl_t                vac,
  input  cur_t               i_amp,       // peak of the average current
  input  cur_t               i_bcm_th,    // BCM/CCM average-current threshold
  input  cur_t               i_zvs,       // BCM valley overshoot, > 0
  input  cur_t               ccm_band,    // CCM peak-to-valley band
  input  vl_t                db_vac,      // deadband half-width, ADC LSBs
  output cur_t               th_hi,
  output cur_t               th_lo,
  output cur_t               i_avg,
  output cmode_e             mode,
  output logic               pol          // 1 while v_ac > 0
);

  logic signed [47:0] prod;
  cur_t   mag, avg, hi, lo;
  logic   p;
  vl_t    vabs;
  cmode_e m;

  always_comb begin
    prod = i_amp * sine;
    mag  = cur_t'(prod >>> 15);
    if (mag < 0) mag = -mag;
    p    = (vac > 0);
    avg  = p ? mag : -mag;
    vabs = (vac < 0) ? -vac : vac;

    if (!en || vabs < db_vac) m = MODE_OFF;
    else if (mag < i_bcm_th)  m = MODE_BCM;
    else                      m = MODE_CCM;

    if (m == MODE_CCM) begin
      hi = avg + (ccm_band >>> 1);
      lo = avg - (ccm_band >>> 1);
    end else if (p) begin
      hi = (avg <<< 1) + i_zvs;
      lo = -i_zvs;
    end else begin
      hi = i_zvs;
      lo = (avg <<< 1) - i_zvs;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      th_hi <= '0;
      th_lo <= '0;
      i_avg <= '0;
      mode  <= MODE_OFF;
      pol   <= 1'b0;
    end else begin
      th_hi <= hi;
      th_lo <= lo;
      i_avg <= avg;
      mode  <= m;
      pol   <= p;
    end
  end

endmodule
