// pfc_case_harness: one controller (pfc_emu_ctrl_top, default parameters)
// closed around its own behavioural power stage at a given line voltage,
// link voltage and current amplitude, with its own settings and checks.
// Used by tb_pfc_line_cases to run several operating points side by side.
//
// After reset it waits for the line lock (at most 45 ms), then observes one
// full line period of PFC operation and checks: no leg shoot-through; the
// emulated current within MAXERR amperes of the true one; the true current
// following the sinusoidal reference (least-squares gain 0.9 to 1.1); BCM
// and CCM cycles, deadband entries and calibrations all happening; at least
// 95 % of the CCM switching periods between 200 and 500 clocks (200 to
// 500 kHz). Over the same period the line current (the true inductor
// current) is resolved into its first 20 harmonics of 60 Hz, sampled every
// 10 clocks, and its total harmonic distortion
//   THD = sqrt(sum over k = 2..20 of |I_k|^2) / |I_1|
// is reported; if THD_MAX > 0 it must stay below THD_MAX. The harmonic
// phasors e^(j k theta) advance by a fixed complex rotation per sample.
// Interface: clk and rst_n in; checks, failures and done out (done rises
// once the case has finished). Settings as in the full-size bench, with a
// 12 A CCM band and an 8 A BCM/CCM threshold; the true inductance is
// L_ERR times the emulator's value.
module pfc_case_harness
  import emu_pkg::*;
#(
  parameter string NAME    = "case",
  parameter real   VAC_RMS = 240.0,
  parameter real   VLINK   = 450.0,
  parameter real   I_PEAK  = 17.7,      // peak of the average current, A
  parameter real   PHI0    = -0.02,
  parameter real   L_ERR   = 1.03,
  parameter real   MAXERR  = 2.5,
  parameter real   THD_MAX = 0.0       // 0: THD reported only
) (
  input  logic clk,
  input  logic rst_n,
  output int   checks,
  output int   failures,
  output logic done
);
  localparam real A = 2.0 ** 24;
  logic vac_cs_n, vac_sclk, vac_sdata, vlink_cs_n, vlink_sclk, vlink_sdata;
  logic vac_pos, v_comp;
  logic [9:0] dac_code;
  logic g_hs_hf, g_ls_hf, g_hs_lf, g_ls_lf;
  cfg_t    cfg;
  status_t stat;

  pfc_emu_ctrl_top dut (.*);

  pfc_plant_model #(.L_H(19.8e-6 * L_ERR), .VAC_RMS(VAC_RMS), .VLINK(VLINK),
                    .PHI0(PHI0), .SNS_DLY(6)) plant (
    .clk, .g_hs_hf, .g_ls_hf, .g_hs_lf, .g_ls_lf, .dac_code,
    .vac_cs_n, .vac_sclk, .vac_sdata, .vlink_cs_n, .vlink_sclk, .vlink_sdata,
    .vac_pos, .v_comp
  );

  bit   active = 0;
  int   n_bcm = 0, n_ccm = 0, n_db = 0, n_cal = 0, n_per = 0, n_fsw_ok = 0;
  int   since_rise = 0;
  real  err, maxerr = 0.0, s1 = 0.0, s2 = 0.0, r;
  logic c_q = 0, run_q = 0;

  // harmonic analysis of the line current over the observed period
  localparam int  NH     = 20;
  localparam int  DEC    = 10;
  localparam int  N_OBS  = 1_666_667;             // clocks per line period
  localparam real PI     = 3.14159265358979;
  real  hr [NH+1], hi [NH+1], pr [NH+1], pi_ [NH+1], rr [NH+1], ri [NH+1];
  real  thd;
  int   dec_cnt = 0;

  initial begin
    for (int k = 1; k <= NH; k++) begin
      hr[k] = 0.0; hi[k] = 0.0; pr[k] = 1.0; pi_[k] = 0.0;
      rr[k] = $cos(2.0 * PI * k * DEC / N_OBS);
      ri[k] = $sin(2.0 * PI * k * DEC / N_OBS);
    end
  end

  always @(posedge clk) if (rst_n && active) begin
    if (dec_cnt == 0) begin
      for (int k = 1; k <= NH; k++) begin
        real t;
        hr[k]  = hr[k] + plant.il * pr[k];
        hi[k]  = hi[k] + plant.il * pi_[k];
        t      = pr[k] * rr[k] - pi_[k] * ri[k];
        pi_[k] = pr[k] * ri[k] + pi_[k] * rr[k];
        pr[k]  = t;
      end
    end
    dec_cnt = (dec_cnt == DEC - 1) ? 0 : dec_cnt + 1;
  end

  always @(posedge clk) if (rst_n && active) begin
    logic run;
    run = (stat.mode != MODE_OFF);
    err = plant.il - real'(stat.il) / A;
    if ((g_hs_hf && g_ls_hf) || (g_hs_lf && g_ls_lf)) begin
      failures++; $display("%s: shoot-through at %0t", NAME, $time);
    end
    since_rise++;
    if (run) begin
      if (err > maxerr) maxerr = err;
      if (-err > maxerr) maxerr = -err;
      r  = real'(dut.i_avg) / A;
      s1 = s1 + plant.il * r;
      s2 = s2 + r * r;
      if (stat.c && !c_q) begin
        if (stat.mode == MODE_BCM) n_bcm++; else n_ccm++;
        // switching period in CCM, in 10 ns clocks
        if (c_q == 0 && run_q && stat.mode == MODE_CCM) begin
          n_per++;
          if (since_rise >= 200 && since_rise <= 500) n_fsw_ok++;
        end
        since_rise = 0;
      end
    end
    if (run_q && !run) n_db++;
    if (stat.cal_done) n_cal++;
    c_q   = stat.c;
    run_q = run;
  end

  task automatic need(string what, int n);
    checks++;
    if (n == 0) begin failures++; $display("%s: never seen: %s", NAME, what); end
  endtask

  initial begin
    checks = 0; failures = 0; done = 0;
    cfg = '0;
    cfg.en           = 1'b1;
    cfg.i_amp        = cur_t'(I_PEAK * A);
    cfg.i_bcm_th     = cur_t'(8.0 * A);
    cfg.i_zvs        = cur_t'(0.5 * A);
    cfg.ccm_band     = cur_t'(12.0 * A);
    cfg.db_vac       = vl_t'(71);
    cfg.cal_en       = 1'b1;
    cfg.cal_alt      = 1'b1;
    cfg.cal_interval = 8'd4;
    cfg.cal_timeout  = 16'd3000;
    cfg.pno_en       = 1'b1;
    cfg.pno_n        = 8'd4;
    cfg.pno_delta    = 16'd30;
    cfg.ml_init      = 16'(ML_DEFAULT);
    @(posedge rst_n);
    fork
      wait (stat.locked);
      repeat (4_500_000) @(posedge clk);
    join_any
    disable fork;
    checks++;
    if (!stat.locked) begin
      failures++; $display("%s: no lock", NAME);
    end else begin
      active = 1;
      repeat (N_OBS) @(posedge clk);         // one 60 Hz line period
      active = 0;
      begin
        real h2 = 0.0;
        for (int k = 2; k <= NH; k++) h2 = h2 + hr[k] * hr[k] + hi[k] * hi[k];
        thd = $sqrt(h2 / (hr[1] * hr[1] + hi[1] * hi[1]));
      end
      if (THD_MAX > 0.0) begin
        checks++;
        if (thd > THD_MAX) begin failures++; $display("%s: THD %f", NAME, thd); end
      end
      checks++;
      if (maxerr > MAXERR) begin failures++; $display("%s: max emulation error %f A", NAME, maxerr); end
      checks++;
      if (s2 == 0.0 || s1 / s2 < 0.9 || s1 / s2 > 1.1) begin
        failures++; $display("%s: current/reference gain %f", NAME, (s2 == 0.0) ? 0.0 : s1 / s2);
      end
      need("BCM cycles", n_bcm);
      need("CCM cycles", n_ccm);
      need("deadband", n_db);
      need("calibrations", n_cal);
      checks++;
      if (n_fsw_ok * 20 < n_per * 19) begin
        failures++; $display("%s: %0d of %0d CCM periods within 200-500 kHz", NAME, n_fsw_ok, n_per);
      end
      $display("%s: error %f A, gain %f, BCM %0d, CCM %0d, CCM periods in 200-500 kHz %0d of %0d, calibrations %0d, M_L %0d, fundamental %.2f A peak, THD %.1f %%",
               NAME, maxerr, s1 / s2, n_bcm, n_ccm, n_fsw_ok, n_per, n_cal, stat.ml,
               2.0 * DEC * $sqrt(hr[1] * hr[1] + hi[1] * hi[1]) / N_OBS, 100.0 * thd);
    end
    done = 1;
  end
endmodule
