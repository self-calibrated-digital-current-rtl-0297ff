// tb_pfc_emu_ctrl_top: the whole controller, at its default parameters,
// closed around a behavioural power stage (pfc_plant_model) running from a
// 240 V rms, 60 Hz line into a 450 V link, with a true inductance 5 % above
// the value the emulator assumes. The run covers the lock to the line
// (about two line periods) and then one full line period of PFC operation
// at a 17.7 A peak current reference.
//
// Checked:
//  - the sine reference locks;
//  - gates never short a leg;
//  - after a calibration, where the emulated current next passes the
//    reference level, it is within 0.5 A of the true current (for at least
//    95 % of calibrations), and over the whole run within 2.5 A;
//  - a 1.5 A step injected into the true current is seen by the next
//    calibration (i_err within 0.35 A of it; the 5 % slope mismatch alone
//    inflates the estimate by 5 %) and removed within four;
//  - the true current follows the sinusoidal reference (least-squares gain
//    between 0.9 and 1.1);
//  - perturb and observe, with calibrations alternating between two levels,
//    moves M_L from 5931 to within 2 % of the true 5649;
//  - each mechanism happens at least once: BCM and CCM switching cycles,
//    deadband entry, ADC samples, HF-leg deadtime with the state inferred
//    from the current, zero-current blocking, applied calibrations and a
//    perturb-and-observe change of M_L.
module tb_pfc_emu_ctrl_top;
  import emu_pkg::*;
  logic clk = 0, rst_n = 0;
  logic vac_cs_n, vac_sclk, vac_sdata, vlink_cs_n, vlink_sclk, vlink_sdata;
  logic vac_pos, v_comp;
  logic [9:0] dac_code;
  logic g_hs_hf, g_ls_hf, g_hs_lf, g_ls_lf;
  cfg_t    cfg;
  status_t stat;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  pfc_emu_ctrl_top dut (.*);

  pfc_plant_model #(.L_H(19.8e-6 * 1.05), .SNS_DLY(6)) plant (
    .clk, .g_hs_hf, .g_ls_hf, .g_hs_lf, .g_ls_lf, .dac_code,
    .vac_cs_n, .vac_sclk, .vac_sdata, .vlink_cs_n, .vlink_sclk, .vlink_sdata,
    .vac_pos, .v_comp
  );

  localparam real A = 2.0 ** 24;

  initial begin
    #60_000_000;
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------------------------------------------------------- monitors
  bit  active = 0;            // after lock
  int  n_bcm = 0, n_ccm = 0, n_db = 0, n_adc = 0, n_dt = 0, n_blk = 0;
  int  n_cal = 0, n_abort = 0, n_inc = 0, n_dec = 0, cal_bad = 0;
  int  kick_cal = -1;         // calibrations since the injected step
  real kick_err = 0.0;
  real err, maxerr = 0.0, s1 = 0.0, s2 = 0.0, r;
  logic c_q = 0, run_q = 0, side, side_q = 0, pend = 0;
  int   n_eval = 0;
  bit   kick_done = 0;
  cur_t il_q = '0;

  always @(posedge clk) if (rst_n && active) begin
    logic run;
    run = (stat.mode != MODE_OFF);
    err = plant.il - real'(stat.il) / A;
    if ((g_hs_hf && g_ls_hf) || (g_hs_lf && g_ls_lf)) begin
      failures++; $display("shoot-through at %0t", $time);
    end
    if (run) begin
      if (err > maxerr) maxerr = err;
      if (-err > maxerr) maxerr = -err;
      r  = real'(dut.i_avg) / A;
      s1 = s1 + plant.il * r;
      s2 = s2 + r * r;
      if (stat.c && !c_q) begin
        if (stat.mode == MODE_BCM) n_bcm++; else n_ccm++;
      end
      if (!g_hs_hf && !g_ls_hf && stat.il != 0) n_dt++;
    end
    if (run_q && !run) n_db++;
    if (dut.vac_valid) n_adc++;
    if (dut.no_cross && stat.il == 0 && il_q != 0) n_blk++;
    if (stat.cal_abort) n_abort++;
    if (stat.ml_inc) n_inc++;
    if (stat.ml_dec) n_dec++;
    // error where the emulated current next crosses the reference level,
    // the point a calibration aligns (away from it a slope mismatch adds
    // an error proportional to the distance from that level)
    side = (stat.il >= dut.cal_lvl);
    if (pend && side != side_q && run) begin
      pend = 0;
      n_eval++;
      if (kick_cal >= 4 && !kick_done) begin
        kick_done = 1;
        checks++;
        if (err > 0.5 || err < -0.5) begin
          failures++; $display("step not removed: error %f A", err);
        end
      end else if (kick_cal < 0 || kick_cal > 4) begin
        if (err > 0.5 || err < -0.5) begin
          cal_bad++;
          if (cal_bad < 10) $display("after calibration %0d: error %f A", n_cal, err);
        end
      end
    end
    side_q = side;
    if (stat.cal_done) begin
      n_cal++;
      pend = 1;
      if (kick_cal >= 0) begin
        kick_cal++;
        if (kick_cal == 1) kick_err = real'(stat.i_err) / A;
      end
    end
    c_q   = stat.c;
    run_q = run;
    il_q  = stat.il;
  end

  // ------------------------------------------------------------- stimulus
  task automatic count(string what, int n);
    checks++;
    if (n == 0) begin failures++; $display("mechanism never seen: %s", what); end
    else $display("  %-28s %0d", what, n);
  endtask

  initial begin
    cfg = '0;
    cfg.en           = 1'b1;
    cfg.i_amp        = cur_t'(17.7 * A);
    cfg.i_bcm_th     = cur_t'(8.0 * A);
    cfg.i_zvs        = cur_t'(0.5 * A);
    cfg.ccm_band     = cur_t'(12.0 * A);
    cfg.db_vac       = vl_t'(71);          // about 50 V
    cfg.cal_en       = 1'b1;
    cfg.cal_bcm_only = 1'b0;
    cfg.cal_alt      = 1'b1;
    cfg.cal_interval = 8'd4;
    cfg.cal_timeout  = 16'd3000;
    cfg.pno_en       = 1'b1;
    cfg.pno_n        = 8'd4;
    cfg.pno_delta    = 16'd30;
    cfg.ml_init      = 16'(ML_DEFAULT);
    cfg.ml_load      = 1'b0;
    repeat (3) @(posedge clk);
    rst_n = 1;

    fork
      wait (stat.locked);
      repeat (4_500_000) @(posedge clk);
    join_any
    disable fork;
    checks++;
    if (!stat.locked) begin
      failures++; $display("no lock");
      $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
      $finish;
    end
    $display("locked at %0t", $time);
    active = 1;

    // a quarter line period in, step the true current by 1.5 A
    repeat (400_000) @(posedge clk);
    wait (stat.mode != MODE_OFF && !stat.cal_busy);
    repeat (3) @(posedge clk);     // let a finishing calibration report
    plant.add_current(1.5);
    kick_cal = 0;
    $display("1.5 A step injected at %0t", $time);

    repeat (1_300_000) @(posedge clk);

    checks++;
    if (!kick_done) begin failures++; $display("only %0d calibrations after step", kick_cal); end
    checks++;
    if (kick_err < 1.15 || kick_err > 1.85) begin
      failures++; $display("first correction after step %f A", kick_err);
    end
    checks++;
    if (cal_bad > n_eval / 20) begin
      failures++; $display("%0d of %0d calibrations left > 0.5 A", cal_bad, n_eval);
    end
    checks++;
    if (maxerr > 2.5) begin failures++; $display("max emulation error %f A", maxerr); end
    checks++;
    if (s2 == 0.0 || s1 / s2 < 0.9 || s1 / s2 > 1.1) begin
      failures++; $display("current/reference gain %f", (s2 == 0.0) ? 0.0 : s1 / s2);
    end
    checks++;
    // true slope: 5931 / 1.05 = 5649; M_L must have moved to within 2 %
    if (stat.ml < 16'd5536 || stat.ml > 16'd5762) begin
      failures++; $display("M_L ended at %0d, true value 5649", stat.ml);
    end
    $display("max emulation error %f A, gain %f, M_L %0d, first step correction %f A",
             maxerr, s1 / s2, stat.ml, kick_err);
    count("BCM switching cycles", n_bcm);
    count("CCM switching cycles", n_ccm);
    count("deadband entries", n_db);
    count("ADC samples", n_adc);
    count("HF deadtime clocks", n_dt);
    count("zero-current blocking", n_blk);
    count("calibrations applied", n_cal);
    count("M_L perturb-and-observe steps", n_inc + n_dec);
    $display("  calibrations aborted         %0d", n_abort);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
