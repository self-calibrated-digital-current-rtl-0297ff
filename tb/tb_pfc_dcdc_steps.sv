// tb_pfc_dcdc_steps: the controller as a dc-dc boost converter, 120 V dc in,
// 175 V out, with average-current steps 0 -> 7 A -> 14 A -> 7 A and then
// disable, at the default parameters, around the behavioural power stage
// (true inductance 3 % above the emulator's value).
// A last phase widens the band to 16 A (about 116 kHz), where the 1 MHz
// sensor can follow the ramp, and switches to direct calibration with
// slope measurement: the emulated current must be within 0.3 A right after
// each direct calibration and the measured M_L within 1.5 % of the true
// value.
// Checked: after each step the emulated current enters the new hysteresis
// band within one switching period (500 clocks); from the second period on
// the true current's average over 20 us is within 0.5 A of the target; the
// emulated current stays within 1 A of the true one; calibrations happen;
// after disable all gates are off and the current has decayed to zero.
module tb_pfc_dcdc_steps;
  import emu_pkg::*;
  logic clk = 0, rst_n = 0;
  logic vac_cs_n, vac_sclk, vac_sdata, vlink_cs_n, vlink_sclk, vlink_sdata;
  logic vac_pos, v_comp;
  logic [9:0] dac_code;
  logic g_hs_hf, g_ls_hf, g_hs_lf, g_ls_lf;
  cfg_t    cfg;
  status_t stat;
  int checks = 0, failures = 0, n_cal = 0, n_dir = 0, n_meas = 0;
  real dir_err = 0.0;
  real err, maxerr = 0.0;
  localparam real A = 2.0 ** 24;

  always #5 clk = ~clk;

  pfc_emu_ctrl_top dut (.*);

  pfc_plant_model #(.L_H(19.8e-6 * 1.03), .VDC(120.0), .VLINK(175.0), .SNS_DLY(6)) plant (
    .clk, .g_hs_hf, .g_ls_hf, .g_hs_lf, .g_ls_lf, .dac_code,
    .vac_cs_n, .vac_sclk, .vac_sdata, .vlink_cs_n, .vlink_sclk, .vlink_sdata,
    .vac_pos, .v_comp
  );

  initial begin
    #2_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n && stat.mode != MODE_OFF) begin
    err = plant.il - real'(stat.il) / A;
    if (err > maxerr) maxerr = err;
    if (-err > maxerr) maxerr = -err;
    if (stat.cal_done) n_cal++;
    if (stat.ml_meas) n_meas++;
    if (stat.dir_done) begin
      n_dir++;
      // the load happened on the previous clock
      if (err > dir_err) dir_err = err;
      if (-err > dir_err) dir_err = -err;
    end
  end

  task automatic step_to(real amps);
    int  k;
    real sum, esum;
    cfg.i_amp = cur_t'(amps * A * 32768.0 / 32767.0);
    // wait for the thresholds to move, then for the current to enter the band
    repeat (2) @(posedge clk);
    k = 0;
    while (k < 2000 && !(stat.il < stat.th_hi && stat.il > stat.th_lo &&
           ((stat.il - stat.th_lo) < cur_t'(0.3 * A) || (stat.th_hi - stat.il) < cur_t'(0.3 * A)))) begin
      @(posedge clk); k++;
    end
    checks++;
    if (k > 500) begin failures++; $display("%f A: band reached after %0d clocks", amps, k); end
    else $display("step to %4.1f A: band reached after %0d clocks", amps, k);
    repeat (1000) @(posedge clk);
    sum = 0.0; esum = 0.0;
    for (int i = 0; i < 8000; i++) begin
      @(posedge clk); sum = sum + plant.il; esum = esum + real'(stat.il) / A;
    end
    checks++;
    $display("  true average %f A, emulated average %f A, M_L %0d", sum / 8000.0, esum / 8000.0, stat.ml);
    if (sum / 8000.0 > amps + 0.5 || sum / 8000.0 < amps - 0.5) failures++;
    repeat (3000) @(posedge clk);
  endtask

  initial begin
    cfg = '0;
    cfg.dc_mode      = 1'b1;
    cfg.i_bcm_th     = cur_t'(4.0 * A);
    cfg.i_zvs        = cur_t'(0.5 * A);
    cfg.ccm_band     = cur_t'(8.0 * A);
    cfg.db_vac       = vl_t'(20);
    cfg.cal_en       = 1'b1;
    cfg.cal_alt      = 1'b1;
    cfg.cal_interval = 8'd1;
    cfg.pno_en       = 1'b1;
    cfg.pno_n        = 8'd2;
    cfg.pno_delta    = 16'd30;
    cfg.cal_timeout  = 16'd3000;
    cfg.ml_init      = 16'(ML_DEFAULT);
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (300) @(posedge clk);          // first ADC samples
    cfg.en = 1'b1;
    step_to(7.0);
    step_to(14.0);
    step_to(7.0);
    // low-frequency operation with a 16 A band (about 116 kHz): the 1 MHz
    // sensor follows the ramp, so direct calibration and slope measurement
    // are used instead
    cfg.pno_en     = 1'b0;
    cfg.cal_alt    = 1'b0;
    cfg.ccm_band   = cur_t'(16.0 * A);
    cfg.dir_step   = 8'd40;              // 5 A
    cfg.dir_est    = 1'b1;
    cfg.cal_direct = 1'b1;
    step_to(10.0);
    repeat (20000) @(posedge clk);
    checks++;
    if (n_dir < 10 || n_meas < 5) begin
      failures++; $display("direct calibrations %0d, M_L measurements %0d", n_dir, n_meas);
    end
    checks++;
    if (dir_err > 0.3) begin failures++; $display("error after direct calibration %f A", dir_err); end
    checks++;
    if (real'(stat.ml) > 5931.0 / 1.03 * 1.015 || real'(stat.ml) < 5931.0 / 1.03 * 0.985) begin
      failures++; $display("measured M_L %0d, true %f", stat.ml, 5931.0 / 1.03);
    end
    $display("direct: %0d calibrations, %0d M_L measurements, M_L %0d (true %0.0f), max error after calibration %f A",
             n_dir, n_meas, stat.ml, 5931.0 / 1.03, dir_err);
    cfg.en = 1'b0;
    repeat (3000) @(posedge clk);
    checks++;
    if (g_hs_hf || g_ls_hf || g_hs_lf || g_ls_lf || plant.il != 0.0) begin
      failures++; $display("not off: current %f A", plant.il);
    end
    checks++;
    if (maxerr > 1.0) begin failures++; $display("max emulation error %f A", maxerr); end
    checks++;
    if (n_cal < 10) begin failures++; $display("%0d calibrations", n_cal); end
    $display("max emulation error %f A, %0d calibrations", maxerr, n_cal);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
