// pfc_emu_ctrl_top: digital controller of an all-GaN totem-pole PFC stage
// with a self-calibrated inductor-current emulator.
//
// Instead of sensing the inductor current at the switching frequency, the
// controller integrates the inductor voltage every 10 ns (inductor_emulator)
// from the sampled line and link voltages (adc_serial_rx, inductor_voltage)
// and from its own gate commands (switch_state_decode). The emulated
// current drives a variable-frequency hysteretic current-mode controller
// (bcm_ccm_ref, hyst_comparator, mode_deadtime_gen) that follows a
// line-synchronised sine (sine_sync) and moves between BCM and CCM by
// itself. A 1 MHz Hall-effect sensor with an analog comparator against a
// DAC level is used only now and then to correct the emulator
// (sensor_model, calibration_unit), including the slope M_L = T_comp / L.
//
// Calibration scheduling (this design's own): while cal_en is set and the
// converter runs, a calibration is requested at the start of every
// cal_interval-th switching cycle (rising c), optionally only in BCM where
// the switching frequency is lowest, with the present average-current
// reference as the DAC level, since the ripple passes it on every edge.
// With cal_alt set, every other calibration uses the level halfway between
// the average and the upper threshold instead. Calibrations at one level
// cannot see a wrong slope M_L (the ripple returns to the same point every
// cycle); alternating two levels makes the slope error show in i_err with
// the sign of the level change, which the perturb-and-observe rule of the
// calibration unit uses.
//
// With cal_direct set, the same requests go to direct_calibration instead:
// for operation at a switching frequency low enough for the sensor to
// follow the ramp, it sets the current from the comparator edge alone and,
// with dir_est, measures M_L between two DAC levels and loads it.
//
// Ports: ADC serial pins for v_ac and V_link, the line-polarity comparator
// vac_pos, the calibration comparator v_comp (i_sns > i_ref), the DAC code,
// the four gate signals, a settings struct and a status struct (emu_pkg).
// Setting dc_mode runs the same hardware as a dc-dc boost converter from a
// positive dc input with a constant current reference (i_amp * 32767/32768).
// One clock is one 10 ns computation interval; the clock must be 100 MHz
// for the default M_L and timing parameters to hold.
module pfc_emu_ctrl_top
  import emu_pkg::*;
#(
  parameter int SAMPLE_DIV = 100,          // ADC: 1 MHz at 100 MHz clock
  parameter int MIN_PERIOD = 1_250_000,    // line: ignore crossings < 12.5 ms
  parameter int DRV_DLY    = 5,            // gate-driver delay, clocks
  parameter int DT_HF      = 5,            // HF-leg deadtime, clocks
  parameter int DT_LF      = 20,           // LF-leg deadtime, clocks
  parameter int SNS_DLY    = 5,            // sensor delay, clocks
  parameter int LPF_SHIFT  = 4,            // sensor pole ~1 MHz
  parameter int TD_CYC     = 6,            // comparator + synchroniser delay
  parameter int TD_DIRECT  = 26,           // direct: TD_CYC + SNS_DLY + lag
  parameter int SETTLE_CYC = 50            // DAC settling, clocks
) (
  input  logic                clk,          // 100 MHz
  input  logic                rst_n,
  // line and link voltage ADCs
  output logic                vac_cs_n,
  output logic                vac_sclk,
  input  logic                vac_sdata,
  output logic                vlink_cs_n,
  output logic                vlink_sclk,
  input  logic                vlink_sdata,
  // comparators
  input  logic                vac_pos,      // v_ac > 0
  input  logic                v_comp,       // i_sns > i_ref
  // reference DAC of the calibration comparator
  output logic [DAC_BITS-1:0] dac_code,
  // gate commands
  output logic                g_hs_hf,
  output logic                g_ls_hf,
  output logic                g_hs_lf,
  output logic                g_ls_lf,
  // settings and status
  input  cfg_t                cfg,
  output status_t             stat
);

  logic [ADC_BITS-1:0] vac_code, vlink_code;
  logic                vac_valid, vlink_valid;
  logic signed [15:0]  sine;
  logic [31:0]         phase;
  logic                locked;
  cur_t                th_hi, th_lo, i_avg, il, di, isns, i_cal, i_err;
  cmode_e              mode;
  logic                pol, c, run;
  logic                s_hf, s_lf, no_cross;
  vl_t                 vl, vac;
  ml_t                 ml;
  logic                cal_sel, cal_busy, cal_done, cal_abort, ml_inc, ml_dec;
  logic                set_hit, rst_hit;
  logic                cal_req;
  // the two calibration methods share the DAC and the emulator load port
  logic [DAC_BITS-1:0] c_dac, d_dac;
  logic                c_sel, d_sel, c_busy, d_busy, d_done, d_abort;
  cur_t                c_ical, d_ical;
  ml_t                 ml_meas;
  logic                ml_meas_v;

  // ------------------------------------------------------------ sensing
  adc_serial_rx #(.ADC_BITS(ADC_BITS), .SAMPLE_DIV(SAMPLE_DIV)) u_adc_vac (
    .clk, .rst_n, .cs_n(vac_cs_n), .sclk(vac_sclk), .sdata(vac_sdata),
    .sample(vac_code), .valid(vac_valid)
  );

  adc_serial_rx #(.ADC_BITS(ADC_BITS), .SAMPLE_DIV(SAMPLE_DIV)) u_adc_vlink (
    .clk, .rst_n, .cs_n(vlink_cs_n), .sclk(vlink_sclk), .sdata(vlink_sdata),
    .sample(vlink_code), .valid(vlink_valid)
  );

  sine_sync #(.MIN_PERIOD(MIN_PERIOD)) u_sine (
    .clk, .rst_n, .vac_pos, .sine, .phase, .locked
  );

  // ------------------------------------------------ current-mode control
  // In dc_mode the stage runs as a dc-dc boost from a positive dc input:
  // the reference is the constant i_amp and no line lock is needed.
  logic signed [15:0] ref_sine;
  assign ref_sine = cfg.dc_mode ? 16'sd32767 : sine;

  bcm_ccm_ref u_ref (
    .clk, .rst_n, .en(cfg.en && (locked || cfg.dc_mode)), .sine(ref_sine), .vac,
    .i_amp(cfg.i_amp), .i_bcm_th(cfg.i_bcm_th), .i_zvs(cfg.i_zvs),
    .ccm_band(cfg.ccm_band), .db_vac(cfg.db_vac),
    .th_hi, .th_lo, .i_avg, .mode, .pol
  );

  assign run = (mode != MODE_OFF);

  hyst_comparator u_hyst (
    .clk, .rst_n, .run, .pol, .il, .th_hi, .th_lo, .c, .set_hit, .rst_hit
  );

  mode_deadtime_gen #(.DT_HF(DT_HF), .DT_LF(DT_LF)) u_gate (
    .clk, .rst_n, .mode, .pol, .c, .g_hs_hf, .g_ls_hf, .g_hs_lf, .g_ls_lf
  );

  // -------------------------------------------------- inductor emulation
  switch_state_decode #(.DRV_DLY(DRV_DLY)) u_state (
    .clk, .rst_n, .g_hs_hf, .g_ls_hf, .g_hs_lf, .g_ls_lf,
    .il_pos(il > 0), .il_neg(il < 0), .s_hf, .s_lf, .no_cross
  );

  inductor_voltage u_vl (
    .vac_code, .vlink_code, .s_lf, .s_hf, .vl, .vac
  );

  inductor_emulator u_emu (
    .clk, .rst_n, .vl, .ml, .no_cross, .cal_sel, .i_cal, .di, .il
  );

  sensor_model #(.SNS_DLY(SNS_DLY), .LPF_SHIFT(LPF_SHIFT)) u_sns (
    .clk, .rst_n, .x(il), .y(isns)
  );

  // ------------------------------------------------ calibration schedule
  logic       c_q;
  logic [7:0] cyc_cnt;
  logic       alt;
  cur_t       cal_lvl;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      c_q     <= 1'b0;
      cyc_cnt <= '0;
      cal_req <= 1'b0;
      alt     <= 1'b0;
      cal_lvl <= '0;
    end else begin
      c_q     <= c;
      cal_req <= 1'b0;
      cal_lvl <= (cfg.cal_alt && alt) ? i_avg + ((th_hi - i_avg) >>> 1) : i_avg;
      if (cal_req) alt <= !alt;
      if (!run) begin
        cyc_cnt <= '0;
      end else if (c && !c_q) begin
        if (cyc_cnt + 1'b1 >= cfg.cal_interval) begin
          cyc_cnt <= '0;
          cal_req <= cfg.cal_en && !cal_busy &&
                     (!cfg.cal_bcm_only || mode == MODE_BCM);
        end else begin
          cyc_cnt <= cyc_cnt + 1'b1;
        end
      end
    end
  end

  // indirect calibration (low-bandwidth sensor) and owner of M_L; a
  // direct slope measurement is loaded into it
  calibration_unit #(.TD_CYC(TD_CYC), .SETTLE_CYC(SETTLE_CYC)) u_cal (
    .clk, .rst_n,
    .cal_en(cfg.cal_en && run && !cfg.cal_direct), .cal_req, .i_ref(cal_lvl),
    .timeout_cyc(cfg.cal_timeout), .pno_en(cfg.pno_en), .pno_n(cfg.pno_n),
    .pno_delta(cfg.pno_delta),
    .ml_init(ml_meas_v ? ml_meas : cfg.ml_init),
    .ml_load(cfg.ml_load || ml_meas_v),
    .vl, .il, .di, .isns_emu(isns), .v_comp, .dac_code(c_dac),
    .cal_sel(c_sel), .i_cal(c_ical), .ml, .busy(c_busy), .cal_done,
    .cal_abort, .i_err, .ml_inc, .ml_dec
  );

  // direct calibration, for a sensor that follows the ramp (low switching
  // frequency); the delay covers sensor delay, filter lag and comparator
  direct_calibration #(.TD_CYC(TD_DIRECT), .SETTLE_CYC(SETTLE_CYC)) u_dcal (
    .clk, .rst_n,
    .cal_req(cal_req && cfg.cal_direct), .i_ref(cal_lvl),
    .step_codes(cfg.dir_step), .est_en(cfg.dir_est),
    .timeout_cyc(cfg.cal_timeout), .vl, .di, .ml, .v_comp,
    .dac_code(d_dac), .cal_sel(d_sel), .i_cal(d_ical), .busy(d_busy),
    .cal_done(d_done), .cal_abort(d_abort), .ml_est(ml_meas),
    .ml_valid(ml_meas_v)
  );

  // a calibration already running keeps its DAC level to the end
  assign dac_code = d_busy ? d_dac : c_dac;
  assign cal_sel  = c_sel || d_sel;
  assign i_cal    = d_sel ? d_ical : c_ical;
  assign cal_busy = c_busy || d_busy;

  // ------------------------------------------------------------- status
  assign stat = '{il: il, isns: isns, th_hi: th_hi, th_lo: th_lo,
                  i_err: i_err, ml: ml, mode: mode, c: c, locked: locked,
                  cal_busy: cal_busy, cal_done: cal_done,
                  cal_abort: cal_abort || d_abort, ml_inc: ml_inc,
                  ml_dec: ml_dec, dir_done: d_done, ml_meas: ml_meas_v};

endmodule
