// emu_pkg: number formats and defaults shared by the current-emulator and
// hysteretic current-mode control blocks.
//
// All arithmetic runs on a 100 MHz clock, so one clock cycle is one
// computation interval T_comp = 10 ns, as in the emulator of the design.
// Voltages are carried in ADC LSBs (about 0.7 V each, 10-bit converters).
// Currents are signed fixed point with CUR_FRAC fractional bits of an ampere.
// The slope parameter M_L = T_comp / L is held as an unsigned integer in
// units of (current LSB) per (voltage LSB); its default is worked out from the
// 6 x 3.3 uH line inductance, T_comp = 10 ns and V_LSB = 0.7 V:
//   10 ns / 19.8 uH * 0.7 V = 353.5 uA per step per LSB = 5931 * 2^-24 A.
// The ADC full scale and current-unit choices are this design's own.
package emu_pkg;

  localparam int ADC_BITS   = 10;               // serial ADC resolution
  localparam int VL_BITS    = 12;               // signed v'_L in ADC LSBs
  localparam int CUR_BITS   = 32;               // signed current word
  localparam int CUR_FRAC   = 24;               // fractional bits (A)
  localparam int ML_BITS    = 16;               // unsigned slope parameter
  localparam int DAC_BITS   = 10;               // reference DAC resolution
  localparam int DAC_SHIFT  = CUR_FRAC - 3;     // DAC LSB = 1/8 A, +-64 A

  localparam int ML_DEFAULT = 5931;             // 10 ns / 19.8 uH * 0.7 V

  typedef logic signed [VL_BITS-1:0]  vl_t;
  typedef logic signed [CUR_BITS-1:0] cur_t;
  typedef logic        [ML_BITS-1:0]  ml_t;

  // Conduction mode of the hysteretic controller.
  typedef enum logic [1:0] {
    MODE_OFF = 2'd0,   // deadband or disabled: all switches off
    MODE_BCM = 2'd1,   // boundary conduction, valley slightly negative
    MODE_CCM = 2'd2    // continuous conduction, fixed hysteresis band
  } cmode_e;

  // Run-time settings of the controller, normally written by a host or
  // fixed at build time.
  typedef struct packed {
    logic        en;            // converter enable
    logic        dc_mode;       // dc-dc boost: constant reference i_amp
    cur_t        i_amp;         // peak of the sinusoidal average current
    cur_t        i_bcm_th;      // BCM below, CCM above this average current
    cur_t        i_zvs;         // negative valley overshoot in BCM
    cur_t        ccm_band;      // CCM peak-to-valley hysteresis band
    vl_t         db_vac;        // deadband: |v_ac| below this, in ADC LSBs
    logic        cal_en;        // calibrations allowed
    logic        cal_bcm_only;  // calibrate only in BCM (lowest frequency)
    logic        cal_alt;       // alternate the level: mid, then 3/4 ripple
    logic [7:0]  cal_interval;  // switching cycles between calibrations
    logic [15:0] cal_timeout;   // clocks allowed per calibration stage
    logic        pno_en;        // perturb-and-observe on M_L
    logic [7:0]  pno_n;         // N: calibrations per observation batch
    ml_t         pno_delta;     // Delta: M_L step
    ml_t         ml_init;       // initial guess for M_L
    logic        ml_load;       // load ml_init into M_L
    logic        cal_direct;    // use direct calibration (fast sensor path)
    logic        dir_est;       // direct: also measure M_L
    logic [7:0]  dir_step;      // direct: second level offset, DAC codes
  } cfg_t;

  // Observed state, for monitoring.
  typedef struct packed {
    cur_t        il;            // emulated inductor current i'_L
    cur_t        isns;          // emulated sensor output i'_sns
    cur_t        th_hi;         // upper threshold
    cur_t        th_lo;         // lower threshold
    cur_t        i_err;         // last calibration correction
    ml_t         ml;            // slope parameter in use
    cmode_e      mode;
    logic        c;             // switching command c[n]
    logic        locked;        // sine reference locked to the line
    logic        cal_busy;
    logic        cal_done;      // pulse: calibration applied
    logic        cal_abort;     // pulse: calibration timed out
    logic        ml_inc;        // pulse: M_L increased by Delta
    logic        ml_dec;        // pulse: M_L decreased by Delta
    logic        dir_done;      // pulse: direct calibration applied
    logic        ml_meas;       // pulse: M_L measured and loaded (direct)
  } status_t;

endpackage
