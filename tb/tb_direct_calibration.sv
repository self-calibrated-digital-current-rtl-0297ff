// tb_direct_calibration: direct calibration against a sampled triangle
// current. The true current ramps with a random slope M_true * v'_L, up and
// down between random limits; a comparator sees it delayed by TD_CYC - 2
// clocks (the unit adds two synchroniser clocks). The emulated current is a
// reference copy of the emulator that starts with a random offset and uses
// M_L = 5931. Checked after every calibration: the emulated current equals
// the true one to within 2.5 clock steps; after every slope measurement:
// ml_est is within one sample of the crossing-to-crossing count of M_true;
// at least 20 calibrations and 10 measurements happen, in both ramp
// directions.
module tb_direct_calibration;
  import emu_pkg::*;
  localparam int TD = 8;
  localparam real A = 2.0 ** 24;
  logic clk = 0, rst_n = 0;
  logic cal_req, est_en, v_comp, cal_sel, busy, cal_done, cal_abort, ml_valid;
  cur_t i_ref, di, i_cal;
  logic [7:0]  step_codes;
  logic [15:0] timeout_cyc;
  vl_t  vl;
  ml_t  ml, ml_est;
  logic [DAC_BITS-1:0] dac_code;
  int   checks = 0, failures = 0, n_cal = 0, n_est = 0, n_up = 0, n_dn = 0;
  real  m_true, i_true, i_emu, dq[$], lim_hi, lim_lo;
  int   v_up, v_dn;
  bit   rising;
  real  nsamp;

  always #5 clk = ~clk;

  direct_calibration #(.TD_CYC(TD)) dut (.*);

  initial begin
    #20_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  assign ml = 16'(ML_DEFAULT);
  assign di = cur_t'(vl) * cur_t'(ml);

  // plant: true current, delayed comparator, emulator copy
  always @(posedge clk) begin
    real iref;
    if (rst_n) begin
      i_true = i_true + m_true * real'(vl) / A;
      if (cal_sel) i_emu = real'(i_cal) / A;
      else         i_emu = i_emu + real'(di) / A;
      if (rising && i_true > lim_hi) rising = 0;
      if (!rising && i_true < lim_lo) rising = 1;
    end
    vl <= rising ? vl_t'(v_up) : vl_t'(-v_dn);
    dq.push_back(i_true);
    iref = real'(int'(dac_code) - 512) / 8.0;
    if (dq.size() > TD - 2) v_comp <= (dq.pop_front() > iref);
  end

  always @(posedge clk) if (rst_n) begin
    if (cal_done) begin
      // cal_done follows the load by one clock: compare now
      n_cal++;
      checks++;
      if ((i_emu - i_true) > 2.5 * m_true * (v_up + v_dn) / A ||
          (i_true - i_emu) > 2.5 * m_true * (v_up + v_dn) / A) begin
        failures++;
        $display("cal: emu %f true %f", i_emu, i_true);
      end
      if (rising) n_up++; else n_dn++;
    end
    if (ml_valid) begin
      n_est++;
      nsamp = real'(step_codes) * 0.125 * A / (m_true * real'(dut.side ? v_dn : v_up));
      checks++;
      // one sample of the count between the crossings, plus rounding
      if (real'(ml_est) > m_true * (1.0 + 1.0 / nsamp) + 2.0 ||
          real'(ml_est) < m_true * (1.0 - 1.0 / nsamp) - 2.0) begin
        failures++;
        $display("ml_est %0d, true %f", ml_est, m_true);
      end
    end
  end

  initial begin
    cal_req = 0; est_en = 1; step_codes = 8'd16; timeout_cyc = 16'd4000;
    i_ref = '0; i_true = 0.0; i_emu = 0.0; rising = 1; vl = '0;
    v_up = 200; v_dn = 300; m_true = 5931.0; lim_hi = 10.0; lim_lo = -2.0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 40; t++) begin
      // new operating point
      m_true = 5000.0 + real'($urandom % 2000);
      v_up   = 40 + int'($urandom % 200);
      v_dn   = 40 + int'($urandom % 200);
      lim_lo = -2.0 + real'($urandom % 40) / 10.0;
      lim_hi = lim_lo + 14.0 + real'($urandom % 80) / 10.0;
      i_emu  = i_emu + real'(int'($urandom % 200) - 100) / 100.0;
      step_codes = 8'(32 + $urandom % 16);
      est_en = (t % 4) != 3;
      repeat (1000 + $urandom % 700) @(posedge clk);
      // first level within 1 A of mid-swing: the 4-6 A step fits either way
      i_ref = cur_t'(((lim_lo + lim_hi) / 2.0 - 1.0 +
                      real'($urandom % 20) / 10.0) * A);
      cal_req = 1;
      @(posedge clk);
      cal_req = 0;
      while (busy || cal_req) @(posedge clk);
      @(posedge clk);
    end
    checks++;
    if (n_cal < 20 || n_est < 10 || n_up == 0 || n_dn == 0) begin
      failures++;
      $display("cal %0d est %0d up %0d down %0d", n_cal, n_est, n_up, n_dn);
    end
    $display("cal %0d est %0d up %0d down %0d", n_cal, n_est, n_up, n_dn);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
