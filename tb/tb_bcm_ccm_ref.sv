// tb_bcm_ccm_ref: random sine, amplitude and line-voltage inputs; the
// registered thresholds, mode and polarity are compared with the formulas
// worked out here in 64-bit integers. All three modes must be seen.
module tb_bcm_ccm_ref;
  import emu_pkg::*;
  logic clk = 0, rst_n = 0, en;
  logic signed [15:0] sine;
  vl_t  vac, db_vac;
  cur_t i_amp, i_bcm_th, i_zvs, ccm_band, th_hi, th_lo, i_avg;
  cmode_e mode;
  logic pol;
  int checks = 0, failures = 0, n_off = 0, n_bcm = 0, n_ccm = 0;
  longint mag, avg, ehi, elo, vabs;
  cmode_e em;
  logic ep;

  always #5 clk = ~clk;

  bcm_ccm_ref dut (.*);

  initial begin
    #1_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    en = 0; sine = 0; vac = 0; db_vac = 20;
    i_amp = 0; i_bcm_th = 8 <<< 24; i_zvs = 1 <<< 23; ccm_band = 6 <<< 24;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      en    = ($urandom % 10 != 0);
      sine  = 16'($urandom);
      vac   = vl_t'(int'($urandom % 1000) - 500);
      i_amp = cur_t'($urandom % (30 << 24));
      mag  = (longint'(i_amp) * longint'(sine)) >>> 15;
      if (mag < 0) mag = -mag;
      ep   = (vac > 0);
      avg  = ep ? mag : -mag;
      vabs = (vac < 0) ? -longint'(vac) : longint'(vac);
      em   = (!en || vabs < longint'(db_vac)) ? MODE_OFF :
             (mag < longint'(i_bcm_th)) ? MODE_BCM : MODE_CCM;
      if (em == MODE_CCM) begin
        ehi = avg + longint'(ccm_band) / 2; elo = avg - longint'(ccm_band) / 2;
      end else if (ep) begin
        ehi = 2 * avg + longint'(i_zvs); elo = -longint'(i_zvs);
      end else begin
        ehi = longint'(i_zvs); elo = 2 * avg - longint'(i_zvs);
      end
      @(negedge clk);
      checks++;
      if (longint'(th_hi) != ehi || longint'(th_lo) != elo || mode != em ||
          pol != ep || longint'(i_avg) != avg) begin
        failures++;
        $display("i=%0d hi %0d/%0d lo %0d/%0d mode %0d/%0d", i, th_hi, ehi,
                 th_lo, elo, mode, em);
      end
      case (em) MODE_OFF: n_off++; MODE_BCM: n_bcm++; default: n_ccm++; endcase
    end
    checks++;
    if (n_off == 0 || n_bcm == 0 || n_ccm == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
