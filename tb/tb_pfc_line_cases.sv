// tb_pfc_line_cases: the ac-dc operating points of the converter, run side
// by side at the controller's default parameters, each with its own power
// stage (pfc_case_harness):
//   120 V rms into 300 V and 210 V rms into 400 V, both at 12 A rms;
//   240 V rms into 450 V at 4 kW (23.6 A peak).
// Each case checks its own lock, emulation error, current shaping, BCM,
// CCM, deadband, calibrations and CCM switching frequency, and reports the
// THD of its line current over the first 20 harmonics. The 4 kW case must
// stay below the 10.3 % the document reports at that power (its measured
// figure also contains effects this ideal power stage lacks, so the
// simulated value is lower). The bench fails if any case fails or does
// not finish.
module tb_pfc_line_cases;
  logic clk = 0, rst_n = 0;
  int   ck [3], fl [3];
  logic dn [3];
  int   checks, failures;

  always #5 clk = ~clk;

  pfc_case_harness #(.NAME("120V-300V-12A"), .VAC_RMS(120.0), .VLINK(300.0),
                     .I_PEAK(16.97), .PHI0(0.3)) c0 (
    .clk, .rst_n, .checks(ck[0]), .failures(fl[0]), .done(dn[0]));
  pfc_case_harness #(.NAME("210V-400V-12A"), .VAC_RMS(210.0), .VLINK(400.0),
                     .I_PEAK(16.97), .PHI0(-1.0)) c1 (
    .clk, .rst_n, .checks(ck[1]), .failures(fl[1]), .done(dn[1]));
  pfc_case_harness #(.NAME("240V-450V-4kW"), .VAC_RMS(240.0), .VLINK(450.0),
                     .I_PEAK(23.57), .PHI0(2.0), .THD_MAX(0.103)) c2 (
    .clk, .rst_n, .checks(ck[2]), .failures(fl[2]), .done(dn[2]));

  initial begin
    #80_000_000;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", ck[0] + ck[1] + ck[2] + 1,
             fl[0] + fl[1] + fl[2] + 1);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    wait (dn[0] && dn[1] && dn[2]);
    checks   = ck[0] + ck[1] + ck[2];
    failures = fl[0] + fl[1] + fl[2];
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
