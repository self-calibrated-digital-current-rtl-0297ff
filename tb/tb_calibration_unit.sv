// tb_calibration_unit: drives the calibration unit with synthetic ramps.
// The emulated sensor output rises or falls with a fixed v'_L; the "real"
// sensor output is the same ramp shifted by a known error Err, and the
// comparator output is that signal against the DAC level, delayed by 4
// clocks (plus the unit's 2-flop synchroniser = TD_CYC 6). Each calibration
// must return i_err within 1.5 emulator steps of Err, with the right sign,
// for rising and falling slopes and for either crossing order; i_cal must
// equal i'_L + M_L v'_L + i_err in the cal_sel clock; the DAC code must
// encode i_ref. Then the perturb-and-observe rule, with the level rising
// from one calibration to the next: 3 positive errors raise M_L by Delta,
// 3 negative lower it, a mixed batch leaves it alone; calibrations at an
// unchanged level are not counted; with the level falling, 3 positive
// errors lower M_L. Finally
// a comparator that never crosses must abort after the timeout.
module tb_calibration_unit;
  import emu_pkg::*;
  logic clk = 0, rst_n = 0;
  logic cal_en, cal_req, pno_en, ml_load, v_comp;
  logic [15:0] timeout_cyc;
  logic [7:0]  pno_n;
  ml_t  pno_delta, ml_init, ml;
  vl_t  vl;
  cur_t i_ref, il, di, isns_emu, i_cal, i_err;
  logic [9:0] dac_code;
  logic cal_sel, busy, cal_done, cal_abort, ml_inc, ml_dec;
  int checks = 0, failures = 0, n_inc = 0, n_dec = 0, n_abort = 0;

  always #5 clk = ~clk;

  calibration_unit dut (.*);

  initial begin
    #5_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n) begin
    if (ml_inc) n_inc++;
    if (ml_dec) n_dec++;
    if (cal_abort) n_abort++;
  end

  // synthetic emulator and sensor
  longint emu, err_true;
  longint rq[$];                 // real sensor output history
  int     V;
  cur_t   IREF = 5 <<< 24;
  assign i_ref = IREF;

  always @(negedge clk) begin
    vl       = vl_t'(V);
    di       = cur_t'(V) * cur_t'({16'd0, ml});
    // ramp, held once it is far past the reference
    if ((emu - longint'(IREF)) < (20 <<< 24) && (longint'(IREF) - emu) < (20 <<< 24))
      emu = emu + longint'(di);
    isns_emu = cur_t'(emu);
    il       = cur_t'(emu + (1 <<< 20));
    rq.push_back(emu + err_true);
    if (rq.size() > 5) void'(rq.pop_front());
    v_comp   = (rq[0] > longint'(IREF));
  end

  task automatic run_cal(int v, real err_a, int expect_ok, real iref_a = 5.0);
    longint got, tol;
    bit seen;
    IREF     = cur_t'(iref_a * 2.0**24);
    V        = v;
    err_true = longint'(err_a * 2.0**24);
    // start 120 steps away from the reference, beyond the settling time
    emu      = longint'(IREF) - longint'(v) * 5931 * 120;
    rq.delete();
    @(negedge clk);
    cal_req = 1;
    @(negedge clk);
    cal_req = 0;
    seen = 0;
    for (int k = 0; k < 3000 && !seen; k++) begin
      @(posedge clk); #1;
      if (cal_sel) begin
        seen = 1;
        got  = longint'(i_err);
        checks++;
        if (i_cal !== il + di + i_err) begin
          failures++; $display("i_cal %0d != %0d", i_cal, il + di + i_err);
        end
        checks++;
        tol = 3 * ((di < 0) ? -longint'(di) : longint'(di)) / 2 + 1;
        if (got - err_true > tol || err_true - got > tol) begin
          failures++;
          $display("v=%0d err %f A: got %f A", v, err_a, real'(got) / 2.0**24);
        end
      end
      if (cal_abort) break;
    end
    checks++;
    if (seen != expect_ok) begin
      failures++; $display("v=%0d err %f: calibration %s", v, err_a, seen ? "applied" : "missing");
    end
    repeat (3) @(negedge clk);
  endtask

  initial begin
    cal_en = 0; cal_req = 0; pno_en = 0; ml_load = 0; V = 0; emu = 0; err_true = 0;
    timeout_cyc = 16'd2000; pno_n = 8'd3; pno_delta = 16'd100; ml_init = 16'd5931;
    repeat (2) @(posedge clk);
    rst_n = 1;
    cal_en = 1;
    @(negedge clk);
    checks++;
    if (ml != ML_DEFAULT) begin failures++; $display("M_L reset %0d", ml); end
    // accuracy: both slopes, both error signs, both crossing orders
    run_cal( 100,  0.5, 1);
    checks++;
    if (dac_code != 10'd552) begin failures++; $display("dac %0d", dac_code); end
    run_cal( 100, -0.5, 1);
    run_cal(-150,  0.7, 1);
    run_cal(-150, -0.7, 1);
    run_cal( 300,  0.0, 1);
    run_cal( 200,  0.02, 1);   // inside the comparator delay window
    // perturb and observe
    pno_en = 1;
    // (errors are observed with the sign of the change of the level)
    run_cal(100, 0.4, 1, 5.5); run_cal(120, 0.3, 1, 6.0); run_cal(-100, 0.5, 1, 6.5);
    checks++;
    if (ml != 16'd6031 || n_inc != 1) begin failures++; $display("after + batch M_L %0d", ml); end
    run_cal(100, -0.4, 1, 7.0); run_cal(-90, -0.3, 1, 7.5); run_cal(100, -0.5, 1, 8.0);
    checks++;
    if (ml != 16'd5931 || n_dec != 1) begin failures++; $display("after - batch M_L %0d inc %0d dec %0d", ml, n_inc, n_dec); end
    run_cal(100, 0.4, 1, 8.5); run_cal(100, -0.3, 1, 9.0); run_cal(100, 0.5, 1, 9.5);
    checks++;
    if (ml != 16'd5931 || n_inc != 1 || n_dec != 1) begin
      failures++; $display("after mixed batch M_L %0d", ml);
    end
    // an unchanged level is not observed
    run_cal(100, 0.4, 1, 9.5); run_cal(100, 0.4, 1, 9.5); run_cal(100, 0.4, 1, 9.5);
    // falling level: positive errors mean the slope is too large
    run_cal(100, 0.4, 1, 9.0); run_cal(-100, 0.3, 1, 8.5); run_cal(100, 0.5, 1, 8.0);
    checks++;
    if (ml != 16'd5831 || n_inc != 1 || n_dec != 2) begin
      failures++; $display("after falling batch M_L %0d", ml);
    end
    // reload of the initial guess
    ml_init = 16'd6500; ml_load = 1; @(negedge clk); ml_load = 0;
    checks++;
    if (ml != 16'd6500) begin failures++; $display("load M_L %0d", ml); end
    // real current far above: comparator never crosses, must abort
    pno_en = 0;
    run_cal(100, 10.0, 0);
    checks++;
    if (n_abort != 1) begin failures++; $display("aborts %0d", n_abort); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
