// tb_sensor_model: step response of the sensor replica. The output must
// stay at zero for the SNS_DLY = 5 clock delay, then follow
// y = I (1 - (15/16)^k) within rounding, reaching 63 % of the step after
// 16 +- 2 filter clocks (a 1 MHz pole at 100 MHz), and settle on the step.
// A random input is also checked against a 64-bit model of the recursion.
module tb_sensor_model;
  import emu_pkg::*;
  logic clk = 0, rst_n = 0;
  cur_t x, y;
  int checks = 0, failures = 0;
  real  expv, I;
  int   t63;
  longint m, q[$];

  always #5 clk = ~clk;

  sensor_model dut (.*);

  initial begin
    #1_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    x = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    repeat (3) @(posedge clk);
    I = 10.0 * 2.0**24;                  // 10 A step
    @(negedge clk) x = cur_t'(longint'(I));
    t63 = -1;
    for (int k = 1; k <= 400; k++) begin
      @(negedge clk);
      // first change after the delay line (5) and the filter register (1)
      expv = (k <= 5) ? 0.0 : I * (1.0 - (15.0/16.0)**(k - 5));
      checks++;
      if (real'(y) > expv + 64.0 || real'(y) < expv - 64.0 - 16.0 * (k - 5)) begin
        failures++; $display("k=%0d y=%0d exp %f", k, y, expv);
      end
      if (t63 < 0 && real'(y) >= 0.632 * I) t63 = k - 5;
    end
    checks++;
    if (t63 < 14 || t63 > 18) begin failures++; $display("63%% after %0d", t63); end
    checks++;
    if (real'(y) < I - 32.0) begin failures++; $display("not settled %0d", y); end

    // random input against a model of the recursion
    m = longint'(y);
    for (int k = 0; k < 6; k++) q.push_back(longint'(x));
    for (int k = 0; k < 2000; k++) begin
      @(negedge clk);
      m = m + ((q.pop_front() - m) >>> 4);
      checks++;
      if (longint'(y) != m) begin failures++; $display("rand k=%0d y=%0d exp %0d", k, y, m); end
      x = cur_t'(int'($urandom % 600_000_000) - 300_000_000);
      q.push_back(longint'(x));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
