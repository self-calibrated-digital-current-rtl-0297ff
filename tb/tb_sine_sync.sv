// tb_sine_sync: a square-wave polarity input (line period P clocks) must
// give a locked sine in phase with it: after lock every output sample is
// compared with 32767 sin(2 pi t / P) measured from the last rising edge.
// The period then changes to check re-measurement, and the input stops to
// check that lock is lost. MIN_PERIOD is reduced to keep the run short.
module tb_sine_sync;
  logic clk = 0, rst_n = 0, vac_pos = 0;
  logic signed [15:0] sine;
  logic [31:0] phase;
  logic locked;
  int checks = 0, failures = 0, P = 10000, t = 0, maxv = 0;
  bit   gen = 1;
  real  ev, err, maxerr = 0;

  always #5 clk = ~clk;

  sine_sync #(.MIN_PERIOD(4000)) dut (.*);

  initial begin
    #20_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // line polarity: high for the first half of each period
  always @(negedge clk) if (rst_n) begin
    if (gen) begin
      t = (t + 1) % P;
      vac_pos = (t < P / 2);
    end else vac_pos = 0;
  end

  // the edge reaches the phase register 3 clocks after vac_pos rises
  // (2-flop synchroniser, edge register) and the sine 1 clock later
  task automatic compare(int n);
    for (int k = 0; k < n; k++) begin
      @(posedge clk); #1;
      ev  = 32767.0 * $sin(2.0 * 3.14159265358979 * real'((t - 4 + P) % P) / real'(P));
      err = real'(sine) - ev;
      if (err < 0) err = -err;
      if (err > maxerr) maxerr = err;
      if (int'(sine) > maxv) maxv = int'(sine);
      checks++;
      if (err > 120.0) begin
        failures++;
        if (failures < 10) $display("t=%0d sine=%0d exp %f", t, sine, ev);
      end
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    wait (locked);
    repeat (P) @(posedge clk);   // first period after lock started with inc = 0
    compare(3 * P);
    P = 12000;                    // slower line: wait two periods, re-check
    repeat (3 * P) @(posedge clk);
    compare(2 * P);
    checks++;
    if (maxv < 32700) begin failures++; $display("peak %0d", maxv); end
    gen = 0;                      // line lost
    repeat (5 * 4000) @(posedge clk);
    checks++;
    if (locked) begin failures++; $display("still locked"); end
    $display("max error %f LSB", maxerr);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
