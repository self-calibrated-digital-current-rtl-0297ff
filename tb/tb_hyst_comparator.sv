// tb_hyst_comparator: a triangle current between random thresholds. The
// latch must set when i'_L reaches th_lo, reset when it reaches th_hi,
// hold in between, and preset to pol while run is low; checked against
// a reference SR model, including the number of switching cycles. A second
// phase places i'_L exactly on and just around each threshold.
module tb_hyst_comparator;
  import emu_pkg::*;
  logic clk = 0, rst_n = 0, run, pol, c, set_hit, rst_hit;
  cur_t il, th_hi, th_lo;
  int checks = 0, failures = 0, rises = 0;
  logic ec, cq;

  always #5 clk = ~clk;

  hyst_comparator dut (.*);

  initial begin
    #2_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    run = 0; pol = 1; il = 0; th_hi = 5 <<< 24; th_lo = -(1 <<< 23);
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    ec = pol;
    cq = ec;
    checks++;
    if (c !== ec) failures++;
    run = 1;
    for (int i = 0; i < 20000; i++) begin
      // plant: current follows the command
      il = il + (c ? cur_t'(300_000) : -cur_t'(450_000));
      if (i % 4000 == 3999) begin
        th_hi = cur_t'($urandom % (10 << 24)) + (1 <<< 24);
        th_lo = th_hi - cur_t'($urandom % (8 << 24)) - (1 <<< 22);
      end
      run = (i % 5000) < 4900;
      pol = (i / 5000) % 2 == 0;
      if (!run) ec = pol;
      else if (il >= th_hi) ec = 0;
      else if (il <= th_lo) ec = 1;
      @(negedge clk);
      checks++;
      if (c !== ec) begin failures++; $display("i=%0d il=%0d c=%b exp %b", i, il, c, ec); end
      if (run && c && !cq) rises++;
      cq = c;
    end
    // second phase: currents placed right at and around the thresholds,
    // including exact equality, to check the comparison edges
    run = 1;
    for (int i = 0; i < 4000; i++) begin
      il = (($urandom % 2) ? th_hi : th_lo) + cur_t'(int'($urandom % 257) - 128) * 1024;
      if ($urandom % 4 == 0) il = ($urandom % 2) ? th_hi : th_lo;
      if (il >= th_hi) ec = 0;
      else if (il <= th_lo) ec = 1;
      @(negedge clk);
      checks++;
      if (c !== ec) begin failures++; $display("edge il=%0d c=%b exp %b", il, c, ec); end
    end
    checks++;
    if (rises < 20) begin failures++; $display("only %0d cycles", rises); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
