// tb_adc_serial_rx: checks the serial ADC master against a behavioural ADC.
// Random codes are offered at every conversion; each held sample must equal
// the code latched when its frame started, 'valid' must come exactly every
// SAMPLE_DIV = 100 clocks (1 MHz at 100 MHz), and cs_n must stay low for
// FRAME_BITS * SCLK_DIV clocks.
module tb_adc_serial_rx;
  logic clk = 0, rst_n = 0;
  logic cs_n, sclk, sdata, valid;
  logic [9:0] sample, code;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  adc_serial_rx dut (.clk, .rst_n, .cs_n, .sclk, .sdata, .sample, .valid);
  adc_model     adc (.cs_n, .sclk, .code, .sdata);

  initial begin
    #2_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [9:0] expq[$];
  always @(negedge cs_n) if (rst_n) expq.push_back(code);
  always @(posedge clk) if (!cs_n) code <= 10'($urandom);

  int  last_valid = -1, cyc = 0, cs_low = 0, nval = 0;
  logic [9:0] e;
  always @(posedge clk) if (rst_n) begin
    cyc++;
    if (!cs_n) cs_low++;
    if (cs_n && cs_low != 0) begin
      checks++;
      if (cs_low != 64) begin failures++; $display("cs_n low %0d clocks", cs_low); end
      cs_low = 0;
    end
    if (valid) begin
      e = expq.pop_front();
      checks++;
      if (sample !== e) begin
        failures++; $display("sample %h expected %h", sample, e);
      end
      if (last_valid >= 0) begin
        checks++;
        if (cyc - last_valid != 100) begin
          failures++; $display("valid spacing %0d", cyc - last_valid);
        end
      end
      last_valid = cyc;
      nval++;
    end
  end

  initial begin
    code = 10'h2a5;
    repeat (3) @(posedge clk);
    rst_n = 1;
    wait (nval == 200);
    @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
