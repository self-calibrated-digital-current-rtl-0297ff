// tb_inductor_emulator: the integrator against a 64-bit reference model.
// Random voltages and slopes, random calibration loads, and no_cross
// phases that must stop the current at zero instead of crossing it.
module tb_inductor_emulator;
  import emu_pkg::*;
  logic clk = 0, rst_n = 0;
  vl_t  vl;
  ml_t  ml;
  logic no_cross, cal_sel;
  cur_t i_cal, di, il;
  int checks = 0, failures = 0, clamps = 0;
  longint ref_il, step, nxt;

  always #5 clk = ~clk;

  inductor_emulator dut (.*);

  initial begin
    #1_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    vl = '0; ml = '0; no_cross = 0; cal_sel = 0; i_cal = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    ref_il = 0;
    for (int i = 0; i < 5000; i++) begin
      @(negedge clk);
      checks++;
      if (longint'(il) != ref_il) begin
        failures++;
        $display("i=%0d il=%0d exp %0d", i, il, ref_il);
      end
      vl       = vl_t'(int'($urandom % 1500) - 750);
      ml       = ML_DEFAULT + ml_t'($urandom % 200) - 100;
      no_cross = ((i / 300) % 2 == 1);
      cal_sel  = ($urandom % 40 == 0);
      i_cal    = cur_t'(int'($urandom % 400_000_000) - 200_000_000);
      if ((i % 300) == 299) begin      // start next phase near zero
        cal_sel = 1; i_cal = cur_t'(int'($urandom % 2_000_000) - 1_000_000);
      end
      #1;
      step = longint'(vl) * longint'(ml);
      checks++;
      if (longint'(di) != step) begin
        failures++; $display("di=%0d exp %0d", di, step);
      end
      nxt = ref_il + step;
      if (no_cross && ((ref_il >= 0 && nxt <= 0 && step < 0) ||
                       (ref_il <= 0 && nxt >= 0 && step > 0) || ref_il == 0)) begin
        nxt = 0;
        if (!cal_sel) clamps++;
      end
      ref_il = cal_sel ? longint'(i_cal) : nxt;
    end
    checks++;
    if (clamps < 10) begin failures++; $display("only %0d zero stops", clamps); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
