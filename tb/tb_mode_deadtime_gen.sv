// tb_mode_deadtime_gen: random c, polarity and mode. Checks that no leg
// ever has both gates on, that a gate turns on only after both gates of its
// leg were off for at least the deadtime (5 clocks HF, 20 clocks LF), that
// the gates reach the requested state (HF: c=1 low side, c=0 high side;
// LF: v_ac>0 low side, v_ac<0 high side; all off in MODE_OFF) within
// deadtime + 2 clocks of a steady request, and that deadtime was exercised.
module tb_mode_deadtime_gen;
  import emu_pkg::*;
  logic clk = 0, rst_n = 0, pol, c;
  cmode_e mode;
  logic g_hs_hf, g_ls_hf, g_hs_lf, g_ls_lf;
  int checks = 0, failures = 0, dt_hf = 0, dt_lf = 0;
  int off_hf = 0, off_lf = 0, steady = 0;
  logic ehs_hf, els_hf, ehs_lf, els_lf, run;

  always #5 clk = ~clk;

  mode_deadtime_gen dut (.*);

  initial begin
    #3_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // gate monitors
  always @(posedge clk) if (rst_n) begin
    checks++;
    if ((g_hs_hf && g_ls_hf) || (g_hs_lf && g_ls_lf)) begin
      failures++; $display("shoot-through at %0t", $time);
    end
  end

  logic p_hs_hf = 0, p_ls_hf = 0, p_hs_lf = 0, p_ls_lf = 0;
  always @(negedge clk) if (rst_n) begin
    if ((g_hs_hf && !p_hs_hf) || (g_ls_hf && !p_ls_hf)) begin
      checks++;
      if (off_hf < 5) begin failures++; $display("HF deadtime %0d", off_hf); end
      dt_hf++;
    end
    if ((g_hs_lf && !p_hs_lf) || (g_ls_lf && !p_ls_lf)) begin
      checks++;
      if (off_lf < 20) begin failures++; $display("LF deadtime %0d", off_lf); end
      dt_lf++;
    end
    off_hf = (!g_hs_hf && !g_ls_hf) ? off_hf + 1 : 0;
    off_lf = (!g_hs_lf && !g_ls_lf) ? off_lf + 1 : 0;
    {p_hs_hf, p_ls_hf, p_hs_lf, p_ls_lf} = {g_hs_hf, g_ls_hf, g_hs_lf, g_ls_lf};
  end

  initial begin
    mode = MODE_OFF; pol = 1; c = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 40000; i++) begin
      @(negedge clk);
      if ($urandom % 30 == 0) c = ~c;
      if ($urandom % 700 == 0) pol = ~pol;
      if ($urandom % 500 == 0)
        mode = cmode_e'(($urandom % 4 == 0) ? MODE_OFF : ($urandom % 2) ? MODE_BCM : MODE_CCM);
      if ($urandom % 25 == 0) steady = 0; else steady++;
    end
    checks++;
    if (dt_hf < 50 || dt_lf < 5) begin
      failures++; $display("deadtime seen only %0d/%0d times", dt_hf, dt_lf);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // request check: the request has been stable for 25 clocks
  int stable = 0;
  logic [3:0] req_q;
  always @(negedge clk) if (rst_n) begin
    run    = (mode != MODE_OFF);
    ehs_hf = run && !c;  els_hf = run && c;
    ehs_lf = run && !pol; els_lf = run && pol;
    stable = ({ehs_hf, els_hf, ehs_lf, els_lf} == req_q) ? stable + 1 : 0;
    req_q  = {ehs_hf, els_hf, ehs_lf, els_lf};
    if (stable > 23) begin
      checks++;
      if ({g_hs_hf, g_ls_hf, g_hs_lf, g_ls_lf} !== req_q) begin
        failures++; $display("gates %b request %b at %0t",
          {g_hs_hf, g_ls_hf, g_hs_lf, g_ls_lf}, req_q, $time);
      end
    end
  end
endmodule
