// tb_inductor_voltage: random and corner codes for v'_L = v_ac + (S_LF -
// S_HF) V_link, with v_ac offset binary around code 512.
module tb_inductor_voltage;
  import emu_pkg::*;
  logic [9:0] vac_code, vlink_code;
  logic s_lf, s_hf;
  vl_t  vl, vac;
  int checks = 0, failures = 0;
  int e_vac, e_vl;

  inductor_voltage dut (.vac_code, .vlink_code, .s_lf, .s_hf, .vl, .vac);

  initial begin
    #1_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 4000; i++) begin
      vac_code   = (i < 4) ? ((i % 2) ? 10'h3ff : 10'h000) : 10'($urandom);
      vlink_code = (i < 4) ? ((i / 2) ? 10'h3ff : 10'h000) : 10'($urandom);
      {s_lf, s_hf} = 2'($urandom);
      #1;
      e_vac = int'(vac_code) - 512;
      e_vl  = e_vac + (int'(s_lf) - int'(s_hf)) * int'(vlink_code);
      checks++;
      if (int'(vl) != e_vl || int'(vac) != e_vac) begin
        failures++;
        $display("vac=%0d vlink=%0d s=%b%b: vl=%0d exp %0d", vac_code, vlink_code,
                 s_lf, s_hf, vl, e_vl);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
