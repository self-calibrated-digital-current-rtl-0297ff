// inductor_voltage: estimated inductor voltage of the totem pole, eq. v'_L.
//
//   v'_L[n] = v_ac[n] + (S_LF[n] - S_HF[n]) * V_link[n]
//
// Resistive drops are left out, as in the design (under 100 mOhm in the
// current path). Both voltages come from 10-bit ADCs in LSBs of about 0.7 V:
// v_ac is offset binary (code 512 = 0 V, the converter sees the divided line
// voltage shifted to mid-scale), V_link is straight binary. The result is a
// signed number of ADC LSBs. Purely combinational; the sample-and-hold
// registers of the ADC masters keep the inputs steady between samples.
// The offset-binary coding of v_ac is this design's own choice.
module inductor_voltage
  import emu_pkg::*;
(
  input  logic [ADC_BITS-1:0] vac_code,    // offset binary
  input  logic [ADC_BITS-1:0] vlink_code,  // straight binary
  input  logic                s_lf,
  input  logic                s_hf,
  output vl_t                 vl,          // v'_L[n]
  output vl_t                 vac          // signed v_ac[n]
);

  vl_t vlink;

  always_comb begin
    vac   = vl_t'($signed({1'b0, vac_code})) - vl_t'(1 << (ADC_BITS - 1));
    vlink = vl_t'($signed({1'b0, vlink_code}));
    unique case ({s_lf, s_hf})
      2'b10:   vl = vac + vlink;
      2'b01:   vl = vac - vlink;
      default: vl = vac;
    endcase
  end

endmodule
