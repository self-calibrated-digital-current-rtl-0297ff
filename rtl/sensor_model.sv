// sensor_model: digital replica of the Hall-effect current sensor.
//
// The sensor used for calibration has about 1 MHz of bandwidth, well under
// five times the switching frequency, so its output is a rounded, delayed
// copy of the inductor current. To compare like with like, the emulated
// current i'_L is passed through a model of the same sensor, giving i'_sns.
// The model is a pure delay of SNS_DLY clocks followed by a first-order
// low-pass filter updated every 10 ns:
//   y[n] = y[n-1] + (x[n-SNS_DLY] - y[n-1]) / 2^LPF_SHIFT
// With LPF_SHIFT = 4 the pole sits at -ln(1 - 1/16) / (2 pi 10 ns), about
// 1.03 MHz, matching the sensor bandwidth. The design only says that the
// model replicates the sensor's frequency response; the first-order form,
// the delay and their values are this design's choice, and both are
// parameters so that a measured response can be fitted.
//
// Interface: x is i'_L, y is i'_sns (registered), both emu_pkg::cur_t.
// Reset clears the delay line and the filter state.
module sensor_model
  import emu_pkg::*;
#(
  parameter int SNS_DLY   = 5,     // sensor propagation delay, clocks
  parameter int LPF_SHIFT = 4      // filter coefficient 2^-LPF_SHIFT
) (
  input  logic clk,
  input  logic rst_n,
  input  cur_t x,
  output cur_t y
);

  cur_t dl [SNS_DLY+1];
  cur_t diff;

  assign dl[0] = x;

  for (genvar k = 1; k <= SNS_DLY; k++) begin : g_dly
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) dl[k] <= '0;
      else        dl[k] <= dl[k-1];
    end
  end

  assign diff = dl[SNS_DLY] - y;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) y <= '0;
    else        y <= y + (diff >>> LPF_SHIFT);
  end

endmodule
