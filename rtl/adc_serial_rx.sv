// adc_serial_rx: master for one 10-bit serial ADC, with sample-and-hold.
//
// The emulator samples the line voltage v_ac and the dc-link voltage V_link
// at about 1 MHz with 10-bit serial ADCs and holds each sample for the
// 100 computation intervals until the next one arrives (sample-and-hold,
// no extrapolation). This block starts a conversion every SAMPLE_DIV clocks
// by pulling cs_n low, runs FRAME_BITS serial clock periods of SCLK_DIV
// clocks each, and shifts in sdata on every rising sclk edge, MSB first.
// Frame bits LEAD_BITS .. LEAD_BITS+ADC_BITS-1 carry the result; the rest
// are ignored. When the frame ends, cs_n returns high, 'sample' takes the
// new code and 'valid' pulses for one clock.
//
// Timing: sclk and cs_n are registered; sdata is sampled one clock after
// sclk rises, i.e. in the middle of the high phase when SCLK_DIV = 4. The
// converter is expected to change sdata after falling sclk edges.
// The 1 MHz rate and the 10-bit width follow the design; the frame format,
// serial-clock rate and leading-bit count are this design's own choices
// because the converter part is not named.
module adc_serial_rx #(
  parameter int ADC_BITS   = 10,
  parameter int SAMPLE_DIV = 100,   // 100 MHz / 100 = 1 MHz sample rate
  parameter int SCLK_DIV   = 4,     // serial clock = clk / 4
  parameter int FRAME_BITS = 16,    // serial clocks per conversion
  parameter int LEAD_BITS  = 4      // frame bits before the MSB
) (
  input  logic                clk,
  input  logic                rst_n,
  output logic                cs_n,
  output logic                sclk,
  input  logic                sdata,
  output logic [ADC_BITS-1:0] sample,
  output logic                valid
);

  localparam int CW = $clog2(SAMPLE_DIV + 1);
  localparam int PW = $clog2(SCLK_DIV + 1);
  localparam int BW = $clog2(FRAME_BITS + 1);

  initial begin
    assert (FRAME_BITS * SCLK_DIV < SAMPLE_DIV)
      else $error("frame longer than the sample period");
    assert (LEAD_BITS + ADC_BITS <= FRAME_BITS)
      else $error("data bits do not fit the frame");
  end

  logic [CW-1:0] cyc;        // position in the sample period
  logic [PW-1:0] ph;         // position in the serial-clock period
  logic [BW-1:0] bitn;       // serial clock index in the frame
  logic          active;     // frame in progress
  logic          sclk_q;     // previous sclk, for edge detection
  logic [ADC_BITS-1:0] shreg;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cyc    <= '0;
      ph     <= '0;
      bitn   <= '0;
      active <= 1'b0;
      cs_n   <= 1'b1;
      sclk   <= 1'b0;
      sclk_q <= 1'b0;
      shreg  <= '0;
      sample <= '0;
      valid  <= 1'b0;
    end else begin
      valid  <= 1'b0;
      sclk_q <= sclk;
      cyc    <= (cyc == CW'(SAMPLE_DIV - 1)) ? '0 : cyc + 1'b1;

      if (cyc == '0) begin
        active <= 1'b1;
        cs_n   <= 1'b0;
        ph     <= '0;
        bitn   <= '0;
        sclk   <= 1'b0;
      end else if (active) begin
        if (ph == PW'(SCLK_DIV - 1)) begin
          ph   <= '0;
          sclk <= 1'b0;
          if (bitn == BW'(FRAME_BITS - 1)) begin
            active <= 1'b0;
            cs_n   <= 1'b1;
            sample <= shreg;     // hold the finished word
            valid  <= 1'b1;
          end else begin
            bitn <= bitn + 1'b1;
          end
        end else begin
          ph <= ph + 1'b1;
          if (ph == PW'(SCLK_DIV / 2 - 1)) sclk <= 1'b1;
        end
      end

      // sample the data line one clock after the rising serial-clock edge
      if (sclk && !sclk_q && !cs_n) begin
        if (bitn >= BW'(LEAD_BITS) && bitn < BW'(LEAD_BITS + ADC_BITS))
          shreg <= {shreg[ADC_BITS-2:0], sdata};
      end
    end
  end

endmodule
