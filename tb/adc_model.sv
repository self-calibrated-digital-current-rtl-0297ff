// adc_model: behavioural model of a 10-bit serial ADC, for testbenches only.
//
// When cs_n falls the model latches 'code' and drives frame bit 0 on sdata;
// after every falling sclk edge it drives the next frame bit. Frame bits
// LEAD_BITS .. LEAD_BITS+ADC_BITS-1 carry the code MSB first, all others are
// zero. sdata is zero while cs_n is high.
module adc_model #(
  parameter int ADC_BITS  = 10,
  parameter int LEAD_BITS = 4
) (
  input  logic                cs_n,
  input  logic                sclk,
  input  logic [ADC_BITS-1:0] code,
  output logic                sdata
);

  logic [ADC_BITS-1:0] word = '0;
  int                  bitn = 0;

  function automatic logic frame_bit(int b, logic [ADC_BITS-1:0] w);
    if (b >= LEAD_BITS && b < LEAD_BITS + ADC_BITS)
      return w[ADC_BITS - 1 - (b - LEAD_BITS)];
    return 1'b0;
  endfunction

  always @(negedge cs_n) begin
    word = code;
    bitn = 0;
  end

  always @(negedge sclk) if (!cs_n) bitn = bitn + 1;

  assign sdata = cs_n ? 1'b0 : frame_bit(bitn, word);

endmodule
