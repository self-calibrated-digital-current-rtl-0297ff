// sine_sync: sine reference locked to the ac line.
//
// The controller shapes the inductor current as a sine in phase with the
// line voltage. A comparator on the divided line voltage (vac_pos = 1 while
// v_ac > 0) marks the zero crossings. This block measures the line period in
// clocks between rising crossings, turns it into the increment of a 32-bit
// phase accumulator with a serial divider (inc = 2^32 / period), and snaps
// the phase to zero at each rising crossing, so the sine starts every line
// cycle in step with the grid. The phase indexes a quarter-wave table of
// 2^LUT_AW signed 16-bit samples that is computed at elaboration from a
// fixed-point Taylor series of sin(x) (five terms, error below 1 LSB).
//
// Rising crossings closer than MIN_PERIOD clocks to the previous one are
// taken as comparator chatter and ignored. 'locked' rises once a period has
// been measured and falls when none is seen within 4*MIN_PERIOD clocks.
// Outputs: sine (Q1.15, registered), phase, and polarity (sine >= 0).
// The design only names this block; everything inside it is this design's.
module sine_sync #(
  parameter int MIN_PERIOD = 1_250_000,   // 80 Hz at 100 MHz
  parameter int LUT_AW     = 10           // quarter-wave table address bits
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               vac_pos,     // line-polarity comparator, async
  output logic signed [15:0] sine,
  output logic [31:0]        phase,
  output logic               locked
);

  localparam int PW = 26;                 // period counter width
  localparam int LUT_N = 1 << LUT_AW;
  localparam longint PI_Q30 = 64'd3373259426;   // pi * 2^30

  typedef logic signed [15:0] lut_t [LUT_N];

  // sin(x) for x in [0, pi/2], x in Q30, result in Q30
  function automatic longint sin_q30(longint x);
    longint x2, term, s;
    x2   = (x * x) >>> 30;
    term = x;
    s    = x;
    for (int k = 1; k <= 4; k++) begin
      term = ((term * x2) >>> 30) / ((2 * k) * (2 * k + 1));
      s    = (k % 2 == 1) ? s - term : s + term;
    end
    return s;
  endfunction

  function automatic lut_t make_lut();
    lut_t   t;
    longint x, v;
    for (int i = 0; i < LUT_N; i++) begin
      // sample at the middle of each step: x = (i + 0.5) * (pi/2) / LUT_N
      x = (PI_Q30 * longint'(2 * i + 1)) / longint'(4 * LUT_N);
      v = (sin_q30(x) + (64'sd1 <<< 14)) >>> 15;
      if (v > 32767) v = 32767;
      t[i] = 16'(v);
    end
    return t;
  endfunction

  localparam lut_t LUT = make_lut();

  // ------------------------------------------------------- edge detect
  logic [2:0]    vs;
  logic          rise;
  logic [PW-1:0] pcnt;          // clocks since last accepted crossing

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) vs <= '0;
    else        vs <= {vs[1:0], vac_pos};
  end

  assign rise = vs[1] && !vs[2] && (pcnt >= PW'(MIN_PERIOD));

  // ------------------------------------------------------- divider
  // restoring division of 2^32 by the measured period, one bit per clock
  logic [32:0]   rem;
  logic [31:0]   quo;
  logic [PW-1:0] divisor;
  logic [5:0]    dstep;
  logic          dbusy;
  logic [31:0]   inc;
  logic [32:0]   rem_sh;
  logic          have_period;

  assign rem_sh = {rem[31:0], 1'b0};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pcnt        <= '0;
      rem         <= '0;
      quo         <= '0;
      divisor     <= '1;
      dstep       <= '0;
      dbusy       <= 1'b0;
      inc         <= '0;
      phase       <= '0;
      have_period <= 1'b0;
      locked      <= 1'b0;
    end else begin
      phase <= phase + inc;
      if (pcnt != '1) pcnt <= pcnt + 1'b1;

      if (rise) begin
        phase <= '0;
        pcnt  <= PW'(1);
        if (have_period) begin
          // start dividing 2^32 by the period just measured
          divisor <= pcnt;
          rem     <= 33'd1;      // dividend 1 followed by 32 zeros
          quo     <= '0;
          dstep   <= 6'd32;
          dbusy   <= 1'b1;
        end
        have_period <= 1'b1;
      end else if (pcnt >= PW'(4 * MIN_PERIOD)) begin
        locked      <= 1'b0;
        have_period <= 1'b0;
        inc         <= '0;
      end

      if (dbusy) begin
        if (rem_sh >= {7'd0, divisor}) begin
          rem <= rem_sh - {7'd0, divisor};
          quo <= {quo[30:0], 1'b1};
        end else begin
          rem <= rem_sh;
          quo <= {quo[30:0], 1'b0};
        end
        dstep <= dstep - 1'b1;
        if (dstep == 6'd1) dbusy <= 1'b0;
      end else if (dstep == 6'd0 && quo != '0) begin
        inc    <= quo;
        locked <= 1'b1;
        quo    <= '0;
      end
    end
  end

  // ------------------------------------------------------- table lookup
  logic [1:0]        quad;
  logic [LUT_AW-1:0] idx;

  assign quad = phase[31:30];
  assign idx  = quad[0] ? ~phase[29 -: LUT_AW] : phase[29 -: LUT_AW];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) sine <= '0;
    else        sine <= quad[1] ? -LUT[idx] : LUT[idx];
  end

endmodule
