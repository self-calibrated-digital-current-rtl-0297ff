// direct_calibration: calibration of the emulated current, and measurement
// of the slope parameter M_L, with a sensor fast enough to follow the
// current ramp (sensor bandwidth above about five times the switching
// frequency, e.g. the 1 MHz sensor while the converter is run at a low
// switching frequency).
//
// The sensed current is compared with a DAC level i_ref. When the
// synchronised comparator output changes, the real current passed i_ref
// t_d clocks earlier, so the emulated current is set to
//   i_cal = i_ref + M_L * sum(v'_L over the last t_d clocks)
// (the sum continues over the one clock the multiplication takes).
// If est_en is set, the DAC is then moved by step_codes in the direction the
// current is moving, inside the same switching state, and v'_L, delayed by
// t_d, is summed until the comparator reports the new level. Both crossings
// carry the same delay, so the delayed sum covers exactly the time between
// the two true crossings and
//   M_L = delta_i_ref / sum(v'_L between the two crossings),
// computed by a 32-step serial divider, and reported on ml_est with a
// one-clock ml_valid pulse.
//
// Sequence, started by a one-clock cal_req pulse:
//   SET    dac_code <- i_ref, wait SETTLE_CYC clocks;
//   ARM    latch the comparator side;
//   WAIT1  wait for it to change (detection 1);
//   MULT   product M_L * window;  APPLY: cal_sel for one clock, cal_done;
//   then, with est_en: DAC moved by +-step_codes; AWAY waits until the
//   comparator shows the new level on the other side, WAIT2 until it
//   changes again (detection 2); DIV runs the divider; ml_valid.
// Any stage longer than timeout_cyc ends the sequence (cal_abort if the
// current was not yet calibrated). The slope measurement is also dropped
// when the delayed v'_L turns against the ramp before the second detection,
// i.e. the switching state ended before the second level was reached.
// The slope resolution is one sample in the number of clocks between the
// crossings, so the level step should span some 100 clocks or more.
// TD_CYC covers the whole delay of the sensing path: sensor propagation and
// filter lag on a ramp, analog comparator, two-flop synchroniser.
//
// The calibration and slope equations follow the design. The sequencing,
// DAC format (offset binary, 1/8 A per LSB), the level step, the divider
// and the timeout are this design's own choices.
module direct_calibration
  import emu_pkg::*;
#(
  parameter int TD_CYC     = 26,     // total sensing delay, clocks
  parameter int SETTLE_CYC = 50,     // DAC and comparator settling
  parameter int SUM_BITS   = 32
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                cal_req,       // start one calibration
  input  cur_t                i_ref,         // first reference level
  input  logic [7:0]          step_codes,    // second level offset, DAC codes
  input  logic                est_en,        // also measure M_L
  input  logic [15:0]         timeout_cyc,
  input  vl_t                 vl,            // v'_L[n]
  input  cur_t                di,            // M_L v'_L[n]
  input  ml_t                 ml,            // M_L now in use
  input  logic                v_comp,        // i_sns > i_ref, asynchronous
  output logic [DAC_BITS-1:0] dac_code,
  output logic                cal_sel,
  output cur_t                i_cal,
  output logic                busy,
  output logic                cal_done,      // one clock per calibration
  output logic                cal_abort,     // one clock per failed attempt
  output ml_t                 ml_est,        // measured M_L
  output logic                ml_valid       // one clock per new ml_est
);
  typedef logic signed [SUM_BITS-1:0] sum_t;
  typedef enum logic [3:0] {
    S_IDLE, S_SET, S_ARM, S_WAIT1, S_MULT, S_APPLY, S_AWAY, S_WAIT2, S_DIV
  } st_e;

  st_e          st;
  logic [1:0]   vc_sync;
  logic         side;            // comparator value before detection 1
  logic [15:0]  tmr;
  cur_t         iref_q;
  sum_t         wsum_q, wsum, total, acc2;
  vl_t          hist [TD_CYC+1];
  logic [DAC_BITS-1:0] code1;

  // divider: |delta_i| / |sum|, both positive
  logic [31:0]  dividend, divisor, quo;
  logic [31:0]  rem;
  logic [5:0]   dstep;
  logic [32:0]  rem_sh;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) vc_sync <= '0;
    else        vc_sync <= {vc_sync[0], v_comp};
  end

  // running sum of the last TD_CYC samples of v'_L, including this one
  assign hist[0] = vl;
  for (genvar k = 1; k <= TD_CYC; k++) begin : g_hist
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) hist[k] <= '0;
      else        hist[k] <= hist[k-1];
    end
  end

  assign wsum = wsum_q + sum_t'(vl) - sum_t'(hist[TD_CYC]);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) wsum_q <= '0;
    else        wsum_q <= wsum;
  end

  function automatic logic [DAC_BITS-1:0] to_dac(cur_t v);
    cur_t c;
    c = (v >>> DAC_SHIFT) + cur_t'(1 << (DAC_BITS - 1));
    if (c < 0)                                return '0;
    else if (c > cur_t'((1 << DAC_BITS) - 1)) return '1;
    else                                      return c[DAC_BITS-1:0];
  endfunction

  cur_t prod_q;

  logic [DAC_BITS:0] code2;      // second level, one extra bit for range
  assign code2 = side ? {1'b0, code1} - {3'b0, step_codes}
                      : {1'b0, code1} + {3'b0, step_codes};

  assign rem_sh = {rem[31:0], dividend[31]};

  // v'_L delayed by t_d: a detection at clock n reports the crossing at
  // n - t_d, so summing the delayed samples between two detections sums
  // exactly the samples between the two true crossings
  vl_t  vl_d;
  sum_t acc2_n;                  // sum including this clock's sample
  assign vl_d   = hist[TD_CYC];
  assign acc2_n = acc2 + sum_t'(vl_d);

  // the (delayed) current turned before the second level was crossed
  logic wrong_way;
  assign wrong_way = side ? (vl_d > 0) : (vl_d < 0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st        <= S_IDLE;
      tmr       <= '0;
      iref_q    <= '0;
      code1     <= DAC_BITS'(1 << (DAC_BITS - 1));
      dac_code  <= DAC_BITS'(1 << (DAC_BITS - 1));
      side      <= 1'b0;
      total     <= '0;
      prod_q    <= '0;
      acc2      <= '0;
      cal_done  <= 1'b0;
      cal_abort <= 1'b0;
      ml_est    <= ML_DEFAULT[ML_BITS-1:0];
      ml_valid  <= 1'b0;
      dividend  <= '0;
      divisor   <= '0;
      quo       <= '0;
      rem       <= '0;
      dstep     <= '0;
    end else begin
      cal_done  <= 1'b0;
      cal_abort <= 1'b0;
      ml_valid  <= 1'b0;
      tmr       <= tmr + 1'b1;
      unique case (st)
        S_IDLE: if (cal_req) begin
          code1    <= to_dac(i_ref);
          dac_code <= to_dac(i_ref);
          iref_q   <= (cur_t'(to_dac(i_ref)) - cur_t'(1 << (DAC_BITS - 1)))
                      <<< DAC_SHIFT;
          tmr      <= '0;
          st       <= S_SET;
        end
        S_SET: if (tmr >= 16'(SETTLE_CYC)) begin
          tmr <= '0;
          st  <= S_ARM;
        end
        S_ARM: begin
          side <= vc_sync[1];
          tmr  <= '0;
          st   <= S_WAIT1;
        end
        S_WAIT1: begin
          if (vc_sync[1] != side) begin
            total <= wsum;
            st    <= S_MULT;
          end else if (tmr >= timeout_cyc) begin
            cal_abort <= 1'b1;
            st        <= S_IDLE;
          end
        end
        S_MULT: begin
          // the window grows by this clock's v'_L; the next clock's
          // step is added by the emulator path (di) at APPLY
          prod_q <= cur_t'((total + sum_t'(vl)) * $signed({1'b0, ml}));
          acc2   <= sum_t'(vl_d);
          st     <= S_APPLY;
        end
        S_APPLY: begin
          cal_done <= 1'b1;
          acc2     <= acc2_n;
          tmr      <= '0;
          if (est_en && step_codes != '0 && !code2[DAC_BITS]) begin
            dac_code <= code2[DAC_BITS-1:0];
            st       <= S_AWAY;
          end else begin
            st <= S_IDLE;
          end
        end
        S_AWAY: begin
          acc2 <= acc2_n;
          if (wrong_way)                st <= S_IDLE;
          else if (vc_sync[1] == side)  st <= S_WAIT2;
          else if (tmr >= timeout_cyc)  st <= S_IDLE;
        end
        S_WAIT2: begin
          acc2 <= acc2_n;
          if (wrong_way) begin
            // the ramp turned before the second level was reached
            st <= S_IDLE;
          end else if (vc_sync[1] != side) begin
            // the delayed sum spans exactly the change delta_i_ref
            dividend <= 32'(step_codes) << DAC_SHIFT;
            divisor  <= (acc2_n < 0) ? 32'(-acc2_n) : 32'(acc2_n);
            rem      <= '0;
            quo      <= '0;
            dstep    <= 6'd32;
            st       <= S_DIV;
          end else if (tmr >= timeout_cyc) begin
            st <= S_IDLE;
          end
        end
        S_DIV: begin
          if (dstep != 0) begin
            dividend <= {dividend[30:0], 1'b0};
            if (rem_sh >= {1'b0, divisor}) begin
              rem <= 32'(rem_sh - {1'b0, divisor});
              quo <= {quo[30:0], 1'b1};
            end else begin
              rem <= rem_sh[31:0];
              quo <= {quo[30:0], 1'b0};
            end
            dstep <= dstep - 1'b1;
          end else begin
            if (divisor != 0 && quo != 0 && quo < 32'(1 << ML_BITS)) begin
              ml_est   <= quo[ML_BITS-1:0];
              ml_valid <= 1'b1;
            end
            st <= S_IDLE;
          end
        end
        default: st <= S_IDLE;
      endcase
    end
  end

  assign busy    = (st != S_IDLE);
  assign cal_sel = (st == S_APPLY);
  assign i_cal   = iref_q + prod_q + di;

  // the second level is always on the far side of the ramp
  a_step_dir: assert property (@(posedge clk) disable iff (!rst_n)
    (st == S_AWAY && $changed(dac_code)) |->
      (side ? dac_code < code1 : dac_code > code1));
endmodule
