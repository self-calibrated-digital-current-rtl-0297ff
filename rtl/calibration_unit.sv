// calibration_unit: indirect self-calibration of the emulated current and
// perturb-and-observe estimation of the slope parameter M_L.
//
// A low-bandwidth current sensor cannot show the peaks of the inductor
// current, but it can still tell when its (rounded, delayed) output passes a
// known level. The same rounding and delay are applied to the emulated
// current by the sensor model, so the real sensor output i_sns and the
// emulated one i'_sns should pass a reference level i_ref at the same
// instant. The time between the two crossings, plus the comparator delay
// t_d, is the current error expressed as time; multiplying the summed
// inductor voltage over that time by M_L turns it back into amperes:
//   i_err = M_L * sum(v'_L[n]) over (dt_sns + t_d),   i'_L <- i'_L + i_err.
// The sign comes out of the order of the events: if the real crossing
// (comparator edge minus t_d) comes first, the sum runs forward in time, if
// the emulated crossing comes first, it runs backward.
//
// Sequence, started by a one-clock cal_req pulse while cal_en is high:
//   1. i_ref is quantised to the DAC and written to dac_code; the DAC and
//      comparator get SETTLE_CYC clocks to settle.
//   2. Arm: wait until the comparator (i_sns > i_ref) and the digital
//      compare (i'_sns >= i_ref) agree on which side of i_ref the current
//      is; that side is latched.
//   3. Wait for both to leave that side. The first event starts an
//      accumulator of v'_L; the second ends it. A running sum of the last
//      TD_CYC samples of v'_L supplies the comparator-delay part.
//   4. i_err = M_L * sum; for one clock cal_sel is high and
//      i_cal = i'_L[n-1] + M_L v'_L[n] + i_err.
//   Any stage that takes longer than timeout_cyc aborts without a change.
// After every completed calibration the perturb-and-observe rule runs (when
// pno_en is high): after N calibrations, M_L grows by Delta if every i_err
// of the batch was positive, shrinks by Delta if every one was negative,
// and is left alone otherwise; then a new batch starts. Between two
// calibrations the uncorrected error grows as (M_true / M_L - 1) times the
// change of the current, so a positive error means "slope too small" only
// when the reference level has risen since the previous calibration. The
// error is therefore observed with the sign of that change: as it is when
// the level rose (the case the rule is drawn for), inverted when it fell,
// and not counted when the level did not change. This sign rule is this
// design's own addition.
//
// v_comp is asynchronous and passes a two-flop synchroniser; TD_CYC must
// include those two clocks as well as the analog comparator delay.
// The method, eqs. for i_err and i_cal and the perturb-and-observe flow
// follow the design. The event sequencing, DAC format (offset binary,
// 1/8 A per LSB), timeout, settle time, TD_CYC value and the treatment of
// zero error in the batch rule are this design's own choices.
module calibration_unit
  import emu_pkg::*;
#(
  parameter int TD_CYC     = 6,      // comparator + synchroniser delay
  parameter int SETTLE_CYC = 50,     // DAC and comparator settling
  parameter int SUM_BITS   = 32
) (
  input  logic                clk,
  input  logic                rst_n,
  // request and configuration
  input  logic                cal_en,
  input  logic                cal_req,       // start one calibration
  input  cur_t                i_ref,         // wanted reference level
  input  logic [15:0]         timeout_cyc,
  input  logic                pno_en,
  input  logic [7:0]          pno_n,         // N, calibrations per batch
  input  ml_t                 pno_delta,     // Delta
  input  ml_t                 ml_init,       // initial guess of M_L
  input  logic                ml_load,       // reload M_L from ml_init
  // emulator signals
  input  vl_t                 vl,            // v'_L[n]
  input  cur_t                il,            // i'_L[n-1]
  input  cur_t                di,            // M_L v'_L[n]
  input  cur_t                isns_emu,      // i'_sns
  // analog side
  input  logic                v_comp,        // i_sns > i_ref, asynchronous
  output logic [DAC_BITS-1:0] dac_code,
  // to the emulator
  output logic                cal_sel,
  output cur_t                i_cal,
  output ml_t                 ml,
  // status
  output logic                busy,
  output logic                cal_done,      // one clock per applied calibration
  output logic                cal_abort,     // one clock per timed-out attempt
  output cur_t                i_err,         // last applied error
  output logic                ml_inc,        // one clock per M_L increase
  output logic                ml_dec         // one clock per M_L decrease
);

  typedef enum logic [2:0] {S_IDLE, S_SETTLE, S_ARM, S_WAIT1, S_WAIT2,
                            S_MULT, S_APPLY} st_e;
  typedef logic signed [SUM_BITS-1:0] sum_t;

  st_e          st;
  logic [1:0]   vc_sync;
  logic         real_above, emu_above;
  logic         side;          // latched starting side (1 = above)
  logic         real_first;    // the comparator event came first
  logic [15:0]  tmr;
  cur_t         iref_q;
  sum_t         acc, wsum_q, wsum, wsum_at, total;
  vl_t          hist [TD_CYC+1];
  logic [7:0]   nobs;
  logic         all_pos, all_neg;
  cur_t         iref_prev;     // level of the previous calibration
  cur_t         err_obs;       // i_err as seen by perturb and observe
  logic         obs_ok;

  // ---------------------------------------------------------------- inputs
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) vc_sync <= '0;
    else        vc_sync <= {vc_sync[0], v_comp};
  end

  assign real_above = vc_sync[1];
  assign emu_above  = (isns_emu >= iref_q);

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

  // ------------------------------------------------- DAC quantisation
  function automatic logic [DAC_BITS-1:0] to_dac(cur_t v);
    cur_t c;
    c = (v >>> DAC_SHIFT) + cur_t'(1 << (DAC_BITS - 1));
    if (c < 0)                          return '0;
    else if (c > cur_t'((1 << DAC_BITS) - 1)) return '1;
    else                                return c[DAC_BITS-1:0];
  endfunction

  // ---------------------------------------------------------- sequencer
  logic ev_real, ev_emu;
  assign ev_real = (real_above != side);
  assign ev_emu  = (emu_above  != side);

  logic signed [SUM_BITS+ML_BITS:0] prod;
  assign prod = total * $signed({1'b0, ml});

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st         <= S_IDLE;
      tmr        <= '0;
      iref_q     <= '0;
      dac_code   <= DAC_BITS'(1 << (DAC_BITS - 1));
      side       <= 1'b0;
      real_first <= 1'b0;
      acc        <= '0;
      wsum_at    <= '0;
      total      <= '0;
      cal_done   <= 1'b0;
      cal_abort  <= 1'b0;
      i_err      <= '0;
    end else begin
      cal_done  <= 1'b0;
      cal_abort <= 1'b0;
      tmr       <= tmr + 1'b1;
      unique case (st)
        S_IDLE: if (cal_en && cal_req) begin
          dac_code <= to_dac(i_ref);
          iref_q   <= (cur_t'(to_dac(i_ref)) - cur_t'(1 << (DAC_BITS - 1)))
                      <<< DAC_SHIFT;
          tmr      <= '0;
          st       <= S_SETTLE;
        end
        S_SETTLE: if (tmr >= 16'(SETTLE_CYC)) begin
          tmr <= '0;
          st  <= S_ARM;
        end
        S_ARM: begin
          if (real_above == emu_above) begin
            side <= emu_above;
            tmr  <= '0;
            st   <= S_WAIT1;
          end else if (tmr >= timeout_cyc) begin
            cal_abort <= 1'b1;
            st        <= S_IDLE;
          end
        end
        S_WAIT1: begin
          acc <= '0;
          if (ev_real && ev_emu) begin
            total <= wsum;
            st    <= S_MULT;
          end else if (ev_real) begin
            real_first <= 1'b1;
            wsum_at    <= wsum;
            tmr        <= '0;
            st         <= S_WAIT2;
          end else if (ev_emu) begin
            real_first <= 1'b0;
            tmr        <= '0;
            st         <= S_WAIT2;
          end else if (tmr >= timeout_cyc) begin
            cal_abort <= 1'b1;
            st        <= S_IDLE;
          end
        end
        S_WAIT2: begin
          acc <= acc + sum_t'(vl);
          if (real_first && ev_emu) begin
            total <= wsum_at + acc + sum_t'(vl);
            st    <= S_MULT;
          end else if (!real_first && ev_real) begin
            total <= wsum - acc - sum_t'(vl);
            st    <= S_MULT;
          end else if (tmr >= timeout_cyc) begin
            cal_abort <= 1'b1;
            st        <= S_IDLE;
          end
        end
        S_MULT: begin
          i_err <= cur_t'(prod);
          st    <= S_APPLY;
        end
        S_APPLY: begin
          cal_done <= 1'b1;
          st       <= S_IDLE;
        end
        default: st <= S_IDLE;
      endcase
    end
  end

  assign busy    = (st != S_IDLE);
  assign cal_sel = (st == S_APPLY);
  assign i_cal   = il + di + i_err;

  // ---------------------------------------- perturb and observe on M_L
  always_comb begin
    obs_ok  = (iref_q != iref_prev);
    err_obs = (iref_q > iref_prev) ? i_err : -i_err;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)       iref_prev <= '0;
    else if (cal_sel) iref_prev <= iref_q;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ml      <= ML_DEFAULT[ML_BITS-1:0];
      nobs    <= '0;
      all_pos <= 1'b1;
      all_neg <= 1'b1;
      ml_inc  <= 1'b0;
      ml_dec  <= 1'b0;
    end else begin
      ml_inc <= 1'b0;
      ml_dec <= 1'b0;
      if (ml_load) begin
        ml      <= ml_init;
        nobs    <= '0;
        all_pos <= 1'b1;
        all_neg <= 1'b1;
      end else if (cal_sel && pno_en && obs_ok) begin
        if (nobs + 1'b1 >= pno_n) begin
          // batch complete: decide with this calibration included
          if (all_pos && err_obs > 0) begin
            ml     <= (ml > ML_BITS'('1) - pno_delta) ? '1 : ml + pno_delta;
            ml_inc <= 1'b1;
          end else if (all_neg && err_obs < 0) begin
            ml     <= (ml <= pno_delta) ? ML_BITS'(1) : ml - pno_delta;
            ml_dec <= 1'b1;
          end
          nobs    <= '0;
          all_pos <= 1'b1;
          all_neg <= 1'b1;
        end else begin
          nobs    <= nobs + 1'b1;
          all_pos <= all_pos && (err_obs > 0);
          all_neg <= all_neg && (err_obs < 0);
        end
      end
    end
  end

  a_cal_one_cycle: assert property (@(posedge clk) disable iff (!rst_n)
                                    cal_sel |=> !cal_sel);

endmodule
