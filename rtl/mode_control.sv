// mode_control: the Mode Control Logic of the voltage loop. It decides, from
// the windowed flash ADC error e[n], which of the controller's three modes is
// active and drives the DAC code, the analog multiplexer and sample-and-hold
// (S&H) controls, the dual-mode ADC and the per-phase switch commands.
//
// Steady state (M_CPM), |e| <= 1: once per switching period (cyc_tick) the
// reference becomes i_ctrl[n] = K*e[n] + i_ctrl[n-1] (computed outside in
// cpm_integrator from the digitised S&H value). The S&H follows the DAC and
// the dual-mode ADC converts it once per period at the slow rate. The phase
// clocks set the SR latches, the current comparators reset them.
//
// Transient (StateTransient high), entered as soon as |e| >= 2:
//   M_SLEW     all main switches are forced on (e > 0, output below
//              reference) or off (e < 0). The DAC is set to the maximum
//              allowable current I_MAX, which limits the inductor current.
//              The multiplexer connects the sensed inductor current to the
//              S&H and the ADC converts back to back at the fast rate.
//              Min/Max detection looks for the voltage valley / peak.
//   M_CAPTURE  at the extremum the S&H of every phase holds its inductor
//              current; the capacitors are short-connected for SHORT_CLKS
//              clocks so each holds the phase average (equal sharing).
//   M_CONVERT  one fast conversion of the averaged sample gives i_ctrl_new.
//              The error is coarse, so the extremum is only recognised some
//              time after it happened, when the voltage has moved back by
//              up to one LSB. Because the voltage is symmetric about its
//              extremum and the current ramps linearly, the current at the
//              extremum is the average of the tracked current when the last
//              error level was entered (i_entry) and when it was left
//              (i_exit): i_ctrl_new = sample - (i_exit - i_entry)/2.
//              If no new level is reached after arming, the entry current
//              is the current at the arming instant; the tracking ADC only
//              delivers it one conversion late, so the first result is
//              extrapolated back with the second: 2*first - second.
//              The tracked value used here is the mean of all phases.
//   M_PEAK     the DAC carries i_peak = i_ctrl_new + delta-i (undershoot) or
//              i_ctrl_new - delta-i (overshoot). A phase keeps its switch on
//              until its current reaches i_peak (resp. off until it falls
//              below the lower level), then waits for the others.
//   M_RETURN   the DAC carries i_ctrl_new. A phase keeps its switch off
//              (resp. on) until its current crosses i_ctrl_new and then
//              returns to normal clocked CPM operation. When every phase has
//              done so the controller is back in M_CPM with i_ctrl = i_ctrl_new.
// During a forced-off interval the current of a phase stops at zero. When
// every phase's tracked current has been converted to zero (adc_zero) the
// capture is taken at once, without lag correction; the load is then not
// known, so the sequence ends in PFM while the output is still above the
// window and otherwise in CPM at the PFM reference.
// A further load step during M_PEAK / M_RETURN (the error moving away from
// the reference again by two LSBs, or |e| >= 2 the other way) starts a new
// sequence at M_SLEW.
//
// Light load (M_PFM): when the new reference falls below I_PFM_ENTER (the
// peak ripple current) the clock generator is suspended and the reference is
// fixed at I_PFM. A pulse starts when e > 1 and ends when the current reaches
// I_PFM; phases take turns. If two requests come less than PERIOD/N_PHASES
// clocks apart (a phase would switch faster than in CPM), or the error
// reaches 3 LSBs, the load has outgrown PFM and
// the controller returns to CPM.
//
// What follows the document: the three modes, the |e| <= 1 / |e| >= 2
// thresholds, eq. (1), I_MAX during slewing, capture and short-connection of
// the S&H capacitors, eq. (2), the fixed PFM reference and the ADC-started
// PFM pulses. This design's own choices: the state split above, the
// comparator-based end of the on/off action, the lag correction of the
// captured current, the zero-current capture during a forced-off
// interval, the entry-current extrapolation, the retrigger rule, the PFM
// exit rule, round-robin PFM phases, the M_PEAK/M_RETURN time-out of
// TIMEOUT clocks, and all widths and default values.
//
// Timing: all state is registered on clk; DAC code and controls are
// registered or decoded from the state. adc_start is one clock after
// cyc_tick in CPM.
module mode_control
  import mscpm_pkg::*;
#(
  parameter int N_PHASES    = 2,
  parameter int PERIOD      = 50,   // clocks per switching period
  parameter int I_MAX       = 200,  // maximum allowable reference code
  parameter int I_PFM       = 10,   // fixed PFM reference code
  parameter int I_PFM_ENTER = 8,    // CPM -> PFM below this reference
  parameter int SHORT_CLKS  = 4,    // S&H short-connection time
  parameter int TIMEOUT     = 200   // M_PEAK / M_RETURN time-out, clocks
) (
  input  logic                clk,
  input  logic                rst_n,
  // voltage loop
  input  logic                cyc_tick,
  input  err_t                e,
  input  icode_t              i_steady,    // K*e + i_ctrl[n-1]
  input  icode_t              adc_code,    // dual-mode ADCs, mean of the phases
  input  logic                adc_valid,
  input  logic                adc_zero,    // every phase's ADC result is 0
  input  logic                extreme,     // from Min/Max detection
  input  logic                mm_grow,     // deviation reached a new level
  input  icode_t              i_target,    // i_peak / i_valley
  input  logic [N_PHASES-1:0] cmp,         // current comparators
  // Min/Max detection and delta-i calculator
  output logic                mm_arm,
  output logic                mm_under,
  output logic                undershoot,
  output icode_t              i_new,       // captured i_ctrl_new
  // DAC and S&H
  output icode_t              dac_code,
  output logic                sh_track,    // MUX: 1 = sensed current
  output logic                sh_hold,
  output logic                sh_short,
  // dual-mode ADC
  output logic                adc_start,
  output logic                adc_async,
  output logic                adc_fast,    // clk_high (1) / clk_low (0)
  // clock generator and latches
  output logic                clk_suspend,
  output logic [N_PHASES-1:0] set_en,      // phase clock may set the latch
  output logic [N_PHASES-1:0] force_on,
  output logic [N_PHASES-1:0] force_off,
  output logic [N_PHASES-1:0] pfm_set,
  // status
  output mode_t               mode,
  output logic                state_transient
);

  icode_t              i_ctrl;
  icode_t              i_entry;    // tracked current when the last level was entered
  icode_t              i_exit;     // tracked current when the extremum was detected
  logic [N_PHASES-1:0] done;
  int                  timer;
  int                  dmin;       // smallest deviation since the capture
  int                  pfm_gap;    // clocks since the last PFM pulse
  localparam int PFM_GAP = PERIOD / N_PHASES;  // each phase at most f_sw
  int                  pfm_phase;
  logic                pfm_busy;
  logic                pfm_armed;
  logic                tick_d;
  logic                adc_fresh;  // a CPM conversion finished since entering CPM
  logic                trk_ok;     // the tracking ADC has produced a result
  logic                entry_pend; // i_entry waits for the first tracking result
  logic                entry_ext;  // i_entry to be extrapolated back to the arm time
  logic                cpm_entry;  // first clock in CPM after another mode
  logic                zero_cap;   // captured because all currents reached zero

  int   dev;                        // e in the direction of the transient
  logic big_err;
  logic retrig;
  logic pfm_req;
  logic [N_PHASES-1:0] done_nx;     // phases that have finished this step

  always_comb begin
    dev      = undershoot ? int'(e) : -int'(e);
    big_err  = (e >= err_t'(2)) || (e <= -err_t'(2));
    retrig   = (mode == M_PEAK || mode == M_RETURN) &&
               ((dev >= 2 && dev >= dmin + 2) || dev <= -2);
    mm_arm   = ((mode == M_CPM) && big_err) || retrig;
    mm_under = (e > err_t'(0));
    pfm_req  = (mode == M_PFM) && !pfm_busy && pfm_armed && (e == err_t'(2));
    // M_PEAK: undershoot ends at the peak (cmp high), overshoot at the valley
    // (cmp low; a zero valley level ends at once). M_RETURN: the reverse.
    for (int k = 0; k < N_PHASES; k++)
      if (mode == M_PEAK)
        done_nx[k] = done[k] | (undershoot ? cmp[k] : (!cmp[k] || i_target == '0));
      else
        done_nx[k] = done[k] | (undershoot ? !cmp[k] : cmp[k]);
  end

  // Per-phase switch commands.
  always_comb begin
    set_en    = '0;
    force_on  = '0;
    force_off = '0;
    pfm_set   = '0;
    unique case (mode)
      M_CPM: set_en = '1;
      M_SLEW, M_CAPTURE, M_CONVERT: begin
        if (undershoot) force_on  = '1;
        else            force_off = '1;
      end
      M_PEAK: begin
        if (undershoot) begin
          force_on  = ~done;
          force_off = done;
        end else begin
          force_off = '1;
        end
      end
      M_RETURN: begin
        set_en = done;
        if (undershoot) force_off = ~done;
        else            force_on  = ~done;
      end
      M_PFM: if (pfm_req && pfm_gap >= PFM_GAP)
               pfm_set[pfm_phase] = 1'b1;
      default: ;
    endcase
  end

  // Analog front-end and converter controls.
  always_comb begin
    state_transient = (mode inside {M_SLEW, M_CAPTURE, M_CONVERT, M_PEAK, M_RETURN});
    sh_track    = (mode == M_SLEW);
    sh_hold     = (mode == M_CAPTURE) || (mode == M_CONVERT);
    sh_short    = sh_hold;
    adc_async   = (mode == M_SLEW);
    adc_fast    = state_transient;
    adc_start   = ((mode == M_CPM) && (tick_d || cpm_entry)) ||
                  ((mode == M_CAPTURE) && timer == SHORT_CLKS - 1);
    clk_suspend = (mode == M_PFM);
    unique case (mode)
      M_CPM, M_RETURN:              dac_code = (mode == M_CPM) ? i_ctrl : i_new;
      M_SLEW, M_CAPTURE, M_CONVERT: dac_code = undershoot ? icode_t'(I_MAX) : '0;
      M_PEAK:                       dac_code = i_target;
      M_PFM:                        dac_code = icode_t'(I_PFM);
      default:                      dac_code = i_ctrl;
    endcase
  end

  // Leave the transient sequence for CPM, or PFM at light load.
  // Leave the transient sequence for CPM, or for PFM when the new reference
  // is below I_PFM_ENTER. When the currents were zero at the capture the
  // load is not known (the currents were zero, the load need not be): while
  // the output is still above the window wait in PFM (no pulse is issued
  // there until the error is positive), else go to CPM at the PFM reference
  // and let eq. (1) decide whether PFM follows.
  function automatic mode_t settle_mode(input icode_t i, input logic zc,
                                        input err_t err);
    if (zc) return (err <= -err_t'(2)) ? M_PFM : M_CPM;
    return (int'(i) < I_PFM_ENTER) ? M_PFM : M_CPM;
  endfunction

  function automatic icode_t settle_ref(input icode_t i);
    return (int'(i) < I_PFM_ENTER) ? icode_t'(I_PFM) : i;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      mode       <= M_CPM;
      undershoot <= 1'b1;
      i_ctrl     <= '0;
      i_new      <= '0;
      i_entry    <= '0;
      i_exit     <= '0;
      done       <= '0;
      timer      <= 0;
      dmin       <= 0;
      pfm_gap    <= 0;
      pfm_phase  <= 0;
      pfm_busy   <= 1'b0;
      pfm_armed  <= 1'b0;
      tick_d     <= 1'b0;
      adc_fresh  <= 1'b0;
      trk_ok     <= 1'b0;
      zero_cap   <= 1'b0;
      entry_pend <= 1'b0;
      entry_ext  <= 1'b0;
      cpm_entry  <= 1'b1;
    end else begin
      tick_d    <= cyc_tick && (mode == M_CPM);
      cpm_entry <= (mode != M_CPM);
      if (mode != M_CPM)                 adc_fresh <= 1'b0;
      else if (adc_valid && !cpm_entry)  adc_fresh <= 1'b1;
      timer  <= timer + 1;
      if (mm_arm) begin
        // new transient (from CPM, or a further step during the sequence)
        mode       <= M_SLEW;
        undershoot <= mm_under;
        timer      <= 0;
        trk_ok     <= 1'b0;
        zero_cap   <= 1'b0;
        entry_pend <= 1'b1;
        entry_ext  <= 1'b0;
      end else begin
        unique case (mode)
          // The first update after entering CPM waits for a conversion of
          // the S&H, so that i_ctrl[n-1] is the value now programmed.
          M_CPM: if (cyc_tick && adc_fresh) begin
            if (int'(i_steady) < I_PFM_ENTER) begin
              mode      <= M_PFM;
              i_ctrl    <= icode_t'(I_PFM);
              pfm_gap   <= PFM_GAP;
              pfm_busy  <= 1'b0;
              pfm_armed <= 1'b0;
            end else begin
              i_ctrl <= i_steady;
            end
          end
          M_SLEW: begin
            if (adc_valid) trk_ok <= 1'b1;
            // The level current at arming is only known once the tracking
            // ADC, which was following the DAC, has converted the sensed
            // current: about one conversion late. With every switch forced
            // the current ramps linearly, so the second result is used to
            // extrapolate the first one back by one conversion interval.
            if (mm_grow && trk_ok) begin
              i_entry    <= adc_code;
              entry_pend <= 1'b0;
              entry_ext  <= 1'b0;
            end else if (mm_grow || (entry_pend && adc_valid)) begin
              i_entry    <= adc_code;
              entry_pend <= !adc_valid;
              entry_ext  <= adc_valid;
            end else if (entry_ext && adc_valid) begin
              i_entry    <= sat_code(2 * int'(i_entry) - int'(adc_code), (1 << IW) - 1);
              entry_ext  <= 1'b0;
            end
            // With all switches off the current cannot fall below zero: once
            // the tracked current of every phase is zero the capture is
            // taken at once (the voltage peak may lie outside the ADC window
            // and take long).
            if (extreme || (!undershoot && trk_ok && adc_zero)) begin
              i_exit <= adc_code;
              // no correction without tracking or at zero current
              if (!trk_ok || !extreme) i_entry <= adc_code;
              zero_cap <= adc_zero;
              mode   <= M_CAPTURE;
              timer  <= 0;
            end
          end
          M_CAPTURE: if (timer == SHORT_CLKS - 1) begin
            mode  <= M_CONVERT;
            timer <= 0;
          end
          M_CONVERT: if (adc_valid) begin
            i_new <= sat_code(int'(adc_code) - (int'(i_exit) - int'(i_entry)) / 2,
                              (1 << IW) - 1);
            mode  <= M_PEAK;
            done  <= '0;
            dmin  <= 1 << EW;
            timer <= 0;
          end
          M_PEAK: begin
            dmin <= (dev < dmin) ? dev : dmin;
            done <= done_nx;
            if (&done_nx) begin
              mode  <= M_RETURN;
              done  <= '0;
              timer <= 0;
            end else if (timer >= TIMEOUT) begin
              mode   <= settle_mode(i_new, zero_cap, e);
              i_ctrl <= settle_ref(i_new);
            end
          end
          M_RETURN: begin
            dmin <= (dev < dmin) ? dev : dmin;
            done <= done_nx;
            if (&done_nx || timer >= TIMEOUT) begin
              mode      <= settle_mode(i_new, zero_cap, e);
              i_ctrl    <= settle_ref(i_new);
              pfm_gap   <= PFM_GAP;
              pfm_busy  <= 1'b0;
              pfm_armed <= 1'b0;
            end
          end
          M_PFM: begin
            if (pfm_gap < PFM_GAP) pfm_gap <= pfm_gap + 1;
            if (e <= err_t'(1)) pfm_armed <= 1'b1;
            if (e >= err_t'(3)) begin
              // the error has grown past the PFM start level: back to CPM,
              // where |e| >= 2 starts the transient sequence
              mode   <= M_CPM;
              i_ctrl <= icode_t'(I_PFM);
            end else if (pfm_req) begin
              if (pfm_gap < PFM_GAP) begin
                // requests faster than the switching frequency: back to CPM
                mode   <= M_CPM;
                i_ctrl <= icode_t'(I_PFM);
              end else begin
                pfm_busy  <= 1'b1;
                pfm_armed <= 1'b0;
                pfm_gap   <= 0;
              end
            end else if (pfm_busy && cmp[pfm_phase]) begin
              pfm_busy  <= 1'b0;
              pfm_phase <= (pfm_phase == N_PHASES - 1) ? 0 : pfm_phase + 1;
            end
          end
          default: mode <= M_CPM;
        endcase
      end
    end
  end

endmodule
