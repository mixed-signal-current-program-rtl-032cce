// mscpm_top: multiphase mixed-signal current-programmed-mode controller with
// time-optimal load-transient recovery, for an N-phase interleaved buck
// converter.
//
// The voltage loop is digital: a windowed flash ADC turns the output voltage
// into a small error e[n], a per-period integrator sets the peak-current
// reference i_ctrl[n], and the mode controller switches between clocked CPM,
// a one-shot transient sequence (forced on/off, capture of the inductor
// currents at the voltage extremum, averaging of the captured currents by
// short-connecting the S&H capacitors, then one on/off action sized by the
// capacitor-charge-balance LUT) and PFM at light load. The current loops are
// analog: per phase a DAC sets the comparator reference, the comparator
// resets an SR latch that the interleaved phase clock sets.
//
// Analog parts (windowed flash ADC, DAC, multiplexer, S&H capacitors,
// comparators) are behavioural models with real-valued signals in amperes
// and volts; everything else is synthesizable. isense[k] is the sensed
// inductor current of phase k, gate[k] its main-switch command.
// The mode controller sees the mean of the phases' ADC results, so that
// the currents it tracks during a transient carry no interleaving ripple.
// The phase ADCs start together and run in lockstep, so only phase 0's
// valid strobe is used; the ADCs' busy flags and the detector's active flag
// are status outputs that this top does not need (lint reports them as
// unused).
//
// Block structure and mode behaviour follow the document; defaults are the
// two-phase, 1 MHz prototype (5 V to 1.8 V) with a 50 MHz controller clock.
// Sizes not given by the document (clock, LSBs, gains, thresholds) are this
// design's assumptions and are listed at each block.
module mscpm_top
  import mscpm_pkg::*;
#(
  parameter int  N_PHASES    = 2,
  parameter int  PERIOD      = 50,
  parameter int  K           = 1,
  parameter int  I_MAX       = 200,
  parameter int  I_PFM       = 10,
  parameter int  I_PFM_ENTER = 8,
  parameter int  DI_GAIN     = 569,
  parameter int  SHORT_CLKS  = 4,
  parameter int  TIMEOUT     = 200,
  parameter int  SLOW_DIV    = 4,
  parameter real V_LSB       = 0.01,
  parameter real I_LSB       = 0.045
) (
  input  logic                clk,
  input  logic                rst_n,
  input  real                 vout,
  input  real                 vref,
  input  real                 isense   [N_PHASES],
  output logic [N_PHASES-1:0] gate,
  output err_t                e,
  output mode_t               mode,
  output logic                state_transient,
  output icode_t              dac_code,
  output icode_t              i_new,
  output dv_t                 dv,
  output icode_t              di,
  output logic                di_limited,
  output icode_t              adc_code [N_PHASES],
  output real                 v_sh     [N_PHASES],
  output real                 iref     [N_PHASES]
);

  logic [N_PHASES-1:0] phase_set, set_en, force_on, force_off, pfm_set;
  logic [N_PHASES-1:0] adc_cmp, cur_cmp, adc_valid, adc_busy;
  icode_t              adc_trial [N_PHASES];
  logic   cyc_tick, clk_suspend;
  icode_t i_steady, i_target;
  logic   extreme, mm_grow, mm_arm, mm_under, mm_active, undershoot;
  logic   sh_track, sh_hold, sh_short, adc_start, adc_async, adc_fast;
  logic   adc_zero;
  icode_t adc_mean;

  // Mean of the phases' ADC results (rounded), and whether every phase's
  // tracked current has been converted to zero. While tracking, the mean is
  // the sum of the phase currents over N, free of the interleaving ripple
  // that any single phase carries; after the short connection, and in CPM,
  // all results are equal and the mean is that common value.
  always_comb begin
    int sum;
    sum      = 0;
    adc_zero = 1'b1;
    for (int k = 0; k < N_PHASES; k++) begin
      sum += int'(adc_code[k]);
      if (adc_code[k] != '0) adc_zero = 1'b0;
    end
    adc_mean = icode_t'((sum + N_PHASES / 2) / N_PHASES);
  end

  phase_clock_gen #(.N_PHASES(N_PHASES), .PERIOD(PERIOD)) u_clkgen (
    .clk, .rst_n, .suspend(clk_suspend), .phase_set, .cyc_tick);

  windowed_flash_adc #(.V_LSB(V_LSB)) u_wadc (
    .clk, .rst_n, .vout, .vref, .e);

  cpm_integrator #(.K(K), .I_MAX(I_MAX)) u_integ (
    .e, .i_prev(adc_code[0]), .i_steady);

  minmax_detect u_minmax (
    .clk, .rst_n, .arm(mm_arm), .undershoot(mm_under), .e,
    .extreme, .dv, .active(mm_active), .grow(mm_grow));

  optimal_di_calc #(.DI_GAIN(DI_GAIN), .I_MAX(I_MAX)) u_di (
    .dv, .i_new, .undershoot, .di, .i_target, .limited(di_limited));

  mode_control #(
    .N_PHASES(N_PHASES), .PERIOD(PERIOD), .I_MAX(I_MAX), .I_PFM(I_PFM),
    .I_PFM_ENTER(I_PFM_ENTER), .SHORT_CLKS(SHORT_CLKS), .TIMEOUT(TIMEOUT)
  ) u_mode (
    .clk, .rst_n, .cyc_tick, .e, .i_steady, .adc_code(adc_mean),
    .adc_valid(adc_valid[0]), .adc_zero, .extreme, .mm_grow, .i_target, .cmp(cur_cmp),
    .mm_arm, .mm_under, .undershoot, .i_new, .dac_code,
    .sh_track, .sh_hold, .sh_short, .adc_start, .adc_async, .adc_fast,
    .clk_suspend, .set_en, .force_on, .force_off, .pfm_set,
    .mode, .state_transient);

  sa_dac_analog #(.N_PHASES(N_PHASES), .I_LSB(I_LSB)) u_analog (
    .clk, .rst_n, .dac_code, .isense, .sh_track, .sh_hold, .sh_short,
    .adc_trial, .iref, .v_sh, .adc_cmp, .cur_cmp);

  for (genvar k = 0; k < N_PHASES; k++) begin : g_phase
    dual_mode_adc #(.SLOW_DIV(SLOW_DIV)) u_adc (
      .clk, .rst_n, .start(adc_start), .async_mode(adc_async), .fast(adc_fast),
      .cmp(adc_cmp[k]), .trial(adc_trial[k]), .code(adc_code[k]),
      .valid(adc_valid[k]), .busy(adc_busy[k]));

    pwm_latch u_latch (
      .clk, .rst_n, .set((phase_set[k] & set_en[k]) | pfm_set[k]),
      .cmp(cur_cmp[k]), .force_on(force_on[k]), .force_off(force_off[k]),
      .gate(gate[k]));
  end

endmodule
