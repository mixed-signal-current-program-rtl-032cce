// sa_dac_analog: behavioural model (not synthesizable) of the analog part of
// the per-phase "successive approximation DAC" blocks of the voltage loop,
// for all N_PHASES phases at once, together with the analog current-loop
// comparators. Per phase k it holds:
//   * the DAC that turns the digital reference dac_code into the analog
//     current reference iref[k] of the peak-current comparator;
//   * the analog multiplexer that connects either the DAC output
//     (sh_track = 0) or the sensed inductor current isense[k] (sh_track = 1)
//     to the sample-and-hold capacitor;
//   * the S&H capacitor, v_sh[k]: it follows the multiplexer while sh_hold
//     is low and keeps its charge while sh_hold is high; with sh_short also
//     high all capacitors are connected together and settle to their mean,
//     which is how the phases are given equal current references after a
//     transient;
//   * the comparator and internal DAC of the dual-mode ADC:
//     adc_cmp[k] = v_sh[k] >= adc_trial[k] * I_LSB;
//   * the current-loop comparator: cur_cmp[k] = isense[k] >= iref[k].
// All analog quantities are expressed in amperes of inductor current (the
// current-sense gain A*Rsense cancels out). The capacitors are updated once
// per controller clock, and the short-connection settles within one clock.
//
// The document gives the blocks and their roles; the reference taken from
// the DAC output, the ideal components and I_LSB = 45 mA per code are this
// design's assumptions.
module sa_dac_analog
  import mscpm_pkg::*;
#(
  parameter int  N_PHASES = 2,
  parameter real I_LSB    = 0.045   // amperes per current code
) (
  input  logic                clk,
  input  logic                rst_n,
  input  icode_t              dac_code,
  input  real                 isense    [N_PHASES],
  input  logic                sh_track,
  input  logic                sh_hold,
  input  logic                sh_short,
  input  icode_t              adc_trial [N_PHASES],
  output real                 iref      [N_PHASES],
  output real                 v_sh      [N_PHASES],
  output logic [N_PHASES-1:0] adc_cmp,
  output logic [N_PHASES-1:0] cur_cmp
);

  localparam real EPS = 1.0e-6;   // comparator offset, LSB fraction

  real mean;

  always_comb begin
    mean = 0.0;
    for (int k = 0; k < N_PHASES; k++) mean = mean + v_sh[k];
    mean = mean / N_PHASES;
    for (int k = 0; k < N_PHASES; k++) begin
      iref[k]    = real'(dac_code) * I_LSB;
      adc_cmp[k] = (v_sh[k] + EPS * I_LSB) >= real'(adc_trial[k]) * I_LSB;
      cur_cmp[k] = isense[k] >= iref[k];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < N_PHASES; k++) v_sh[k] <= 0.0;
    end else begin
      for (int k = 0; k < N_PHASES; k++) begin
        if (sh_hold) v_sh[k] <= sh_short ? mean : v_sh[k];
        else         v_sh[k] <= sh_track ? isense[k] : iref[k];
      end
    end
  end

endmodule
