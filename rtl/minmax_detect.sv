// minmax_detect: Min/Max detection of the voltage loop. During a load
// transient it follows the windowed flash ADC error e[n] and finds the
// output-voltage valley (light-to-heavy step, e > 0 = output below reference)
// or peak (heavy-to-light step, e < 0). At that point it pulses `extreme` for
// one clock and reports the size of the deviation, delta-v, in ADC LSBs.
// The mode controller then captures the inductor currents (the "new steady
// state value" of the waveforms in the document) and the Optimal delta-i
// calculator turns delta-v into the extra current of the on/off action.
//
// How the extremum is found is this design's choice: the document gives only
// the block's name and purpose. The block keeps the largest deviation seen
// since `arm`; the first sample that is at least one LSB smaller marks the
// extremum. With a quantised error this lags the true extremum by the time
// the voltage takes to recover half an LSB.
//
// `grow` pulses whenever the deviation enters a new, larger level. Near the
// extremum the voltage is a parabola, symmetric about its vertex, so the
// extremum lies midway between the last `grow` and `extreme`; the mode
// controller uses this to correct the captured current for the detection
// lag.
//
// Interface: arm (one-clock pulse, starts tracking, samples `undershoot`),
// e (signed error), extreme (one-clock pulse), dv (deviation at the
// extremum, held until the next arm), active (tracking in progress),
// grow (one-clock pulse).
// Timing: `extreme` is registered, one clock after the sample that shows
// the deviation shrinking.
module minmax_detect
  import mscpm_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  logic arm,
  input  logic undershoot,   // 1: look for a valley (e > 0), 0: a peak
  input  err_t e,
  output logic extreme,
  output dv_t  dv,
  output logic active,
  output logic grow          // pulse: the deviation reached a new level
);

  logic dir_under;
  int   dev;          // deviation of this sample in the tracked direction
  int   best;         // largest deviation so far (held in dv)

  always_comb begin
    dev  = (arm ? undershoot : dir_under) ? int'(e) : -int'(e);
    best = int'(dv);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      dir_under <= 1'b1;
      dv        <= '0;
      extreme   <= 1'b0;
      active    <= 1'b0;
      grow      <= 1'b0;
    end else begin
      extreme <= 1'b0;
      grow    <= 1'b0;
      if (arm) begin
        grow      <= 1'b1;
        dir_under <= undershoot;
        active    <= 1'b1;
        dv        <= dev > 0 ? dv_t'(dev) : '0;
      end else if (active) begin
        if (dev > best) begin
          dv   <= dv_t'(dev);
          grow <= 1'b1;
        end else if (dev < best) begin
          extreme <= 1'b1;
          active  <= 1'b0;
        end
      end
    end
  end

endmodule
