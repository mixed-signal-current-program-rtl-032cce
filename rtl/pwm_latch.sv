// pwm_latch: the SR latch that closes one phase's analog peak-current loop
// and produces its duty pulse (gate drive of the main switch).
//
//   * set:       the phase's clock pulse in CPM, or the windowed-ADC request
//                in PFM, turns the switch on;
//   * cmp:       the analog current comparator (sensed current >= reference)
//                resets the latch and ends the on-time;
//   * force_on:  transient mode keeps the switch on; the comparator still
//                turns it off for as long as the current is at or above the
//                reference, which is then the maximum allowable value, so the
//                current is limited (the document's current protection);
//   * force_off: transient mode keeps the switch off.
// Reset dominates set, and force_off dominates everything. The latch is
// built as a flip-flop on the controller clock, which is this design's
// choice: the document's latch is asynchronous. Its output therefore lags
// set or cmp by one clock.
module pwm_latch (
  input  logic clk,
  input  logic rst_n,
  input  logic set,
  input  logic cmp,
  input  logic force_on,
  input  logic force_off,
  output logic gate
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)         gate <= 1'b0;
    else if (force_off) gate <= 1'b0;
    else if (cmp)       gate <= 1'b0;
    else if (force_on)  gate <= 1'b1;
    else if (set)       gate <= 1'b1;
  end

endmodule
