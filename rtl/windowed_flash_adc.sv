// windowed_flash_adc: behavioural model (not synthesizable) of the windowed
// flash ADC that samples the converter output voltage and produces the
// voltage-loop error e[n] = Vref - Vout in LSBs.
//
// A real part is a small bank of comparators whose thresholds sit in a narrow
// window around the reference; its thermometer output is encoded into a
// signed code. Here the comparator bank is modelled by rounding
// (Vref - Vout)/V_LSB to the nearest integer and clipping it to the 4-bit
// window [-8, 7]: outside the window the code saturates. A positive error
// means the output is below the reference.
//
// The document gives the converter's function and its place in the loop; the
// 4-bit width is that of the error bus in its simulation waveforms, the
// 10 mV LSB is this design's assumption. The model samples once per clock
// and its output is registered (one clock of latency).
module windowed_flash_adc
  import mscpm_pkg::*;
#(
  parameter real V_LSB = 0.01   // volts per LSB of e
) (
  input  logic clk,
  input  logic rst_n,
  input  real  vout,
  input  real  vref,
  output err_t e
);

  localparam int EMAX = (1 << (EW - 1)) - 1;
  localparam int EMIN = -(1 << (EW - 1));

  int q;

  always_comb begin
    q = $rtoi(((vref - vout) / V_LSB) + ((vref >= vout) ? 0.5 : -0.5));
    if (q > EMAX) q = EMAX;
    if (q < EMIN) q = EMIN;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) e <= '0;
    else        e <= err_t'(q);
  end

endmodule
