// phase_clock_gen: the switching clock generator of the interleaved CPM
// converter. A counter divides the controller clock down to the switching
// frequency; phase k receives its set pulse (start of its on-time) at count
// k*PERIOD/N_PHASES, so the N phases are evenly interleaved. `cyc_tick`
// marks the start of each switching period and paces the voltage loop
// (eq. (1) is evaluated once per period).
//
// Following the document, the generator is suspended in PFM: while `suspend`
// is high the counter rests at zero and no pulses are issued; the first
// period after `suspend` falls starts at once with phase 0. Using a single
// counter with equally spaced compare points is this design's choice.
//
// Defaults: 50 MHz controller clock / PERIOD 50 = 1 MHz switching, the
// document's prototype frequency; the 50 MHz clock is an assumption.
// Timing: all outputs are registered one-clock pulses.
module phase_clock_gen #(
  parameter int N_PHASES = 2,
  parameter int PERIOD   = 50   // controller clocks per switching period
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                suspend,
  output logic [N_PHASES-1:0] phase_set,
  output logic                cyc_tick
);

  int cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt       <= 0;
      phase_set <= '0;
      cyc_tick  <= 1'b0;
    end else if (suspend) begin
      cnt       <= 0;
      phase_set <= '0;
      cyc_tick  <= 1'b0;
    end else begin
      cnt      <= (cnt == PERIOD - 1) ? 0 : cnt + 1;
      cyc_tick <= (cnt == 0);
      for (int k = 0; k < N_PHASES; k++)
        phase_set[k] <= (cnt == (k * PERIOD) / N_PHASES);
    end
  end

endmodule
