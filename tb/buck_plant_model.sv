// buck_plant_model: behavioural model (testbench only) of an N-phase
// interleaved synchronous buck power stage with diode emulation, advanced
// by forward Euler once per controller clock:
//   diL_k/dt = ((gate_k ? VG : 0) - vout) / L    (iL_k clamped at 0 when off)
//   dvout/dt = (sum_k iL_k - iload) / C
// Defaults: 5 V input, 2.2 uH per phase, 220 uF output capacitance, 20 ns
// step (50 MHz controller clock).
module buck_plant_model #(
  parameter int  N_PHASES = 2,
  parameter real VG       = 5.0,
  parameter real L        = 2.2e-6,
  parameter real C        = 220.0e-6,
  parameter real DT       = 20.0e-9
) (
  input  logic                clk,
  input  logic [N_PHASES-1:0] gate,
  input  real                 iload,
  input  real                 v_init,
  input  logic                init,
  output real                 vout,
  output real                 il [N_PHASES]
);

  always_ff @(posedge clk) begin
    real isum, vn;
    if (init) begin
      vout <= v_init;
      for (int k = 0; k < N_PHASES; k++) il[k] <= iload / N_PHASES;
    end else begin
      isum = 0.0;
      for (int k = 0; k < N_PHASES; k++) begin
        vn = il[k] + ((gate[k] ? VG : 0.0) - vout) / L * DT;
        if (!gate[k] && vn < 0.0) vn = 0.0;
        il[k] <= vn;
        isum = isum + il[k];
      end
      vout <= vout + (isum - iload) / C * DT;
    end
  end

endmodule
