// multiphase_step_rig: testbench helper that closes the loop around one
// N-phase controller (mscpm_top) and a behavioural N-phase buck power stage,
// and runs the per-phase load step LO -> 4.5 A (light-to-heavy), then
// back to LO (heavy-to-light). The delta-i table gain is scaled by 2/N
// from the two-phase default, since N phases share the recovery current.
// When `go` rises it runs its script, then raises `done` and reports its own
// check and failure counts; the parent adds them to its totals.
// Checks: regulation, CPM mode and equal phase currents before and after each
// step, S&H averaging (all S&H voltages equal at the end of the short
// connection), the undershoot and overshoot against the time-optimal
// minimum of this power stage, and the length of the transient sequence.
module multiphase_step_rig #(
  parameter int  N       = 3,
  parameter int  DI_GAIN = 379,
  parameter real LO      = 0.5    // light load per phase (A)
) (
  input  logic clk,
  input  logic go,
  output logic done,
  output int   checks,
  output int   failures
);
  import mscpm_pkg::*;
  localparam real VREF = 1.8;
  localparam real VG   = 5.0;
  localparam real L    = 2.2e-6;
  localparam real C    = 220.0e-6;
  localparam real HI   = 4.5;       // heavy load per phase (A)

  // Smallest possible deviation for the step: the N inductors slew by
  // (HI - LO) each at the rate v_slew / L, and the capacitor supplies or
  // absorbs the triangle of charge, C*dv = N*L*(HI-LO)^2 / (2*v_slew).
  function automatic real dv_bound(input real v_slew);
    return 1.5 * N * L * (HI - LO) * (HI - LO) / (2.0 * C * v_slew) + 0.03;
  endfunction

  logic rst_n = 0, init = 1;
  real iload = LO * N, vout, il [N];
  logic [N-1:0] gate;
  err_t e; mode_t mode; logic state_transient, di_limited;
  icode_t dac_code, i_new, di; dv_t dv;
  icode_t adc_code [N];
  real v_sh [N], iref [N];

  buck_plant_model #(.N_PHASES(N)) plant (
    .clk, .gate, .iload, .v_init(VREF), .init, .vout, .il);

  mscpm_top #(.N_PHASES(N), .DI_GAIN(DI_GAIN)) dut (
    .clk, .rst_n, .vout, .vref(VREF), .isense(il), .gate, .e, .mode,
    .state_transient, .dac_code, .i_new, .dv, .di, .di_limited,
    .adc_code, .v_sh, .iref);

  initial begin done = 0; checks = 0; failures = 0; end

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("%0t FAIL N=%0d %s", $time, N, what); end
  endtask

  // S&H averaging: at the falling edge of the short connection all
  // capacitors must hold the same voltage.
  logic short_q = 0;
  int   n_short = 0, n_under = 0, n_over = 0, tr_len = 0, tr_max = 0;
  real  vmin = 10.0, vmax = 0.0;
  always @(posedge clk) if (rst_n) begin
    if (short_q && !dut.u_mode.sh_short) begin
      real spread = 0.0;
      for (int k = 1; k < N; k++)
        if (v_sh[k] - v_sh[0] > spread || v_sh[0] - v_sh[k] > spread)
          spread = (v_sh[k] > v_sh[0]) ? v_sh[k] - v_sh[0] : v_sh[0] - v_sh[k];
      chk(spread < 1.0e-9, "S&H voltages equal after short-connection");
      n_short++;
    end
    short_q = dut.u_mode.sh_short;
    if (state_transient) tr_len++;
    else begin
      if (tr_len > tr_max) tr_max = tr_len;
      tr_len = 0;
    end
    if (vout < vmin) vmin = vout;
    if (vout > vmax) vmax = vout;
  end

  mode_t mode_q = M_CPM;
  always @(posedge clk) if (rst_n) begin
    if (mode == M_SLEW && mode_q != M_SLEW) begin
      if (dut.u_mode.undershoot) n_under++; else n_over++;
    end
    mode_q = mode;
  end

  // Hold a per-phase load for `us` microseconds; judge the last 10 us.
  task automatic segment(input real per_phase, input int us, input string name);
    real vsum, isum [N], iavg, worst;
    int  n, n_cpm;
    @(negedge clk);
    iload = per_phase * N;
    vmin = 10.0; vmax = 0.0; tr_max = 0;
    vsum = 0.0; n = 0; n_cpm = 0;
    for (int k = 0; k < N; k++) isum[k] = 0.0;
    repeat (us * 50 - 500) @(posedge clk);
    repeat (500) begin
      @(posedge clk);
      vsum += vout; n++;
      for (int k = 0; k < N; k++) isum[k] += il[k];
      if (mode == M_CPM) n_cpm++;
    end
    iavg = 0.0;
    for (int k = 0; k < N; k++) iavg += isum[k] / n / N;
    worst = 0.0;
    for (int k = 0; k < N; k++) begin
      real d = isum[k] / n - iavg;
      if (d < 0.0) d = -d;
      if (d > worst) worst = d;
    end
    $display("N=%0d %-26s vavg=%.4f V vmin=%.4f vmax=%.4f mean phase current=%.2f A (spread %.3f A) dac=%0d longest transient=%0d clk",
             N, name, vsum / n, vmin, vmax, iavg, worst, dac_code, tr_max);
    chk(vsum / n > VREF - 0.03 && vsum / n < VREF + 0.03, {name, ": output regulated"});
    chk(n_cpm * 10 >= n * 7, {name, ": back in CPM"});
    chk(worst < 0.35, {name, ": equal current sharing"});
    chk(iavg > per_phase - 0.3 && iavg < per_phase + 0.3, {name, ": phase current matches load / N"});
    chk(tr_max <= 1250, {name, ": transient sequence within 25 us"});
  endtask

  initial begin
    wait (go);
    repeat (3) @(posedge clk);
    rst_n = 1; init = 0;
    segment(LO, 100, $sformatf("%.1f A per phase", LO));
    segment(HI,  60, "step to 4.5 A per phase");
    chk(VREF - vmin < dv_bound(VG - VREF), "step up: undershoot within 1.5x the time-optimal minimum + 30 mV");
    segment(LO,  80, $sformatf("step back to %.1f A per phase", LO));
    chk(vmax - VREF < dv_bound(VREF), "step down: overshoot within 1.5x the time-optimal minimum + 30 mV");
    chk(n_under > 0 && n_over > 0, "both transient directions seen");
    chk(n_short >= 2, "S&H short-connection in both transients");
    done = 1;
  end
endmodule
