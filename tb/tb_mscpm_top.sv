// tb_mscpm_top: closed-loop test of the complete two-phase controller, at
// its default parameters, driving a behavioural 5 V -> 1.8 V interleaved buck
// power stage (2.2 uH per phase, 220 uF). The load current follows a script
// that exercises every mode of the controller:
//   2 A steady state -> 10 A step up (light-to-heavy transient)
//   -> 0.15 A step down (heavy-to-light transient, then PFM at light load)
//   -> 4 A (PFM -> CPM) -> 6.2 A then +2 A 2.2 to 3.1 us later (second step during
//   the on/off sequence) -> 16 A (peak reference clipped at I_MAX, current
//   limit while slewing) -> 6 A.
// At the end of each load segment it checks the regulated voltage, the mode
// (CPM or PFM) and the current sharing between the phases; it checks that
// each transient sequence ends within 25 us and that the 8 A step stays
// within 150 mV. Each mechanism is counted and must occur at least once.
module tb_mscpm_top;
  import mscpm_pkg::*;
  localparam int  N    = 2;
  localparam real VREF = 1.8;

  logic clk = 0, rst_n = 0, init = 1;
  real iload = 2.0, vout, il [N];
  logic [N-1:0] gate;
  err_t e; mode_t mode; logic state_transient, di_limited;
  icode_t dac_code, i_new, di; dv_t dv;
  icode_t adc_code [N];
  real v_sh [N], iref [N];
  int checks = 0, failures = 0;

  buck_plant_model #(.N_PHASES(N)) plant (
    .clk, .gate, .iload, .v_init(VREF), .init, .vout, .il);

  mscpm_top dut (
    .clk, .rst_n, .vout, .vref(VREF), .isense(il), .gate, .e, .mode,
    .state_transient, .dac_code, .i_new, .dv, .di, .di_limited,
    .adc_code, .v_sh, .iref);

  always #10 clk = ~clk;   // 50 MHz

  initial begin
    #2000000;   // 2 ms
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("%0t FAIL %s", $time, what); end
  endtask

  // ---- mechanism counters
  int n_under = 0, n_over = 0, n_short = 0, n_pfm_in = 0, n_pfm_pulse = 0;
  int n_pfm_out = 0, n_retrig = 0, n_ilimit = 0, n_peak_clip = 0;
  int tr_len = 0, tr_max = 0;
  mode_t mode_q = M_CPM;
  logic short_q = 0;
  real vmin = 10.0, vmax = 0.0;

  always @(posedge clk) if (rst_n) begin
    if (mode == M_SLEW && mode_q != M_SLEW) begin
      if (dut.u_mode.undershoot) n_under++; else n_over++;
      if (mode_q == M_PEAK || mode_q == M_RETURN) n_retrig++;
    end
    if (dut.u_mode.sh_short && !short_q) n_short++;
    if (mode == M_PFM && mode_q != M_PFM) n_pfm_in++;
    if (mode != M_PFM && mode_q == M_PFM) n_pfm_out++;
    if (|dut.u_mode.pfm_set) n_pfm_pulse++;
    if (mode == M_SLEW && dut.u_mode.undershoot && |dut.cur_cmp) n_ilimit++;
    if (mode == M_PEAK && di_limited && !(mode_q == M_PEAK)) n_peak_clip++;
    if (state_transient) tr_len++;
    else begin
      if (tr_len > tr_max) tr_max = tr_len;
      tr_len = 0;
    end
    if (vout < vmin) vmin = vout;
    if (vout > vmax) vmax = vout;
    mode_q  = mode;
    short_q = dut.u_mode.sh_short;
  end

  // Run a load segment of `us` microseconds; measure over its last 10 us.
  task automatic segment(input real load, input int us, input mode_t want,
                         input string name);
    real vsum, isum [N];
    int  n, nlast, n_want;
    @(negedge clk);
    iload = load;
    vmin = 10.0; vmax = 0.0; tr_max = 0;
    nlast = 500;                       // 10 us at 50 MHz
    vsum = 0.0; n = 0; n_want = 0;
    for (int k = 0; k < N; k++) isum[k] = 0.0;
    repeat (us * 50 - nlast) @(posedge clk);
    repeat (nlast) begin
      @(posedge clk);
      vsum += vout; n++;
      for (int k = 0; k < N; k++) isum[k] += il[k];
      if (mode == want) n_want++;
    end
    $display("%-22s load=%5.2f A  vavg=%.4f V  vmin=%.4f vmax=%.4f  mode=%s  il=%.2f/%.2f  longest transient=%0d clk",
             name, load, vsum / n, vmin, vmax, mode.name(), isum[0] / n, isum[N-1] / n, tr_max);
    chk(vsum / n > VREF - 0.03 && vsum / n < VREF + 0.03, {name, ": output regulated"});
    chk(n_want * 10 >= n * 7, {name, ": settled mode (70 % of the last 10 us)"});
    chk(tr_max <= 1250, {name, ": transient sequence within 25 us"});
    if (want == M_CPM)
      for (int k = 1; k < N; k++)
        chk(isum[k] / n - isum[0] / n < 0.35 && isum[0] / n - isum[k] / n < 0.35,
            {name, ": current sharing"});
  endtask

  int second_delay [4] = '{110, 125, 140, 155};

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1; init = 0;
    segment(2.0,  100, M_CPM, "start-up, 2 A");
    segment(10.0,  60, M_CPM, "8 A step up");
    chk(VREF - vmin < 0.15, "8 A step: undershoot below 150 mV");
    segment(0.15, 400, M_PFM, "step down to 0.15 A");
    segment(4.0,   60, M_CPM, "PFM exit, 4 A");
    // a second step at several delays after the first
    foreach (second_delay[i]) begin
      @(negedge clk); iload = 6.2;
      repeat (second_delay[i]) @(negedge clk);
      segment(8.2,  60, M_CPM, $sformatf("double step, +%0d clk", second_delay[i]));
      segment(4.0,  40, M_CPM, "back to 4 A");
    end
    segment(16.0,  60, M_CPM, "16 A, I_MAX clip");
    segment(6.0,   60, M_CPM, "back to 6 A");
    $display("mechanisms: under=%0d over=%0d short=%0d pfm_in=%0d pfm_pulses=%0d pfm_out=%0d retrigger=%0d ilimit=%0d peak_clip=%0d",
             n_under, n_over, n_short, n_pfm_in, n_pfm_pulse, n_pfm_out, n_retrig, n_ilimit, n_peak_clip);
    chk(n_under > 0, "light-to-heavy transient seen");
    chk(n_over > 0, "heavy-to-light transient seen");
    chk(n_short > 0, "S&H short-connection seen");
    chk(n_pfm_in > 0, "PFM entry seen");
    chk(n_pfm_pulse > 0, "PFM pulses seen");
    chk(n_pfm_out > 0, "PFM exit seen");
    chk(n_retrig > 0, "second step during the sequence seen");
    chk(n_ilimit > 0, "current limit at I_MAX seen");
    chk(n_peak_clip > 0, "i_peak clipped at I_MAX seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
