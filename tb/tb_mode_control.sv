// tb_mode_control: directed test of the mode controller with two phases and
// a 20-clock switching period. The surrounding blocks (integrator, ADC,
// min/max detection, delta-i calculator, comparators) are played by the
// testbench. It walks through: CPM reference update and ADC start; a
// light-to-heavy transient (force on at I_MAX, capture with short-connection,
// fast conversion, i_peak, return to i_ctrl_new, per-phase release); a
// heavy-to-light transient; CPM -> PFM entry, PFM pulses on alternating
// phases, PFM -> CPM exit; a second load step during the on/off sequence;
// the time-out; the correction of the captured current for the detection
// lag; and the zero-current capture after a heavy-to-light step.
module tb_mode_control;
  import mscpm_pkg::*;
  localparam int N = 2, P = 20, I_MAX = 200, I_PFM = 10, I_PFM_ENTER = 12;
  localparam int SHORT_CLKS = 4, TIMEOUT = 60;

  logic clk = 0, rst_n = 0, cyc_tick = 0, adc_valid = 0, extreme = 0, mm_grow = 0;
  logic adc_zero = 0;   // all phases' ADC results zero
  err_t e = '0;
  icode_t i_steady = '0, adc_code = '0, i_target = '0;
  logic [N-1:0] cmp = '0;
  logic mm_arm, mm_under, undershoot, sh_track, sh_hold, sh_short;
  logic adc_start, adc_async, adc_fast, clk_suspend, state_transient;
  icode_t i_new, dac_code;
  logic [N-1:0] set_en, force_on, force_off, pfm_set;
  mode_t mode;
  int checks = 0, failures = 0;

  mode_control #(.N_PHASES(N), .PERIOD(P), .I_MAX(I_MAX), .I_PFM(I_PFM),
                 .I_PFM_ENTER(I_PFM_ENTER), .SHORT_CLKS(SHORT_CLKS),
                 .TIMEOUT(TIMEOUT)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("%0t %s (mode=%s dac=%0d)", $time, what, mode.name(), dac_code);
    end
  endtask

  task automatic step(); @(posedge clk); #1; endtask
  task automatic drive(); @(negedge clk); endtask

  // A finished conversion of the S&H (CPM updates wait for one).
  task automatic adc_result(input icode_t code);
    drive(); adc_valid = 1; adc_code = code; step(); adc_valid = 0;
  endtask

  // Steps through capture and conversion; returns with mode M_PEAK.
  task automatic capture_and_convert(input icode_t code);
    int nstart;
    drive(); extreme = 1; step(); extreme = 0;
    chk(mode == M_CAPTURE, "capture after extreme");
    nstart = 0;
    for (int i = 0; i < SHORT_CLKS; i++) begin
      chk(sh_hold && sh_short && !sh_track, "hold + short in capture");
      if (adc_start) nstart++;
      step();
    end
    chk(nstart == 1, "one fast conversion start");
    chk(mode == M_CONVERT && adc_fast && !adc_async, "convert");
    drive(); adc_valid = 1; adc_code = code; step(); adc_valid = 0;
    chk(mode == M_PEAK && i_new == code, "i_ctrl_new captured");
    chk(!sh_hold && state_transient, "S&H released, still transient");
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    step();
    adc_result(8'd0);

    // ---- CPM: reference update once per period
    drive(); i_steady = 8'd50; cyc_tick = 1; step(); cyc_tick = 0;
    chk(mode == M_CPM && dac_code == 8'd50, "CPM reference = i_steady");
    chk(adc_start && !adc_fast && set_en == '1, "CPM ADC start / phase clocks enabled");
    drive(); i_steady = 8'd60; step();
    chk(dac_code == 8'd50, "reference only changes on cyc_tick");
    chk(!adc_start, "single ADC start");

    // ---- light-to-heavy transient
    drive(); e = 3; #1;
    chk(mm_arm && mm_under, "transient detected at e = 3");
    step();
    chk(mode == M_SLEW && state_transient, "slew");
    chk(force_on == '1 && dac_code == I_MAX, "switches on, reference at I_MAX");
    chk(sh_track && adc_async && adc_fast, "S&H tracks current, async fast ADC");
    drive(); e = 5; step();
    capture_and_convert(8'd80);
    drive(); i_target = 8'd130; #1;
    chk(dac_code == 8'd130 && force_on == '1, "reference = i_peak, switches on");
    cmp = 2'b01; step();
    chk(force_on == 2'b10 && force_off == 2'b01, "phase 0 reached the peak");
    drive(); cmp = 2'b10; step();
    chk(mode == M_RETURN && dac_code == 8'd80, "return, reference = i_ctrl_new");
    drive(); cmp = 2'b11; e = 1; step();
    chk(force_off == 2'b11 && set_en == 2'b00, "switches off until the current falls");
    drive(); cmp = 2'b10; step();
    chk(set_en == 2'b01 && force_off == 2'b10, "phase 0 released to CPM");
    drive(); cmp = 2'b00; step();
    chk(mode == M_CPM && dac_code == 8'd80 && !state_transient, "back to CPM at i_ctrl_new");

    // ---- heavy-to-light transient
    drive(); e = -4; #1;
    chk(mm_arm && !mm_under, "overshoot detected");
    step();
    chk(mode == M_SLEW && force_off == '1 && force_on == '0, "switches forced off");
    capture_and_convert(8'd30);
    drive(); i_target = 8'd5; cmp = 2'b11; e = -1; step();
    chk(dac_code == 8'd5 && force_off == '1, "valley reference, switches off");
    drive(); cmp = 2'b00; step();
    chk(mode == M_RETURN && dac_code == 8'd30 && force_on == 2'b11, "on until i_ctrl_new");
    drive(); cmp = 2'b01; step();
    drive(); cmp = 2'b11; step();
    chk(mode == M_CPM && dac_code == 8'd30, "CPM after overshoot recovery");

    // ---- CPM -> PFM
    step();
    adc_result(8'd30);
    drive(); e = 0; i_steady = 8'd8; cyc_tick = 1; step(); cyc_tick = 0;
    chk(mode == M_PFM && clk_suspend && dac_code == I_PFM, "PFM entry, clock suspended");
    drive(); cmp = 2'b00; e = 0; step();
    drive(); e = 2; #1;
    chk(pfm_set == 2'b01 && !mm_arm, "PFM pulse on phase 0 when e > 1");
    step();
    drive(); #1; chk(pfm_set == 2'b00, "one set per pulse");
    cmp = 2'b01; step();
    drive(); cmp = 2'b00; e = 0; repeat (P / N + 2) step();
    drive(); e = 2; #1;
    chk(pfm_set == 2'b10, "next PFM pulse on phase 1");
    step();
    drive(); cmp = 2'b10; step();
    drive(); cmp = 2'b00; e = 0; step();
    drive(); e = 2; #1;
    chk(pfm_set == 2'b00, "no pulse when requests come too fast");
    step();
    chk(mode == M_CPM && !clk_suspend && dac_code == I_PFM, "PFM -> CPM");

    // ---- second load step during the on/off sequence
    drive(); e = 3; step();
    chk(mode == M_SLEW, "slew 2");
    capture_and_convert(8'd90);
    drive(); e = 2; i_target = 8'd150; cmp = 2'b00; step();
    drive(); e = 3; step();
    chk(mode == M_PEAK, "no retrigger for a one-LSB move");
    drive(); e = 4; #1;
    chk(mm_arm, "retrigger on a further step");
    step();
    chk(mode == M_SLEW && force_on == '1, "new slew");

    // ---- time-out in M_PEAK
    capture_and_convert(8'd70);
    drive(); e = 1; cmp = 2'b00;
    repeat (TIMEOUT + 2) step();
    chk(mode == M_CPM && dac_code == 8'd70, "time-out back to CPM");

    // ---- lag correction: i_ctrl_new = sample - (i_exit - i_entry) / 2
    chk(mode == M_CPM, "CPM before lag test");
    drive(); e = 3; step();
    chk(mode == M_SLEW, "slew for lag test");
    drive(); adc_valid = 1; adc_code = 8'd40; step(); adc_valid = 0;
    drive(); mm_grow = 1; adc_code = 8'd50; step(); mm_grow = 0;
    drive(); extreme = 1; adc_code = 8'd70; step(); extreme = 0;
    chk(mode == M_CAPTURE, "capture for lag test");
    repeat (SHORT_CLKS) step();
    drive(); adc_valid = 1; adc_code = 8'd72; step(); adc_valid = 0;
    chk(mode == M_PEAK && i_new == 8'd62, "lag-corrected i_ctrl_new");

    // ---- no new level after arming: the first tracking result is
    // extrapolated back one conversion with the second one
    // (i_entry = 2*30 - 38 = 22; i_ctrl_new = 60 - (56 - 22)/2 = 43)
    drive(); e = 1; repeat (TIMEOUT + 2) step();
    drive(); e = 3; step();
    chk(mode == M_SLEW, "slew for extrapolation test");
    drive(); adc_valid = 1; adc_code = 8'd30; step(); adc_valid = 0;
    drive(); adc_valid = 1; adc_code = 8'd38; step(); adc_valid = 0;
    drive(); extreme = 1; adc_code = 8'd56; step(); extreme = 0;
    chk(mode == M_CAPTURE, "capture for extrapolation test");
    repeat (SHORT_CLKS) step();
    drive(); adc_valid = 1; adc_code = 8'd60; step(); adc_valid = 0;
    chk(mode == M_PEAK && i_new == 8'd43, "entry current extrapolated to the arm time");

    // ---- zero-current capture while the switches are forced off
    drive(); e = 1; repeat (TIMEOUT + 2) step();
    drive(); e = -3; step();
    chk(mode == M_SLEW && force_off == '1, "slew off for zero-current test");
    drive(); adc_valid = 1; adc_code = 8'd30; step(); adc_valid = 0;
    drive(); adc_valid = 1; adc_code = 8'd0; step(); adc_valid = 0;
    step();
    chk(mode == M_SLEW, "phase 0 at zero, another phase not: keep tracking");
    drive(); adc_valid = 1; adc_code = 8'd0; adc_zero = 1; step(); adc_valid = 0;
    step();
    chk(mode == M_CAPTURE, "capture once every tracked current is zero");
    repeat (SHORT_CLKS) step();
    drive(); adc_valid = 1; adc_code = 8'd0; step(); adc_valid = 0;
    chk(mode == M_PEAK && i_new == 8'd0, "zero current captured");
    drive(); i_target = 8'd0; cmp = 2'b11; step();
    chk(mode == M_RETURN, "zero valley level ends M_PEAK at once");
    drive(); cmp = 2'b11; step();
    chk(mode == M_PFM, "zero-current capture, output still high: wait in PFM");
    drive(); e = 3; step();
    chk(mode == M_CPM, "PFM left when the error reaches 3");

    // ---- zero-current capture with the output back near the reference
    drive(); e = 0; adc_zero = 0; repeat (3) step();
    drive(); e = -2; step();
    chk(mode == M_SLEW && force_off == '1, "slew off, second zero-current test");
    drive(); adc_valid = 1; adc_code = 8'd0; adc_zero = 1; step(); adc_valid = 0;
    drive(); adc_valid = 1; step(); adc_valid = 0;
    step();
    chk(mode == M_CAPTURE, "second zero-current capture");
    repeat (SHORT_CLKS) step();
    drive(); adc_valid = 1; step(); adc_valid = 0;
    drive(); e = -1; i_target = 8'd0; cmp = 2'b11; step();
    drive(); step();
    chk(mode == M_CPM && dac_code == 8'(I_PFM), "load unknown: CPM at the PFM reference");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
