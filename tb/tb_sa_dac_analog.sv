// tb_sa_dac_analog: three phases. Checks the DAC level, the current-loop
// and ADC comparators, S&H tracking of the DAC and of the sensed currents,
// holding, and the short-connection that leaves every capacitor at the mean
// of the held samples.
module tb_sa_dac_analog;
  import mscpm_pkg::*;
  localparam int N = 3;
  localparam real LSB = 0.045;
  logic clk = 0, rst_n = 0, sh_track = 0, sh_hold = 0, sh_short = 0;
  icode_t dac_code = '0;
  real isense [N];
  icode_t adc_trial [N];
  real iref [N], v_sh [N];
  logic [N-1:0] adc_cmp, cur_cmp;
  int checks = 0, failures = 0;

  sa_dac_analog #(.N_PHASES(N), .I_LSB(LSB)) dut (.*);

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
    if (!ok) begin failures++; if (failures < 10) $display("%s", what); end
  endtask

  function automatic bit near(real a, real b);
    return (a - b < 1.0e-9) && (b - a < 1.0e-9);
  endfunction

  initial begin
    real m;
    for (int k = 0; k < N; k++) begin isense[k] = 0.0; adc_trial[k] = '0; end
    repeat (2) @(posedge clk);
    rst_n = 1;
    // DAC and tracking of the DAC
    @(negedge clk); dac_code = 8'd100;
    isense[0] = 4.4; isense[1] = 4.5; isense[2] = 4.6;
    @(posedge clk); #1;
    for (int k = 0; k < N; k++) begin
      chk(near(iref[k], 4.5), "dac level");
      chk(near(v_sh[k], 4.5), "S&H follows DAC");
    end
    chk(cur_cmp == 3'b110, "current comparators");
    // ADC comparator around the held level
    adc_trial[0] = 8'd100; adc_trial[1] = 8'd101; adc_trial[2] = 8'd99; #1;
    chk(adc_cmp == 3'b101, "adc comparators");
    // track the sensed currents, then hold them
    @(negedge clk); sh_track = 1; isense[0] = 1.0; isense[1] = 2.0; isense[2] = 6.0;
    @(posedge clk); #1;
    chk(near(v_sh[0], 1.0) && near(v_sh[1], 2.0) && near(v_sh[2], 6.0), "S&H tracks current");
    @(negedge clk); sh_hold = 1; isense[0] = 7.0;
    @(posedge clk); #1;
    chk(near(v_sh[0], 1.0), "S&H holds");
    // short-connect: all capacitors to the mean
    @(negedge clk); sh_short = 1;
    @(posedge clk); #1;
    m = (1.0 + 2.0 + 6.0) / 3.0;
    for (int k = 0; k < N; k++) chk(near(v_sh[k], m), "short-connection mean");
    @(negedge clk); sh_short = 0; sh_hold = 0; sh_track = 0;
    @(posedge clk); #1;
    chk(near(v_sh[2], 4.5), "back to DAC");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
