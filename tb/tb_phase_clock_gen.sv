// tb_phase_clock_gen: three phases, period 30. Checks that each phase pulses
// once per period, that phase k follows phase 0 by k*10 clocks, that
// cyc_tick coincides with phase 0, and that nothing pulses while suspended.
module tb_phase_clock_gen;
  localparam int N = 3, P = 30;
  logic clk = 0, rst_n = 0, suspend = 0, cyc_tick;
  logic [N-1:0] phase_set;
  int checks = 0, failures = 0;
  int cyc = 0;
  int last [N];
  int ticks_last = -1;

  phase_clock_gen #(.N_PHASES(N), .PERIOD(P)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("cycle %0d: %s", cyc, what); end
  endtask

  initial begin
    for (int k = 0; k < N; k++) last[k] = -1;
    repeat (2) @(posedge clk);
    rst_n = 1;
    repeat (200) begin
      @(posedge clk); #1; cyc++;
      if (cyc_tick) begin
        chk(phase_set[0], "cyc_tick without phase 0");
        if (ticks_last >= 0) chk(cyc - ticks_last == P, "tick period");
        ticks_last = cyc;
      end
      for (int k = 0; k < N; k++)
        if (phase_set[k]) begin
          if (last[k] >= 0) chk(cyc - last[k] == P, "phase period");
          if (k > 0 && last[0] >= 0) chk(cyc - last[0] == k * P / N, "phase offset");
          last[k] = cyc;
        end
    end
    chk(ticks_last > 0 && last[N-1] > 0, "pulses seen");
    suspend = 1;
    repeat (100) begin
      @(posedge clk); #1; cyc++;
      chk(phase_set == '0 && !cyc_tick, "pulse while suspended");
    end
    @(negedge clk); suspend = 0;
    @(posedge clk); #1;
    chk(phase_set[0] && cyc_tick, "restart with phase 0");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
