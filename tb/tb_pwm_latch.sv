// tb_pwm_latch: drives random set / comparator / force inputs and compares
// the gate with a reference model of the priorities (force_off, then the
// comparator reset, then force_on, then set), one clock of latency.
module tb_pwm_latch;
  logic clk = 0, rst_n = 0, set = 0, cmp = 0, force_on = 0, force_off = 0, gate;
  int checks = 0, failures = 0, n_on = 0, n_off = 0;
  logic model;

  pwm_latch dut (.*);

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    model = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      set       = ($urandom % 4) == 0;
      cmp       = ($urandom % 5) == 0;
      force_on  = ($urandom % 6) == 0;
      force_off = ($urandom % 8) == 0;
      if (force_off)     model = 0;
      else if (cmp)      model = 0;
      else if (force_on) model = 1;
      else if (set)      model = 1;
      @(posedge clk); #1;
      checks++;
      if (gate) n_on++; else n_off++;
      if (gate !== model) begin
        failures++;
        if (failures < 10) $display("n=%0d set=%b cmp=%b fon=%b foff=%b gate=%b exp=%b",
                                    n, set, cmp, force_on, force_off, gate, model);
      end
    end
    // a set with no reset must hold the switch on over idle cycles
    @(negedge clk); set = 1; cmp = 0; force_on = 0; force_off = 0;
    @(negedge clk); set = 0;
    repeat (5) @(negedge clk);
    checks++; if (gate !== 1'b1) begin failures++; $display("latch did not hold"); end
    if (n_on == 0 || n_off == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
