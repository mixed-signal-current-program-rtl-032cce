// tb_dual_mode_adc: the converter works against a comparator modelled here
// (v >= trial * LSB). Checks the result (floor of v / LSB) for random inputs
// in the synchronous mode at both rates, the conversion time (8 clocks fast,
// 8 * SLOW_DIV slow), and that the asynchronous mode converts back to back
// and follows a moving input.
module tb_dual_mode_adc;
  import mscpm_pkg::*;
  localparam int SLOW_DIV = 4;
  localparam real LSB = 0.045;
  logic clk = 0, rst_n = 0, start = 0, async_mode = 0, fast = 0, cmp, valid, busy;
  icode_t trial, code;
  real v = 0.0;
  int checks = 0, failures = 0;

  dual_mode_adc #(.SLOW_DIV(SLOW_DIV)) dut (.*);

  assign cmp = v >= real'(trial) * LSB;

  always #5 clk = ~clk;

  initial begin
    #5000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("%s v=%f code=%0d", what, v, code); end
  endtask

  task automatic convert(input bit f);
    int n;
    @(negedge clk); start = 1; fast = f; async_mode = 0;
    @(negedge clk); start = 0;
    n = 1;
    while (!valid && n < 100) begin @(negedge clk); n++; end
    chk(n - 1 == (f ? IW : IW * SLOW_DIV), $sformatf("latency %0d", n - 1));
    chk(int'(code) == int'($floor(v / LSB)), "code");
  endtask

  initial begin
    int nres, lastc;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 300; i++) begin
      v = (($urandom % 100000) / 100000.0) * 255.0 * LSB;
      convert(i % 2);
    end
    v = 0.0;        convert(1);
    v = 255.5 * LSB; convert(1);
    // asynchronous: free-running conversions follow a ramp
    @(negedge clk); async_mode = 1; fast = 1;
    nres = 0; lastc = -1;
    for (int t = 0; t < 2000; t++) begin
      v = 0.5 * LSB + t * 0.05 * LSB;
      @(negedge clk);
      if (valid) begin
        nres++;
        chk(int'(code) >= lastc, "ramp not monotonic");
        chk(int'(code) <= int'($floor(v / LSB + 1.0e-6)) && int'(code) + 2 >= int'($floor(v / LSB)), "async lag");
        lastc = int'(code);
      end
    end
    chk(nres >= 2000 / (IW + 1) - 2, $sformatf("async rate %0d", nres));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
