// tb_windowed_flash_adc: sweeps the output voltage across and beyond the
// window around a 1.8 V reference and checks the registered error code:
// nearest integer of (Vref - Vout) / 10 mV, saturated to [-8, 7].
module tb_windowed_flash_adc;
  import mscpm_pkg::*;
  logic clk = 0, rst_n = 0;
  real vout = 1.8, vref = 1.8;
  err_t e;
  int checks = 0, failures = 0, nsat = 0;

  windowed_flash_adc #(.V_LSB(0.01)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int exp_e; real d;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 400; i++) begin
      // offsets between -150 mV and +150 mV, avoiding the exact half-LSB points
      d = -0.150 + 0.3 * i / 400.0 + 0.0001;
      @(negedge clk); vout = vref - d;
      @(posedge clk); #1;
      exp_e = int'($floor(d / 0.01 + 0.5));
      if (exp_e > 7) begin exp_e = 7; nsat++; end
      if (exp_e < -8) begin exp_e = -8; nsat++; end
      checks++;
      if (int'(e) != exp_e) begin
        failures++;
        if (failures < 10) $display("d=%f e=%0d exp=%0d", d, e, exp_e);
      end
    end
    if (nsat == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
