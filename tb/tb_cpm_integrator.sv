// tb_cpm_integrator: exhaustive check of i_ctrl[n] = K*e[n] + i_ctrl[n-1]
// with saturation to [0, I_MAX], for every 4-bit error and every previous
// code, at K = 3 so that the gain is visible.
module tb_cpm_integrator;
  import mscpm_pkg::*;
  localparam int K = 3, I_MAX = 200;
  err_t e; icode_t i_prev, i_steady;
  int checks = 0, failures = 0;

  cpm_integrator #(.K(K), .I_MAX(I_MAX)) dut (.e, .i_prev, .i_steady);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int exp_v;
    for (int ev = -8; ev <= 7; ev++)
      for (int ip = 0; ip < 256; ip++) begin
        e = err_t'(ev); i_prev = icode_t'(ip);
        #1;
        exp_v = K * ev + ip;
        if (exp_v < 0) exp_v = 0;
        if (exp_v > I_MAX) exp_v = I_MAX;
        checks++;
        if (int'(i_steady) != exp_v) begin
          failures++;
          if (failures < 10) $display("e=%0d prev=%0d got %0d exp %0d", ev, ip, i_steady, exp_v);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
