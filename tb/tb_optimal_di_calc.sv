// tb_optimal_di_calc: checks the delta-i look-up table against a real-valued
// square root of the charge-balance formula, and the peak / valley reference
// with its clamp to [0, I_MAX], for all 16 delta-v codes and a sweep of
// captured currents in both directions.
module tb_optimal_di_calc;
  import mscpm_pkg::*;
  localparam int DI_GAIN = 569, I_MAX = 200;
  dv_t dv; icode_t i_new, di, i_target; logic undershoot, limited;
  int checks = 0, failures = 0, nlim = 0;

  optimal_di_calc #(.DI_GAIN(DI_GAIN), .I_MAX(I_MAX)) dut (.*);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input int got, input int exp_v, input string what);
    checks++;
    if (got != exp_v) begin
      failures++;
      if (failures < 10) $display("%s: dv=%0d i_new=%0d under=%0d got %0d exp %0d",
                                  what, dv, i_new, undershoot, got, exp_v);
    end
  endtask

  initial begin
    int edi, et; logic elim;
    for (int v = 0; v < 16; v++)
      for (int ip = 0; ip < 256; ip += 5)
        for (int u = 0; u < 2; u++) begin
          dv = dv_t'(v); i_new = icode_t'(ip); undershoot = logic'(u);
          #1;
          edi  = int'($floor($sqrt(real'(DI_GAIN) * v) + 0.5));
          et   = u ? ip + edi : ip - edi;
          elim = (et > I_MAX) || (et < 0);
          if (et > I_MAX) et = I_MAX;
          if (et < 0) et = 0;
          if (elim) nlim++;
          chk(int'(di), edi, "di");
          chk(int'(i_target), et, "target");
          chk(int'(limited), int'(elim), "limited");
        end
    // one value worked out by hand: sqrt(569*7) = 63.1 -> 63
    dv = 4'd7; i_new = 8'd40; undershoot = 1'b1; #1;
    chk(int'(di), 63, "di hand");
    chk(int'(i_target), 103, "peak hand");
    if (nlim == 0) begin failures++; $display("clamp never exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
