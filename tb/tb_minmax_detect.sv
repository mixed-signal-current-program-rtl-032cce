// tb_minmax_detect: feeds error sequences that rise (or fall) to an extremum
// and come back, in both directions and with random shapes, and checks that
// `extreme` pulses exactly one clock after the first sample that is smaller
// than the largest deviation, with dv equal to that largest deviation, and
// that `grow` pulses on arming and on every new, larger deviation.
module tb_minmax_detect;
  import mscpm_pkg::*;
  logic clk = 0, rst_n = 0, arm = 0, undershoot = 1, extreme, active, grow;
  err_t e = '0; dv_t dv;
  int checks = 0, failures = 0, n_under = 0, n_over = 0;

  minmax_detect dut (.*);

  always #5 clk = ~clk;

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("%s dv=%0d", what, dv); end
  endtask

  // One transient: deviation magnitudes seq[0..n-1] (seq[0] >= 2 arms).
  task automatic run(input bit under, input int seq [$]);
    int best, drop_at, sgn;
    sgn = under ? 1 : -1;
    best = seq[0]; drop_at = -1;
    for (int i = 1; i < seq.size(); i++) begin
      if (seq[i] > best) best = seq[i];
      else if (seq[i] < best) begin drop_at = i; break; end
    end
    best = seq[0];
    for (int i = 0; i < seq.size(); i++) begin
      bit exp_grow;
      exp_grow = (i == 0) || (seq[i] > best);
      if (seq[i] > best) best = seq[i];
      @(negedge clk);
      e = err_t'(sgn * seq[i]);
      arm = (i == 0); undershoot = under;
      @(posedge clk); #1;
      chk(grow === exp_grow, "grow pulse");
      if (i == drop_at) begin
        chk(extreme === 1'b1, "no extreme at drop");
        chk(int'(dv) == best, "wrong dv");
        if (under) n_under++; else n_over++;
      end else begin
        chk(extreme === 1'b0, "spurious extreme");
      end
      if (i == drop_at) break;
    end
    @(negedge clk); arm = 0; e = '0;
    @(posedge clk); #1;
    chk(extreme === 1'b0 && active === 1'b0, "not idle after extreme");
  endtask

  initial begin
    int q [$];
    repeat (2) @(posedge clk);
    rst_n = 1;
    run(1, '{2, 3, 5, 7, 7, 6, 3});
    run(0, '{2, 4, 4, 5, 3});
    repeat (200) begin
      int v, peak;
      q = {};
      v = 2; peak = 2 + ($urandom % 6);
      q.push_back(v);
      while (v < peak) begin v += 1 + ($urandom % 2); if (v > peak) v = peak; q.push_back(v); end
      repeat ($urandom % 3) q.push_back(peak);
      q.push_back(peak - 1 - ($urandom % 2));
      run($urandom % 2, q);
    end
    chk(n_under > 0 && n_over > 0, "both directions");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
