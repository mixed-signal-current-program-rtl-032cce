// tb_mscpm_multiphase: closed-loop test of the controller built for three
// and for four interleaved phases (the default top is two-phase). Each
// configuration has its own power stage, with the same per-phase inductor
// and output capacitor, and runs the per-phase load step 0.5 A -> 4.5 A and
// back (see multiphase_step_rig): regulation, CPM operation, equal current
// sharing and S&H averaging at each capture. The two rigs run one after the
// other; the delta-i gain is scaled by 2/N from the two-phase default.
module tb_mscpm_multiphase;
  logic clk = 0;
  logic go3 = 0, go4 = 0, done3, done4;
  int   checks3, failures3, checks4, failures4;

  always #10 clk = ~clk;   // 50 MHz

  multiphase_step_rig #(.N(3), .DI_GAIN(379), .LO(0.5)) rig3 (
    .clk, .go(go3), .done(done3), .checks(checks3), .failures(failures3));
  multiphase_step_rig #(.N(4), .DI_GAIN(285), .LO(0.5)) rig4 (
    .clk, .go(go4), .done(done4), .checks(checks4), .failures(failures4));

  initial begin
    #1000000;   // 1 ms
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks3 + checks4, failures3 + failures4 + 1);
    $finish;
  end

  initial begin
    go3 = 1;
    wait (done3);
    go4 = 1;
    wait (done4);
    $display("TB_RESULT checks=%0d failures=%0d", checks3 + checks4, failures3 + failures4);
    $finish;
  end
endmodule
