// cpm_integrator: the steady-state voltage-loop compensator, the "K" gain and
// the adder of the voltage loop. It forms the new peak-current reference
//
//     i_ctrl[n] = K * e[n] + i_ctrl[n-1]
//
// where e[n] is the windowed flash ADC error and i_ctrl[n-1] is the previous
// reference as read back from the sample-and-hold by the dual-mode ADC.
// Following the document, the "one cycle before" value is not kept in a
// digital register: it is the digitised S&H sample, so this block is purely
// combinational and the mode controller registers its output once per
// switching cycle.
//
// The result is saturated to [0, I_MAX]; I_MAX is the largest reference the
// controller may program, which keeps the inductor out of saturation. The
// value of K and the saturation are this design's choices; the document only
// calls K an integrating coefficient.
//
// Interface: e (signed, ADC LSBs), i_prev (code), i_steady (code).
// Timing: combinational, no clock.
module cpm_integrator
  import mscpm_pkg::*;
#(
  parameter int K     = 1,     // integrating coefficient, codes per LSB of e
  parameter int I_MAX = 200    // highest programmable current code
) (
  input  err_t   e,
  input  icode_t i_prev,
  output icode_t i_steady
);

  int signed sum;

  always_comb begin
    sum      = K * int'(e) + int'(i_prev);
    i_steady = sat_code(sum, I_MAX);
  end

endmodule
