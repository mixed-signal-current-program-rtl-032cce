// optimal_di_calc: the "Optimal delta-i and i_peak calculator" of the voltage
// loop. From the capacitor charge balance C*dv = dI*(t_on + t_off)/2 of an
// ideal buck converter the extra inductor current needed to recover a
// voltage deviation dv in one on/off action is
//
//     dI = sqrt( 2*C*(1-D)*Vref*dv / L )                        (per converter)
//
// and the peak-current reference is i_peak = i_ctrl_new + dI, where
// i_ctrl_new is the inductor current captured at the voltage valley.
// For a heavy-to-light step the same swing is applied downwards
// (i_valley = i_ctrl_new - dI).
//
// Implementation: dv arrives in windowed-ADC LSBs (4 bits), so the square
// root is a 16-entry look-up table built at elaboration time:
//
//     LUT[v] = round( sqrt(DI_GAIN * v) )          (current-code LSBs)
//     DI_GAIN = 2*C*(1-D)*Vref*V_LSB / (N*L*I_LSB^2)
//
// where N is the number of phases, L the per-phase inductance and I_LSB the
// current-code step; the 1/N gives the share of each phase. The default
// DI_GAIN = 569 corresponds to C = 220 uF, L = 2.2 uH, N = 2, D = 0.36,
// Vref = 1.8 V, V_LSB = 10 mV and I_LSB = 45 mA. The 5 V to 1.8 V
// conversion ratio is the document's prototype; C, L and the LSB sizes are
// this design's assumptions. The result is clamped to [0, I_MAX] (the
// maximum allowable reference, the document's current protection) and
// `limited` reports the clamp.
//
// Interface: dv, i_new, undershoot in; di, i_target, limited out.
// Timing: combinational.
module optimal_di_calc
  import mscpm_pkg::*;
#(
  parameter int DI_GAIN = 569,  // (dI in codes)^2 per LSB of dv
  parameter int I_MAX   = 200   // highest programmable current code
) (
  input  dv_t    dv,
  input  icode_t i_new,        // captured i_ctrl_new
  input  logic   undershoot,   // 1: light-to-heavy (add), 0: subtract
  output icode_t di,
  output icode_t i_target,     // i_peak (undershoot) or i_valley
  output logic   limited
);

  localparam int NLUT = 1 << EW;
  typedef logic [NLUT-1:0][IW-1:0] lut_t;

  // Rounded integer square root, saturated to the code range.
  function automatic int isqrt_round(input int x);
    int r;
    r = 0;
    while ((r + 1) * (r + 1) <= x) r++;
    if (x - r * r > r) r++;
    if (r > (1 << IW) - 1) r = (1 << IW) - 1;
    return r;
  endfunction

  function automatic lut_t build_lut();
    lut_t t;
    for (int v = 0; v < NLUT; v++) t[v] = IW'(isqrt_round(DI_GAIN * v));
    return t;
  endfunction

  localparam lut_t LUT = build_lut();

  int signed tgt;

  always_comb begin
    di       = LUT[dv];
    tgt      = undershoot ? int'(i_new) + int'(di) : int'(i_new) - int'(di);
    i_target = sat_code(tgt, I_MAX);
    limited  = (tgt > I_MAX) || (tgt < 0);
  end

endmodule
