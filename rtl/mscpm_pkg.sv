// mscpm_pkg: shared widths, types and the controller mode encoding for the
// multiphase mixed-signal current-programmed-mode (CPM) controller.
//
// Digital current references are 8-bit codes (the DAC bus of the published
// simulation waveforms is eight bits wide), and the windowed flash ADC error
// e[n] is a 4-bit two's-complement number (the error bus of the same
// waveforms is four bits wide). The mode encoding is this design's own.
package mscpm_pkg;

  localparam int IW = 8;   // current reference / DAC / S&H ADC code width
  localparam int EW = 4;   // windowed flash ADC error width (signed)

  typedef logic        [IW-1:0] icode_t;   // unsigned current code
  typedef logic signed [EW-1:0] err_t;     // signed voltage error e[n]
  typedef logic        [EW-1:0] dv_t;      // |delta-v| in ADC LSBs

  // Controller modes. M_CPM is steady state; M_SLEW .. M_RETURN form the
  // time-optimal transient sequence (StateTransient is high in all of them);
  // M_PFM is light-load pulse frequency modulation.
  typedef enum logic [2:0] {
    M_CPM     = 3'd0,  // peak current programmed mode, eq. (1) each cycle
    M_SLEW    = 3'd1,  // switches forced on (undershoot) or off (overshoot)
    M_CAPTURE = 3'd2,  // S&H holds, capacitors short-connected (averaging)
    M_CONVERT = 3'd3,  // fast conversion of the averaged S&H -> i_ctrl_new
    M_PEAK    = 3'd4,  // reference = i_peak (or i_valley) until reached
    M_RETURN  = 3'd5,  // reference = i_ctrl_new until the current returns
    M_PFM     = 3'd6   // pulse frequency modulation at light load
  } mode_t;

  // Saturate a signed sum into the unsigned code range [0, max].
  function automatic icode_t sat_code(input int signed v, input int unsigned max);
    if (v < 0)                 return '0;
    else if (v > int'(max))    return icode_t'(max);
    else                       return icode_t'(v);
  endfunction

endpackage
