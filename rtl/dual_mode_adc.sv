// dual_mode_adc: the successive-approximation logic of the Dual-Mode ADC that
// reads the sample-and-hold capacitor of one phase back into the digital
// domain. Its trial code drives a small internal DAC whose output is compared
// with the S&H voltage; `cmp` is that comparator (1: S&H >= trial level).
//
// Two modes, as the document describes them:
//   * synchronous (async_mode = 0): one conversion per `start` pulse, issued
//     once per switching cycle in steady state, giving i_ctrl[n-1];
//   * asynchronous (async_mode = 1): conversions run back to back without
//     waiting for the switching clock, so the code follows the tracked
//     inductor current almost continuously during a transient.
// `fast` selects the high-rate conversion clock (clk_high of the document):
// one bit decision per clock; otherwise one per SLOW_DIV clocks (clk_low).
// The successive-approximation algorithm, the bit rate and the handshake are
// this design's choices; the document names the converter and its two modes.
//
// Timing: a conversion takes IW decisions (IW clocks when fast). `valid`
// pulses for one clock with the new `code`; `code` holds until the next
// result. A `start` while busy restarts the conversion.
module dual_mode_adc
  import mscpm_pkg::*;
#(
  parameter int SLOW_DIV = 4   // clocks per bit decision at clk_low
) (
  input  logic   clk,
  input  logic   rst_n,
  input  logic   start,
  input  logic   async_mode,
  input  logic   fast,
  input  logic   cmp,        // analog comparator: S&H >= level(trial)
  output icode_t trial,      // to the converter's internal DAC
  output icode_t code,
  output logic   valid,
  output logic   busy
);

  icode_t sar;
  int     bitpos;
  int     div_cnt;
  logic   step;

  assign trial = sar;
  assign step  = busy && (fast || div_cnt == SLOW_DIV - 1);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sar     <= '0;
      bitpos  <= IW - 1;
      div_cnt <= 0;
      code    <= '0;
      valid   <= 1'b0;
      busy    <= 1'b0;
    end else begin
      valid <= 1'b0;
      if (start || (async_mode && !busy)) begin
        busy    <= 1'b1;
        bitpos  <= IW - 1;
        sar     <= icode_t'(1) << (IW - 1);
        div_cnt <= 0;
      end else if (busy) begin
        div_cnt <= (div_cnt == SLOW_DIV - 1 || fast) ? 0 : div_cnt + 1;
        if (step) begin
          if (bitpos == 0) begin
            code  <= cmp ? sar : (sar & ~icode_t'(1));
            valid <= 1'b1;
            busy  <= 1'b0;
          end else begin
            sar[bitpos]     <= cmp;
            sar[bitpos - 1] <= 1'b1;
            bitpos          <= bitpos - 1;
          end
        end
      end
    end
  end

endmodule
