// abc: behavioural model of the analog-to-bitstream converter, a bank of
// LINES converters sharing one ramp generator. It stands for an analog
// circuit (ramp generator plus comparator) and is not meant as logic.
//
// Each converter compares its bit line, with the ramp added on top, against
// the reference: the output is high while level + ramp >= Vref. The ramp
// restarts on every ramp_rst and climbs from 0 to full scale in 2^n_log2
// system clocks, so the pulse period is set by the reset frequency and the
// duty cycle by the bit-line level, as in the published converter. Over one
// period the output is high for about level * 2^n_log2 / 2^LBITS clocks, at
// the end of the period. Ramp step size following n_log2 and the sharing of
// one ramp by a bank are choices of this model.
//
// Interface: clk only times the ramp; ramp_rst (sampled on clk) restarts
// it; level[i] is the bit-line level code (v / 2^LBITS of Vref); pulse[i]
// is the converter output, which changes only after clk edges.
module abc
  import adc_fist_pkg::*;
#(
  parameter int unsigned LINES = REG_SIZE * REG_SIZE,
  parameter int unsigned LBITS = PIX_BITS,
  parameter int unsigned NMAX  = NMAX_LOG2
) (
  input  logic                         clk,
  input  logic                         ramp_rst,
  input  logic [$clog2(NMAX+1)-1:0]    n_log2,
  input  logic [LBITS-1:0]             level [LINES],
  output logic                         pulse [LINES]
);

  // Ramp position in clocks since the last reset (saturates at the top).
  logic [NMAX:0] ramp;

  always_ff @(posedge clk) begin
    if (ramp_rst)                      ramp <= '0;
    else if (ramp != (1 << NMAX))      ramp <= ramp + 1'b1;
  end

  // level/2^LBITS + ramp/2^n >= 1, scaled by 2^(LBITS+n).
  always_comb begin
    longint unsigned period;
    period = longint'(1) << n_log2;
    for (int i = 0; i < LINES; i++)
      pulse[i] = (longint'(level[i]) * period + (longint'(ramp) << LBITS))
                 >= (period << LBITS);
  end

endmodule
