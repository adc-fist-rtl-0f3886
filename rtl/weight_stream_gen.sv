// weight_stream_gen: turns the signed kernel coefficients into the weight
// bit streams that the SPE multiplies with the pixel streams.
//
// A single phase counter c runs through 0 .. 2^n_log2 - 1. For every tap the
// bit at phase c is 1 when the bit-reversed phase, scaled to NMAX bits, is
// below the coefficient magnitude; the bit goes to w_pos for a positive and
// to w_neg for a negative coefficient. Bit reversal spreads the ones evenly
// over the period (a van der Corput sequence), so the stream stays
// uncorrelated with the converter pulse, which is one contiguous burst per
// period; over a full period a tap gives ceil(mag / 2^(NMAX - n_log2)) ones.
// The design multiplies with AND gates and splits positive and negative
// products; how the coefficients become bit streams is this
// implementation's choice.
//
// Interface: clear restarts the phase at 0 in the next cycle, en advances
// it; weights are held static during a pass. Timing: w_pos and w_neg are
// combinational from the phase register, so the phase at a clock edge
// matches the converter ramp position after the same ramp reset.
module weight_stream_gen
  import adc_fist_pkg::*;
#(
  parameter int unsigned TAPS = KSIZE * KSIZE,
  parameter int unsigned NMAX = NMAX_LOG2
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      clear,
  input  logic                      en,
  input  logic [$clog2(NMAX+1)-1:0] n_log2,
  input  weight_t                   weights [TAPS],
  output logic                      w_pos   [TAPS],
  output logic                      w_neg   [TAPS],
  output logic [NMAX-1:0]           phase
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     phase <= '0;
    else if (clear) phase <= '0;
    else if (en)    phase <= phase + 1'b1;
  end

  // Reverse the low n_log2 bits of the phase and left-align them in NMAX bits.
  logic [NMAX-1:0] thresh;
  always_comb begin
    thresh = '0;
    for (int b = 0; b < NMAX; b++)
      if (b < int'(n_log2))
        thresh[NMAX-1-b] = phase[b];
  end

  always_comb begin
    for (int t = 0; t < TAPS; t++) begin
      logic bit_on;
      bit_on   = thresh < weights[t].mag;
      w_pos[t] = bit_on && !weights[t].neg;
      w_neg[t] = bit_on &&  weights[t].neg;
    end
  end

endmodule
