// sense_amp_array: behavioural model of the sense amplifier array used in
// event-detection mode. It is not synthesizable logic in the real sensor:
// each channel is an analog comparator bank on a box-centre bit line.
//
// Each of the COLS channels resolves the two most significant bits of its
// pixel level against reference taps at 1/4, 2/4 and 3/4 of full scale,
// giving a thermometer code that is turned into a 2-bit value. Reading only
// two bits per centre pixel follows the design; the three-threshold flash
// structure is this model's choice. The levels are PIX_BITS-bit codes
// standing for bit-line voltages (v / 2^PIX_BITS of full scale).
//
// Interface: en gates the amplifiers (outputs read 0 while disabled);
// level[c] is the bit-line level of channel c; msb2[c] is its 2-bit result.
// Timing: combinational, the result is latched by the event detector.
module sense_amp_array
  import adc_fist_pkg::*;
#(
  parameter int unsigned COLS  = BOX_COLS,
  parameter int unsigned LBITS = PIX_BITS
) (
  input  logic             en,
  input  logic [LBITS-1:0] level [COLS],
  output logic [1:0]       msb2  [COLS]
);

  localparam int unsigned FS = 1 << LBITS;

  always_comb begin
    for (int c = 0; c < COLS; c++) begin
      logic [2:0] therm;
      therm[0] = int'(level[c]) >= FS / 4;
      therm[1] = int'(level[c]) >= FS / 2;
      therm[2] = int'(level[c]) >= (3 * FS) / 4;
      if (!en)          msb2[c] = 2'd0;
      else if (therm[2]) msb2[c] = 2'd3;
      else if (therm[1]) msb2[c] = 2'd2;
      else if (therm[0]) msb2[c] = 2'd1;
      else               msb2[c] = 2'd0;
    end
  end

endmodule
