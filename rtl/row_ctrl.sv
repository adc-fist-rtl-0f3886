// row_ctrl: row decoder driving the row-select lines of the pixel array.
//
// In event-detection mode it raises only the row through the centre of the
// selected row of boxes (row box_row * BSIZE + BSIZE / 2), whose pixels are
// the ones read by the sense amplifiers. In object-tracking mode it raises
// all RSIZE rows of the selected region row band at once, so that every
// pixel of the active regions drives its own line into the converters.
// The decoder itself is only named by the design; reading box centres and
// reading whole regions in parallel follow the design, the decoding is this
// implementation's choice.
//
// Interface: en gates all rows; ote selects tracking (1) or event
// detection (0). Timing: combinational.
module row_ctrl
  import adc_fist_pkg::*;
#(
  parameter int unsigned H     = ARRAY_H,
  parameter int unsigned BSIZE = BOX,
  parameter int unsigned RSIZE = REG_SIZE,
  localparam int unsigned BRW  = $clog2(H / BSIZE),
  localparam int unsigned RRW  = $clog2(H / RSIZE)
) (
  input  logic           en,
  input  logic           ote,
  input  logic [BRW-1:0] box_row,
  input  logic [RRW-1:0] reg_row,
  output logic [H-1:0]   row_en
);

  always_comb begin
    row_en = '0;
    if (en) begin
      if (ote) begin
        for (int r = 0; r < int'(H); r++)
          row_en[r] = (r / int'(RSIZE)) == int'(reg_row);
      end else begin
        for (int r = 0; r < int'(H); r++)
          row_en[r] = r == int'(box_row) * int'(BSIZE) + int'(BSIZE / 2);
      end
    end
  end

endmodule
