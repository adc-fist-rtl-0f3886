// event_detection_engine: digital part of the event-detection mode. It
// compares the 2-bit samples of the box-centre pixels with the previous
// frame and marks every region in which a sample changed.
//
// The array is scanned one row of boxes per cycle. For each box column the
// new 2-bit value is compared with the value stored for that box in the
// previous-frame memory, then written over it. A box whose value changed
// sets the event flag of the region that holds its centre pixel. Reading two
// MSBs per box centre and comparing with the stored previous frame follow
// the design; "any change of the 2-bit value is an event", the box-to-region
// mapping by centre pixel, and suppressing events until one full frame has
// been stored after reset (primed) are this implementation's choices.
//
// Interface: frame_start clears the event map before a scan; row_valid with
// row_idx presents one box row in msb2. Timing: the memory and the event map
// are updated at the clock edge of the row; frame_done pulses in the cycle
// after the last row (row BOX_ROWS-1), when event_map is final.
module event_detection_engine
  import adc_fist_pkg::*;
#(
  parameter int unsigned BCOLS = BOX_COLS,
  parameter int unsigned BROWS = BOX_ROWS,
  parameter int unsigned RCOLS = REG_COLS,
  parameter int unsigned RROWS = REG_ROWS,
  parameter int unsigned BSIZE = BOX,
  parameter int unsigned RSIZE = REG_SIZE
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     frame_start,
  input  logic                     row_valid,
  input  logic [$clog2(BROWS)-1:0] row_idx,
  input  logic [1:0]               msb2      [BCOLS],
  output logic [RCOLS-1:0]         event_map [RROWS],
  output logic                     any_event,
  output logic                     frame_done,
  output logic                     primed
);

  // Previous-frame memory: one 2-bit word per box, written a row at a time.
  logic [1:0] prev_mem [BROWS][BCOLS];

  // Region column of every box column (box centre / region size).
  function automatic int unsigned region_of(int unsigned box);
    return (box * BSIZE + BSIZE / 2) / RSIZE;
  endfunction

  logic [RCOLS-1:0] row_hits;
  always_comb begin
    row_hits = '0;
    for (int c = 0; c < int'(BCOLS); c++)
      if (msb2[c] != prev_mem[row_idx][c])
        row_hits[region_of(c)] = 1'b1;
  end

  always_ff @(posedge clk) begin
    if (row_valid)
      prev_mem[row_idx] <= msb2;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int r = 0; r < int'(RROWS); r++) event_map[r] <= '0;
      frame_done <= 1'b0;
      primed     <= 1'b0;
    end else begin
      frame_done <= 1'b0;
      if (frame_start) begin
        for (int r = 0; r < int'(RROWS); r++) event_map[r] <= '0;
      end else if (row_valid) begin
        if (primed)
          event_map[region_of(int'(row_idx))] <= event_map[region_of(int'(row_idx))] | row_hits;
        if (row_idx == $bits(row_idx)'(BROWS - 1)) begin
          frame_done <= 1'b1;
          primed     <= 1'b1;
        end
      end
    end
  end

  always_comb begin
    any_event = 1'b0;
    for (int r = 0; r < int'(RROWS); r++) any_event |= |event_map[r];
  end

endmodule
