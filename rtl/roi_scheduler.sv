// roi_scheduler: picks the regions of interest to track, at most one per
// shared vertical bus per pass.
//
// Regions in columns c, c + NBUS, c + 2*NBUS, ... share vertical bus
// c mod NBUS, so at most NBUS regions can be read at once, and all of them
// must lie in the same row band (the row lines are common to the whole
// array). On load the scheduler copies the event map into a pending map
// and walks it row by row. In a row with pending regions it offers a pass
// holding, for every bus, the leftmost pending region of that bus; accept
// clears those regions, and further passes on the same row follow until the
// row is empty. Empty rows cost one cycle each. The limit of eight regions
// and the bus sharing follow the design; the row-by-row, leftmost-first
// order is this implementation's choice.
//
// Interface: load (one cycle) starts a walk over event_map; pass_valid with
// pass_row, roi_col and roi_en describes the current pass; accept retires
// it. busy is high from the cycle after load until the walk ends.
module roi_scheduler
  import adc_fist_pkg::*;
#(
  parameter int unsigned RCOLS = REG_COLS,
  parameter int unsigned RROWS = REG_ROWS,
  parameter int unsigned NBUS  = NUM_BUS,
  localparam int unsigned RW   = $clog2(RROWS),
  localparam int unsigned CW   = $clog2(RCOLS)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              load,
  input  logic [RCOLS-1:0]  event_map [RROWS],
  input  logic              accept,
  output logic              busy,
  output logic              pass_valid,
  output logic [RW-1:0]     pass_row,
  output logic [CW-1:0]     roi_col [NBUS],
  output logic              roi_en  [NBUS]
);

  logic [RCOLS-1:0] pending [RROWS];
  logic [RCOLS-1:0] take;

  // Leftmost pending region of every bus in the current row.
  always_comb begin
    take = '0;
    for (int b = 0; b < int'(NBUS); b++) begin
      roi_en[b]  = 1'b0;
      roi_col[b] = CW'(b);
      for (int c = b; c < int'(RCOLS); c += int'(NBUS)) begin
        if (!roi_en[b] && pending[pass_row][c]) begin
          roi_en[b]  = 1'b1;
          roi_col[b] = CW'(c);
          take[c]    = 1'b1;
        end
      end
    end
    pass_valid = busy && (take != '0);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy     <= 1'b0;
      pass_row <= '0;
      for (int r = 0; r < int'(RROWS); r++) pending[r] <= '0;
    end else if (load) begin
      busy     <= 1'b1;
      pass_row <= '0;
      pending  <= event_map;
    end else if (busy) begin
      if (pass_valid) begin
        if (accept) pending[pass_row] <= pending[pass_row] & ~take;
      end else if (pass_row == RW'(RROWS - 1)) begin
        busy <= 1'b0;
      end else begin
        pass_row <= pass_row + 1'b1;
      end
    end
  end

  // A pass is held stable until it is accepted.
  property p_pass_stable;
    @(posedge clk) disable iff (!rst_n)
      (pass_valid && !accept && !load) |=> (pass_valid && $stable(pass_row) && $stable(take));
  endproperty
  assert property (p_pass_stable);

endmodule
