// adc_fist_top: digital back end of an event-driven image sensor that
// detects changes and tracks objects without any ADC.
//
// Two engines share the sensor. The event-detection engine scans one
// centre pixel per 9 x 9 box through the sense amplifier array, keeps only
// two bits per sample and flags every 64 x 64 region whose samples changed
// since the previous frame. The object-tracking engine then reads the
// flagged regions, up to NBUS at a time (one per shared vertical bus), turns
// every pixel's bit-line level into a pulse train with the converter bank,
// and convolves the region with a 9 x 9 kernel (a Gabor filter) in the
// stochastic domain in the SPEs. Commands set the engine enables, the
// bit-stream length and the kernel coefficients.
//
// The pixel array is outside this module: it receives row_en and the pass
// selection (pass_row, roi_col, roi_en) and returns the analog levels of the
// selected pixels as PIX_BITS-bit codes, on ede_level (box-centre pixels of
// the scanned box row, same cycle) and roi_level (all pixels of the region
// on each bus, held for the pass). result[b] holds the pos - neg kernel sums
// of bus b, row-major over the region, valid in the cycle of result_valid.
// The downstream accelerator is not part of this module.
//
// Timing: a frame scan takes BOX_ROWS cycles, each tracking pass 2^n + 3
// cycles from ramp reset to result_valid, plus one scheduling cycle.
module adc_fist_top
  import adc_fist_pkg::*;
#(
  parameter int unsigned RCOLS = REG_COLS,
  parameter int unsigned RROWS = REG_ROWS,
  parameter int unsigned RSIZE = REG_SIZE,
  parameter int unsigned BSIZE = BOX,
  parameter int unsigned NBUS  = NUM_BUS,
  parameter int unsigned K     = KSIZE,
  parameter int unsigned NMAX  = NMAX_LOG2,
  parameter int unsigned LBITS = PIX_BITS,
  localparam int unsigned H     = RROWS * RSIZE,
  localparam int unsigned W     = RCOLS * RSIZE,
  localparam int unsigned BCOLS = W / BSIZE,
  localparam int unsigned BROWS = H / BSIZE,
  localparam int unsigned NPIX  = RSIZE * RSIZE,
  localparam int unsigned TAPS  = K * K,
  localparam int unsigned ACC_W = $clog2(TAPS * (1 << NMAX) + 1),
  localparam int unsigned RW    = $clog2(RROWS),
  localparam int unsigned CW    = $clog2(RCOLS)
) (
  input  logic                  clk,
  input  logic                  rst_n,
  // command port
  input  logic                  cmd_valid,
  input  logic [2:0]            cmd_op,
  input  logic [CMD_ADDR_W-1:0] cmd_addr,
  input  logic [CMD_DATA_W-1:0] cmd_data,
  output logic                  cmd_error,
  // pixel array
  output logic [H-1:0]          row_en,
  input  logic [LBITS-1:0]      ede_level [BCOLS],
  output logic                  pass_active,
  output logic [RW-1:0]         pass_row,
  output logic [CW-1:0]         roi_col   [NBUS],
  output logic                  roi_en    [NBUS],
  input  logic [LBITS-1:0]      roi_level [NBUS][NPIX],
  // event detection results
  output logic [RCOLS-1:0]      event_map [RROWS],
  output logic                  ede_frame_done,
  // tracking results
  output logic signed [ACC_W:0] result    [NBUS][NPIX],
  output logic                  result_valid,
  output logic                  frame_done,
  output logic                  busy
);

  localparam int unsigned NW  = $clog2(NMAX + 1);
  localparam int unsigned BRW = $clog2(BROWS);

  // Configuration.
  mode_t          mode;
  logic [NW-1:0]  n_log2, n_cur;
  weight_t        weights [TAPS];
  logic           start, stop;

  command_decoder #(.TAPS(TAPS), .NMAX(NMAX)) u_cmd (
    .clk, .rst_n, .cmd_valid, .cmd_op, .cmd_addr, .cmd_data,
    .mode, .n_log2, .weights, .start, .stop, .cmd_error
  );

  // Sequencing.
  logic           frame_start, ede_row_valid, ede_any_event;
  logic [BRW-1:0] ede_row_idx;
  logic           sched_load, sched_load_all, sched_busy, sched_pass_valid, sched_accept;
  logic           ote_active, ramp_rst, spe_clear, spe_en, spe_last;
  logic           spe_valid [NBUS];
  logic           pass_done;

  sensor_timing_ctrl #(.BROWS(BROWS), .NMAX(NMAX)) u_ctrl (
    .clk, .rst_n, .start, .stop, .mode, .n_log2,
    .frame_start, .ede_row_valid, .ede_row_idx, .ede_any_event,
    .sched_load, .sched_load_all, .sched_busy, .sched_pass_valid, .sched_accept,
    .n_cur, .ote_active, .ramp_rst, .spe_clear, .spe_en, .spe_last,
    .spe_result_valid(spe_valid[0]),
    .pass_done, .frame_done, .busy
  );

  row_ctrl #(.H(H), .BSIZE(BSIZE), .RSIZE(RSIZE)) u_rows (
    .en(ede_row_valid || ote_active), .ote(ote_active),
    .box_row(ede_row_idx), .reg_row(pass_row), .row_en
  );

  // Event detection engine.
  logic [1:0] msb2 [BCOLS];

  sense_amp_array #(.COLS(BCOLS), .LBITS(LBITS)) u_sa (
    .en(ede_row_valid), .level(ede_level), .msb2
  );

  event_detection_engine #(
    .BCOLS(BCOLS), .BROWS(BROWS), .RCOLS(RCOLS), .RROWS(RROWS),
    .BSIZE(BSIZE), .RSIZE(RSIZE)
  ) u_ede (
    .clk, .rst_n, .frame_start, .row_valid(ede_row_valid), .row_idx(ede_row_idx),
    .msb2, .event_map, .any_event(ede_any_event), .frame_done(ede_frame_done),
    .primed()
  );

  // Region-of-interest selection.
  logic [RCOLS-1:0] sched_map [RROWS];
  always_comb
    for (int r = 0; r < int'(RROWS); r++)
      sched_map[r] = sched_load_all ? '1 : event_map[r];

  roi_scheduler #(.RCOLS(RCOLS), .RROWS(RROWS), .NBUS(NBUS)) u_sched (
    .clk, .rst_n, .load(sched_load), .event_map(sched_map), .accept(sched_accept),
    .busy(sched_busy), .pass_valid(sched_pass_valid), .pass_row, .roi_col, .roi_en
  );

  assign pass_active = ote_active;

  // Object tracking engine: shared weight streams, one converter bank and
  // one SPE per bus.
  logic w_pos [TAPS];
  logic w_neg [TAPS];

  weight_stream_gen #(.TAPS(TAPS), .NMAX(NMAX)) u_wgen (
    .clk, .rst_n, .clear(spe_clear), .en(spe_en), .n_log2(n_cur), .weights,
    .w_pos, .w_neg, .phase()
  );

  for (genvar b = 0; b < NBUS; b++) begin : g_bus
    logic pulse [NPIX];

    abc #(.LINES(NPIX), .LBITS(LBITS), .NMAX(NMAX)) u_abc (
      .clk, .ramp_rst, .n_log2(n_cur), .level(roi_level[b]), .pulse
    );

    spe #(.R(RSIZE), .K(K), .NMAX(NMAX), .ACC_W(ACC_W)) u_spe (
      .clk, .rst_n, .clear(spe_clear), .en(spe_en), .last(spe_last),
      .pix_pulse(pulse), .w_pos, .w_neg, .result(result[b]),
      .result_valid(spe_valid[b])
    );
  end

  assign result_valid = pass_done;

endmodule
