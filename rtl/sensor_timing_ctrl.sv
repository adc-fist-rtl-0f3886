// sensor_timing_ctrl: frame sequencer of the sensor. It runs the
// event-detection scan, hands the detected regions to the ROI scheduler and
// times every object-tracking pass of the converters and the SPEs.
//
// A frame starts on start. With event detection enabled the controller
// scans the BROWS rows of boxes, one per cycle, with the sense amplifiers
// on. After the scan, if tracking is enabled and a region changed, the
// scheduler is loaded with the event map; with tracking alone (no event
// detection) every region is loaded. Each pass the scheduler offers is run
// as: one cycle of ramp reset and accumulator clear, then 2^n cycles with
// the SPEs accumulating (last on the final one), then a wait for the SPE
// result, which is reported on pass_done while the pass is still selected.
// The frame ends when the scheduler is empty; in continuous mode a new frame
// starts at once until stop. Event detection followed by tracking of the
// detected regions follows the design; the state sequence and its cycle
// counts are this implementation's choices.
//
// Mode and precision are sampled at start; stop is honoured at the end of
// the current frame.
module sensor_timing_ctrl
  import adc_fist_pkg::*;
#(
  parameter int unsigned BROWS = BOX_ROWS,
  parameter int unsigned NMAX  = NMAX_LOG2,
  localparam int unsigned BRW  = $clog2(BROWS),
  localparam int unsigned NW   = $clog2(NMAX + 1)
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           start,
  input  logic           stop,
  input  mode_t          mode,
  input  logic [NW-1:0]  n_log2,
  // event detection
  output logic           frame_start,
  output logic           ede_row_valid,
  output logic [BRW-1:0] ede_row_idx,
  input  logic           ede_any_event,
  // scheduler
  output logic           sched_load,
  output logic           sched_load_all,
  input  logic           sched_busy,
  input  logic           sched_pass_valid,
  output logic           sched_accept,
  // converters and SPEs
  output logic [NW-1:0]  n_cur,
  output logic           ote_active,
  output logic           ramp_rst,
  output logic           spe_clear,
  output logic           spe_en,
  output logic           spe_last,
  input  logic           spe_result_valid,
  // status
  output logic           pass_done,
  output logic           frame_done,
  output logic           busy
);

  typedef enum logic [2:0] {
    S_IDLE, S_EDE_SCAN, S_EDE_DONE, S_SCHED, S_CLEAR, S_RUN, S_WAIT, S_FRAME_END
  } state_e;

  state_e        state;
  mode_t         mode_q;
  logic          stop_req;
  logic [NMAX:0] cnt;

  wire last_cycle = cnt == (NMAX+1)'((1 << n_cur) - 1);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state       <= S_IDLE;
      mode_q      <= '0;
      n_cur       <= NW'(NDEF_LOG2);
      stop_req    <= 1'b0;
      cnt         <= '0;
      ede_row_idx <= '0;
    end else begin
      if (stop) stop_req <= 1'b1;
      unique case (state)
        S_IDLE:
          if (start) begin
            mode_q      <= mode;
            n_cur       <= n_log2;
            stop_req    <= 1'b0;
            ede_row_idx <= '0;
            if (mode.ede)      state <= S_EDE_SCAN;
            else if (mode.ote) state <= S_SCHED;
          end
        S_EDE_SCAN: begin
          ede_row_idx <= ede_row_idx + 1'b1;
          if (ede_row_idx == BRW'(BROWS - 1)) state <= S_EDE_DONE;
        end
        S_EDE_DONE:
          state <= (mode_q.ote && ede_any_event) ? S_SCHED : S_FRAME_END;
        S_SCHED:
          if (sched_pass_valid)  state <= S_CLEAR;
          else if (!sched_busy)  state <= S_FRAME_END;
        S_CLEAR: begin
          cnt   <= '0;
          state <= S_RUN;
        end
        S_RUN: begin
          cnt <= cnt + 1'b1;
          if (last_cycle) state <= S_WAIT;
        end
        S_WAIT:
          if (spe_result_valid) state <= S_SCHED;
        S_FRAME_END:
          if (mode_q.continuous && !stop_req && !stop) begin
            ede_row_idx <= '0;
            state       <= mode_q.ede ? S_EDE_SCAN : S_SCHED;
          end else begin
            state <= S_IDLE;
          end
        default: state <= S_IDLE;
      endcase
    end
  end

  // Loads are issued on the transitions into S_SCHED.
  wire enter_sched_from_idle = state == S_IDLE && start && !mode.ede && mode.ote;
  wire enter_sched_from_ede  = state == S_EDE_DONE && mode_q.ote && ede_any_event;
  wire enter_sched_again     = state == S_FRAME_END && mode_q.continuous && !stop_req
                               && !stop && !mode_q.ede;

  always_comb begin
    frame_start    = (state == S_IDLE && start && mode.ede)
                   || (state == S_FRAME_END && mode_q.continuous && !stop_req && !stop
                       && mode_q.ede);
    ede_row_valid  = state == S_EDE_SCAN;
    sched_load     = enter_sched_from_idle || enter_sched_from_ede || enter_sched_again;
    sched_load_all = enter_sched_from_idle || enter_sched_again;
    ramp_rst       = state == S_CLEAR;
    spe_clear      = state == S_CLEAR;
    spe_en         = state == S_RUN;
    spe_last       = state == S_RUN && last_cycle;
    sched_accept   = state == S_WAIT && spe_result_valid;
    pass_done      = sched_accept;
    ote_active     = state inside {S_CLEAR, S_RUN, S_WAIT};
    frame_done     = state == S_FRAME_END;
    busy           = state != S_IDLE;
  end

endmodule
