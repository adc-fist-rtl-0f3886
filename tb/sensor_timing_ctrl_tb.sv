// sensor_timing_ctrl_tb: runs the frame sequencer against small models of
// the scheduler (a number of pending passes) and of the SPE (result two
// cycles after last). It checks the order and count of scanned rows, that
// every pass is one ramp-reset cycle followed by exactly 2^n accumulate
// cycles, the number of passes and frames, the load of all regions when
// only tracking is enabled, and continuous frames ending on stop.
module sensor_timing_ctrl_tb;
  import adc_fist_pkg::*;
  localparam int BROWS = 5, NMAX = 10;
  localparam int BRW = $clog2(BROWS), NW = $clog2(NMAX + 1);

  logic clk = 1'b0, rst_n, start, stop;
  mode_t mode;
  logic [NW-1:0] n_log2, n_cur;
  logic frame_start, ede_row_valid, ede_any_event;
  logic [BRW-1:0] ede_row_idx;
  logic sched_load, sched_load_all, sched_busy, sched_pass_valid, sched_accept;
  logic ote_active, ramp_rst, spe_clear, spe_en, spe_last, spe_result_valid;
  logic pass_done, frame_done, busy;
  int checks = 0, failures = 0;

  sensor_timing_ctrl #(.BROWS(BROWS), .NMAX(NMAX)) dut (.*);

  always #5 clk = ~clk;

  // Scheduler model: `pending` passes after a load.
  int pending, passes_per_load;
  logic last_d1, last_d2;
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      sched_busy <= 1'b0; pending <= 0; last_d1 <= 1'b0; last_d2 <= 1'b0;
    end else begin
      if (sched_load) begin
        sched_busy <= 1'b1;
        pending <= sched_load_all ? 2 * passes_per_load : passes_per_load;
      end else if (sched_busy && pending == 0) sched_busy <= 1'b0;
      else if (sched_accept) pending <= pending - 1;
      last_d1 <= spe_last;
      last_d2 <= last_d1;
    end
  end
  assign sched_pass_valid = sched_busy && pending > 0;
  assign spe_result_valid = last_d2;

  // Monitors.
  int rows_seen, next_row, en_run, passes, frames, loads, load_alls, bad_runs;
  logic prev_rst;
  always_ff @(posedge clk) begin
    if (rst_n) begin
      if (ede_row_valid) begin
        if (int'(ede_row_idx) != next_row) bad_runs++;
        next_row <= (int'(ede_row_idx) + 1) % BROWS;
        rows_seen++;
      end
      if (spe_en) en_run <= en_run + 1;
      if (ramp_rst) begin
        if (!spe_clear) bad_runs++;
        en_run <= 0;
      end
      if (spe_last && en_run + 1 != (1 << n_cur)) bad_runs++;
      if (prev_rst && !spe_en) bad_runs++;
      prev_rst <= ramp_rst;
      if (pass_done) passes++;
      if (frame_done) frames++;
      if (sched_load) loads++;
      if (sched_load_all) load_alls++;
    end
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_eq(string what, int got, int expv);
    checks++;
    if (got != expv) begin failures++; $display("FAIL %s got %0d exp %0d", what, got, expv); end
  endtask

  task automatic clear_counts();
    rows_seen = 0; passes = 0; frames = 0; loads = 0; load_alls = 0;
  endtask

  task automatic frame(mode_t m, int nl, bit ev, int np);
    mode = m; n_log2 = NW'(nl); ede_any_event = ev; passes_per_load = np;
    start = 1'b1;
    @(posedge clk); #1;
    start = 1'b0;
    while (busy) begin @(posedge clk); #1; end
  endtask

  initial begin
    rst_n = 1'b0; start = 1'b0; stop = 1'b0; mode = '0; n_log2 = '0; ede_any_event = 1'b0;
    passes_per_load = 0; next_row = 0; en_run = 0; bad_runs = 0; prev_rst = 1'b0;
    clear_counts();
    repeat (2) @(posedge clk); #1;
    rst_n = 1'b1;

    frame('{continuous: 0, ote: 1, ede: 1}, 6, 1'b1, 3);
    expect_eq("rows", rows_seen, BROWS);
    expect_eq("passes", passes, 3);
    expect_eq("frames", frames, 1);
    expect_eq("loads", loads, 1);
    clear_counts();

    frame('{continuous: 0, ote: 1, ede: 1}, 4, 1'b0, 3);
    expect_eq("quiet rows", rows_seen, BROWS);
    expect_eq("quiet passes", passes, 0);
    expect_eq("quiet loads", loads, 0);
    clear_counts();

    frame('{continuous: 0, ote: 1, ede: 0}, 3, 1'b0, 2);
    expect_eq("ote-only rows", rows_seen, 0);
    expect_eq("ote-only passes", passes, 4);
    expect_eq("ote-only load_all", load_alls, 1);
    clear_counts();

    frame('{continuous: 0, ote: 0, ede: 1}, 10, 1'b1, 2);
    expect_eq("ede-only passes", passes, 0);
    expect_eq("ede-only frames", frames, 1);
    clear_counts();

    mode = '{continuous: 1, ote: 1, ede: 1}; n_log2 = NW'(1); ede_any_event = 1'b1;
    passes_per_load = 1;
    start = 1'b1;
    @(posedge clk); #1;
    start = 1'b0;
    repeat (40) @(posedge clk);
    #1 stop = 1'b1;
    @(posedge clk); #1;
    stop = 1'b0;
    while (busy) begin @(posedge clk); #1; end
    checks++;
    if (frames < 3) begin failures++; $display("FAIL continuous frames %0d", frames); end
    expect_eq("continuous passes", passes, frames);
    expect_eq("continuous rows", rows_seen, frames * BROWS);
    expect_eq("bad pass timing", bad_runs, 0);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
