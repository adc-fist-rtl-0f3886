// adc_fist_top_full_tb: the end-to-end sequence of adc_fist_top_tb run on
// the sensor at its full size: 32 x 16 regions of 64 x 64 pixels
// (2048 x 1024), one sample per 9 x 9 box, eight buses and the 9 x 9 Gabor
// kernel, with the top at its default parameters. A behavioural pixel
// array answers the row enables and the pass selection from a test image.
//
// Sequence: load the kernel; a first frame that only stores box samples;
// a frame with three objects (two sharing a bus in one row); the same frame
// again (quiet); the objects removed at 1024-bit streams with an accuracy
// check; tracking of all 512 regions at 4-bit streams; continuous event
// detection ended by stop. Event maps and every SPE result are checked
// against values worked out here from the image.
module adc_fist_top_full_tb;
  import adc_fist_pkg::*;

  localparam int RCOLS = REG_COLS;
  localparam int RROWS = REG_ROWS;
  localparam int RSIZE = REG_SIZE;
  localparam int BSIZE = BOX;
  localparam int NBUS  = NUM_BUS;
  localparam int K     = KSIZE;
  localparam int NMAX  = NMAX_LOG2;
  localparam int LBITS = PIX_BITS;
  localparam int H = RROWS * RSIZE, W = RCOLS * RSIZE;
  localparam int BCOLS = W / BSIZE, BROWS = H / BSIZE;
  localparam int NPIX = RSIZE * RSIZE, TAPS = K * K;
  localparam int ACC_W = $clog2(TAPS * (1 << NMAX) + 1);
  localparam int RW = $clog2(RROWS), CW = $clog2(RCOLS);

  logic clk = 1'b0, rst_n;
  logic cmd_valid, cmd_error;
  logic [2:0] cmd_op;
  logic [CMD_ADDR_W-1:0] cmd_addr;
  logic [CMD_DATA_W-1:0] cmd_data;
  logic [H-1:0] row_en;
  logic [LBITS-1:0] ede_level [BCOLS];
  logic pass_active;
  logic [RW-1:0] pass_row;
  logic [CW-1:0] roi_col [NBUS];
  logic roi_en [NBUS];
  logic [LBITS-1:0] roi_level [NBUS][NPIX];
  logic [RCOLS-1:0] event_map [RROWS];
  logic ede_frame_done;
  logic signed [ACC_W:0] result [NBUS][NPIX];
  logic result_valid, frame_done, busy;

  adc_fist_top dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endtask

  // ---------------------------------------------------------------- image
  byte unsigned img [H][W];
  int img_version = 0;
  logic [1:0] stored_q [BROWS][BCOLS];   // samples the sensor holds
  bit exp_event [RROWS][RCOLS];

  function automatic byte unsigned background(int y, int x);
    return byte'((x * 3 + y * 5) % 200 + 20);
  endfunction

  task automatic paint(bit with_objects);
    for (int y = 0; y < H; y++)
      for (int x = 0; x < W; x++)
        img[y][x] = background(y, x);
    if (with_objects) begin
      // objects in region units: (row, col)
      int objs [3][2] = '{'{0, 1}, '{0, 9 % RCOLS}, '{RROWS - 1, 5}};
      foreach (objs[o])
        for (int y = objs[o][0] * RSIZE + 1; y < (objs[o][0] + 1) * RSIZE - 1; y++)
          for (int x = objs[o][1] * RSIZE + 1; x < (objs[o][1] + 1) * RSIZE - 1; x++)
            img[y][x] = byte'(250 - ((x + y) % 7));
    end
    img_version++;
  endtask

  // Regions whose box-centre 2-bit samples differ from the stored ones.
  task automatic expected_events(bit primed);
    foreach (exp_event[r, c]) exp_event[r][c] = 0;
    for (int br = 0; br < BROWS; br++)
      for (int bc = 0; bc < BCOLS; bc++) begin
        int cy = br * BSIZE + BSIZE / 2, cx = bc * BSIZE + BSIZE / 2;
        logic [1:0] q;
        q = 2'(int'(img[cy][cx]) / 64);
        if (primed && q != stored_q[br][bc]) exp_event[cy / RSIZE][cx / RSIZE] = 1;
        stored_q[br][bc] = q;
      end
  endtask

  // ---------------------------------------------------- pixel array model
  int cached_version = -1, cached_row = -1;
  int cached_col [NBUS];
  always @(negedge clk) begin
    automatic int rr = -1;
    automatic bit same;
    if (!pass_active) begin
      for (int r = 0; r < H; r++) if (row_en[r] && rr < 0) rr = r;
      if (rr >= 0)
        for (int c = 0; c < BCOLS; c++) ede_level[c] = img[rr][c * BSIZE + BSIZE / 2];
    end
    same = cached_version == img_version && cached_row == int'(pass_row);
    for (int b = 0; b < NBUS; b++) same &= cached_col[b] == int'(roi_col[b]);
    if (!same) begin
      for (int b = 0; b < NBUS; b++)
        for (int p = 0; p < NPIX; p++)
          roi_level[b][p] = img[int'(pass_row) * RSIZE + p / RSIZE][int'(roi_col[b]) * RSIZE + p % RSIZE];
      cached_version = img_version;
      cached_row = int'(pass_row);
      for (int b = 0; b < NBUS; b++) cached_col[b] = int'(roi_col[b]);
    end
  end

  // ------------------------------------------------------ kernel and model
  int wsign [TAPS];
  int wmag [TAPS];
  real wreal [TAPS];
  int n_log2_now;
  int ov [256][TAPS];     // ones shared by a level's pulse and a tap's stream

  task automatic make_gabor();
    real g [TAPS];
    real gmax = 0.0;
    for (int ky = 0; ky < K; ky++)
      for (int kx = 0; kx < K; kx++) begin
        real xr = real'(kx - K / 2), yr = real'(ky - K / 2);
        real sigma = 2.5, lambda = 5.0, gamma = 0.5;
        g[ky*K+kx] = $exp(-(xr * xr + gamma * gamma * yr * yr) / (2.0 * sigma * sigma))
                     * $cos(2.0 * 3.14159265358979 * xr / lambda);
        if ((g[ky*K+kx] < 0 ? -g[ky*K+kx] : g[ky*K+kx]) > gmax)
          gmax = g[ky*K+kx] < 0 ? -g[ky*K+kx] : g[ky*K+kx];
      end
    foreach (g[t]) begin
      wsign[t] = g[t] < 0 ? -1 : 1;
      wmag[t] = int'((g[t] < 0 ? -g[t] : g[t]) / gmax * 1023.0);
      wreal[t] = real'(wsign[t] * wmag[t]) / 1024.0;
    end
  endtask

  task automatic build_overlap(int nl);
    int n = 1 << nl;
    n_log2_now = nl;
    for (int v = 0; v < 256; v++)
      for (int t = 0; t < TAPS; t++) ov[v][t] = 0;
    for (int k = 0; k < n; k++) begin
      int rev = 0;
      for (int b = 0; b < nl; b++) if (k & (1 << b)) rev |= 1 << (nl - 1 - b);
      rev = rev << (NMAX - nl);
      for (int v = 0; v < 256; v++)
        // level / 256 + k / n >= 1: the converter output is high
        if (v * n + 256 * k >= 256 * n)
          for (int t = 0; t < TAPS; t++)
            if (rev < wmag[t]) ov[v][t]++;
    end
  endtask

  // ----------------------------------------------------------- monitors
  int passes = 0, frame_passes = 0, shared_bus_rows = 0, errors_seen = 0;
  int pass_len = 0, bad_pass_len = 0;
  int row_passes [RROWS];
  bit served [RROWS][RCOLS];
  real abs_err_sum = 0.0, abs_ref_sum = 0.0;
  int err_pixels = 0;
  bit track_accuracy = 0;

  always @(posedge clk) begin
    if (rst_n) begin
      if (cmd_error) errors_seen++;
      if (pass_active) pass_len++;
      if (result_valid) begin
        if (pass_len != (1 << n_log2_now) + 3) bad_pass_len++;
        passes++;
        frame_passes++;
        row_passes[pass_row]++;
        for (int b = 0; b < NBUS; b++) begin
          if (roi_en[b]) begin
            automatic int rr = int'(pass_row), rc = int'(roi_col[b]);
            check(int'(roi_col[b]) % NBUS == b, "region on wrong bus");
            check(!served[rr][rc], "region served twice");
            served[rr][rc] = 1;
            for (int p = 0; p < NPIX; p++) begin
              automatic int y = p / RSIZE, x = p % RSIZE;
              automatic int expv = 0;
              automatic real exact = 0.0;
              for (int ky = 0; ky < K; ky++)
                for (int kx = 0; kx < K; kx++) begin
                  automatic int sy = y + ky - K / 2, sx = x + kx - K / 2;
                  if (sy >= 0 && sy < RSIZE && sx >= 0 && sx < RSIZE) begin
                    automatic int v = img[rr * RSIZE + sy][rc * RSIZE + sx];
                    expv += wsign[ky*K+kx] * ov[v][ky*K+kx];
                    exact += wreal[ky*K+kx] * real'(v) / 256.0;
                  end
                end
              check(int'(result[b][p]) == expv,
                    $sformatf("result region (%0d,%0d) pixel %0d got %0d exp %0d",
                              rr, rc, p, result[b][p], expv));
              if (track_accuracy) begin
                automatic real sc = real'(result[b][p]) / real'(1 << n_log2_now);
                abs_err_sum += (sc > exact) ? sc - exact : exact - sc;
                abs_ref_sum += (exact > 0) ? exact : -exact;
                err_pixels++;
              end
            end
          end
        end
      end
      if (!pass_active) pass_len = 0;
    end
  end

  // ------------------------------------------------------------- driver
  task automatic send(cmd_op_e op, int addr, int data);
    @(negedge clk);
    cmd_valid = 1'b1; cmd_op = op; cmd_addr = CMD_ADDR_W'(addr); cmd_data = CMD_DATA_W'(data);
    @(negedge clk);
    cmd_valid = 1'b0;
  endtask

  task automatic run_frame();
    frame_passes = 0;
    foreach (row_passes[r]) row_passes[r] = 0;
    foreach (served[r, c]) served[r][c] = 0;
    send(OP_START, 0, 0);
    while (!busy) @(posedge clk);
    while (busy) @(posedge clk);
    foreach (row_passes[r]) if (row_passes[r] > 1) shared_bus_rows++;
  endtask

  task automatic check_events(string tag);
    foreach (exp_event[r, c]) begin
      check(event_map[r][c] == exp_event[r][c],
            $sformatf("%s event (%0d,%0d) got %0b exp %0b", tag, r, c, event_map[r][c], exp_event[r][c]));
      check(served[r][c] == exp_event[r][c], $sformatf("%s served (%0d,%0d)", tag, r, c));
    end
  endtask

  function automatic int count_events();
    int n = 0;
    foreach (exp_event[r, c]) n += exp_event[r][c];
    return n;
  endfunction

  int prime_frames = 0, event_frames = 0, quiet_frames = 0, ote_frames = 0;
  int cont_frames = 0, prec_switches = 0;

  initial begin
    rst_n = 1'b0; cmd_valid = 1'b0; cmd_op = '0; cmd_addr = '0; cmd_data = '0;
    foreach (ede_level[c]) ede_level[c] = '0;
    foreach (roi_level[b, p]) roi_level[b][p] = '0;
    foreach (cached_col[b]) cached_col[b] = -1;
    paint(0);
    make_gabor();
    repeat (3) @(posedge clk);
    rst_n = 1'b1;

    for (int t = 0; t < TAPS; t++)
      send(OP_LOAD_W, t, (wsign[t] < 0 ? 1 << NMAX : 0) | wmag[t]);
    send(OP_SET_PREC, 0, 12);                      // refused
    send(OP_SET_PREC, 0, 6);
    build_overlap(6);
    prec_switches++;
    send(OP_SET_MODE, 0, 3'b011);

    // 1. first frame only stores samples
    expected_events(0);
    run_frame();
    check(frame_passes == 0, "priming frame ran passes");
    check_events("prime");
    prime_frames++;

    // 2. objects appear
    paint(1);
    expected_events(1);
    check(count_events() > 0, "test image raises no event");
    run_frame();
    check_events("objects");
    check(frame_passes > 0, "no tracking pass");
    if (frame_passes > 0) event_frames++;

    // 3. nothing changes
    expected_events(1);
    run_frame();
    check_events("quiet");
    check(frame_passes == 0, "quiet frame ran passes");
    if (count_events() == 0 && frame_passes == 0) quiet_frames++;

    // 4. objects leave, long streams
    send(OP_SET_PREC, 0, 10);
    build_overlap(10);
    prec_switches++;
    paint(0);
    expected_events(1);
    track_accuracy = 1;
    run_frame();
    track_accuracy = 0;
    check_events("leave");
    if (err_pixels > 0) begin
      $display("mean |error| at N=1024: %f (mean |exact| %f) over %0d pixels",
               abs_err_sum / err_pixels, abs_ref_sum / err_pixels, err_pixels);
      check(abs_err_sum / err_pixels < 0.02 * (abs_ref_sum / err_pixels) + 0.05,
            "stochastic result far from exact convolution");
    end
    if (frame_passes > 0) event_frames++;

    // 5. tracking alone: every region
    send(OP_SET_PREC, 0, 2);
    build_overlap(2);
    prec_switches++;
    send(OP_SET_MODE, 0, 3'b010);
    run_frame();
    check(frame_passes == RROWS * ((RCOLS + NBUS - 1) / NBUS), "tracking-only pass count");
    foreach (served[r, c]) check(served[r][c], "tracking-only region skipped");
    if (frame_passes > 0) ote_frames++;

    // 6. continuous event detection until stop
    send(OP_SET_MODE, 0, 3'b101);
    fork
      begin
        automatic int seen = 0;
        while (seen < 3) begin
          @(posedge clk);
          if (frame_done) seen++;
        end
      end
    join_none
    send(OP_START, 0, 0);
    while (!busy) @(posedge clk);
    begin
      automatic int frames = 0;
      while (frames < 2) begin
        @(posedge clk);
        if (frame_done) frames++;
      end
      send(OP_STOP, 0, 0);
      while (busy) begin
        @(posedge clk);
        if (frame_done) frames++;
      end
      cont_frames = frames;
    end
    check(cont_frames >= 3, "continuous mode ran fewer than three frames");

    check(bad_pass_len == 0, "pass not 2^n + 3 cycles from ramp reset to result");
    check(errors_seen == 1, "refused command not flagged once");

    $display("mechanisms: prime=%0d event=%0d quiet=%0d passes=%0d shared_bus_rows=%0d ote_only=%0d precisions=%0d cmd_errors=%0d continuous_frames=%0d",
             prime_frames, event_frames, quiet_frames, passes, shared_bus_rows, ote_frames,
             prec_switches, errors_seen, cont_frames);
    check(prime_frames > 0, "no priming frame");
    check(event_frames > 0, "no event frame");
    check(quiet_frames > 0, "no quiet frame");
    check(passes > 0, "no tracking pass");
    check(shared_bus_rows > 0, "no row needing two passes on a shared bus");
    check(ote_frames > 0, "no tracking-only frame");
    check(prec_switches >= 3, "precision never switched");
    check(errors_seen > 0, "no refused command");
    check(cont_frames > 0, "no continuous frames");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
