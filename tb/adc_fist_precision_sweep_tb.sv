// adc_fist_precision_sweep_tb: the precision workload. Two rows of eight
// full-size 64 x 64 regions are filtered with a 9 x 9 Gabor kernel, each
// row in one pass of 8 x 4096 pixels (one region per bus), at every stream
// length from 64 to 1024 bits. For each length it checks the pass time (N + 3 cycles from ramp
// reset to result), compares all 65,536 outputs with the exact
// convolution, prints the mean absolute error and the PSNR against the
// exact result, and requires the error not to grow (5 % slack) from one
// length to the next, to be smaller at 1024 bits than at 64,
// and to stay below 1 % of the peak output at 1024 bits.
module adc_fist_precision_sweep_tb;
  import adc_fist_pkg::*;

  localparam int RCOLS = NUM_BUS, RROWS = 2, RSIZE = REG_SIZE, BSIZE = BOX;
  localparam int NBUS = NUM_BUS, K = KSIZE, NMAX = NMAX_LOG2, LBITS = PIX_BITS;
  localparam int H = RROWS * RSIZE, W = RCOLS * RSIZE;
  localparam int BCOLS = W / BSIZE;
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

  adc_fist_top #(.RCOLS(RCOLS), .RROWS(RROWS), .RSIZE(RSIZE), .BSIZE(BSIZE)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // Test scene: smooth shading with bright bars of different orientation.
  function automatic int scene(int y, int x);
    int v = 40 + (x * 7 + y * 3) % 90;
    if (((x / 6) % 3 == 0) && y > 8 && y < 56) v = 230;
    if (((x + y) / 5) % 4 == 0 && (x / RSIZE) % 2 == 1) v = 200;
    return v > 255 ? 255 : v;
  endfunction

  real wreal [TAPS];
  int wmag [TAPS], wsign [TAPS];

  task automatic make_gabor();
    real g [TAPS];
    real gmax = 0.0;
    for (int ky = 0; ky < K; ky++)
      for (int kx = 0; kx < K; kx++) begin
        real xr = real'(kx - K / 2), yr = real'(ky - K / 2);
        g[ky*K+kx] = $exp(-(xr * xr + 0.25 * yr * yr) / (2.0 * 2.5 * 2.5))
                     * $cos(2.0 * 3.14159265358979 * xr / 5.0);
        if ((g[ky*K+kx] < 0 ? -g[ky*K+kx] : g[ky*K+kx]) > gmax)
          gmax = g[ky*K+kx] < 0 ? -g[ky*K+kx] : g[ky*K+kx];
      end
    foreach (g[t]) begin
      wsign[t] = g[t] < 0 ? -1 : 1;
      wmag[t] = int'((g[t] < 0 ? -g[t] : g[t]) / gmax * 1023.0);
      wreal[t] = real'(wsign[t] * wmag[t]) / 1024.0;
    end
  endtask

  // Pixel array model: region on each bus, loaded before every pass.
  always @(negedge clk)
    for (int b = 0; b < NBUS; b++)
      for (int p = 0; p < NPIX; p++)
        roi_level[b][p] = LBITS'(scene(int'(pass_row) * RSIZE + p / RSIZE, int'(roi_col[b]) * RSIZE + p % RSIZE));

  task automatic send(cmd_op_e op, int addr, int data);
    @(negedge clk);
    cmd_valid = 1'b1; cmd_op = op; cmd_addr = CMD_ADDR_W'(addr); cmd_data = CMD_DATA_W'(data);
    @(negedge clk);
    cmd_valid = 1'b0;
  endtask

  real exact [RROWS][NBUS][NPIX];
  real mae [11];
  real peak = 0.0;

  initial begin
    rst_n = 1'b0; cmd_valid = 1'b0; cmd_op = '0; cmd_addr = '0; cmd_data = '0;
    foreach (ede_level[c]) ede_level[c] = '0;
    make_gabor();
    foreach (exact[r, b, p]) begin
      automatic int y = p / RSIZE, x = p % RSIZE;
      exact[r][b][p] = 0.0;
      for (int ky = 0; ky < K; ky++)
        for (int kx = 0; kx < K; kx++) begin
          automatic int sy = y + ky - K / 2, sx = x + kx - K / 2;
          if (sy >= 0 && sy < RSIZE && sx >= 0 && sx < RSIZE)
            exact[r][b][p] += wreal[ky*K+kx] * real'(scene(r * RSIZE + sy, b * RSIZE + sx)) / 256.0;
        end
      if ((exact[r][b][p] < 0 ? -exact[r][b][p] : exact[r][b][p]) > peak)
        peak = exact[r][b][p] < 0 ? -exact[r][b][p] : exact[r][b][p];
    end
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < TAPS; t++)
      send(OP_LOAD_W, t, (wsign[t] < 0 ? 1 << NMAX : 0) | wmag[t]);
    send(OP_SET_MODE, 0, 3'b010);          // tracking alone: all regions

    for (int nl = 6; nl <= 10; nl++) begin
      automatic int n = 1 << nl;
      automatic int len = 0, npass = 0;
      automatic real err = 0.0, sq = 0.0;
      send(OP_SET_PREC, 0, nl);
      send(OP_START, 0, 0);
      while (!busy) @(posedge clk);
      while (busy) begin
        @(posedge clk);
        if (pass_active) len++;
        else len = 0;
        if (result_valid) begin
          npass++;
          check(len == n + 3, $sformatf("N=%0d pass took %0d cycles", n, len));
          len = 0;
          for (int b = 0; b < NBUS; b++) begin
            check(roi_en[b], "bus idle in a full pass");
            for (int p = 0; p < NPIX; p++) begin
              automatic real d = real'(result[b][p]) / real'(n) - exact[pass_row][b][p];
              err += d < 0 ? -d : d;
              sq += d * d;
            end
          end
        end
      end
      check(npass == RROWS, $sformatf("N=%0d: %0d passes for eight regions", n, npass));
      mae[nl] = err / real'(RROWS * NBUS * NPIX);
      $display("N=%5d  pass %0d cycles  MAE %.5f  (%.3f %% of peak)  PSNR %.2f dB",
               n, n + 3, mae[nl], 100.0 * mae[nl] / peak,
               10.0 * $log10(peak * peak / (sq / real'(RROWS * NBUS * NPIX))));
    end
    for (int nl = 7; nl <= 10; nl++)
      check(mae[nl] < mae[nl-1] * 1.05, $sformatf("error did not fall from N=%0d to N=%0d", 1 << (nl - 1), 1 << nl));
    check(mae[10] < mae[6], "N=1024 no better than N=64");
    check(mae[10] / peak < 0.01, "error at N=1024 above 1 % of peak");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
