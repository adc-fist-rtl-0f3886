// event_detection_engine_tb: scans small random 2-bit frames through the
// event detector. The first frame after reset must raise no event; in later
// frames a few random boxes change and the event map must equal the set of
// regions holding the centres of the changed boxes, worked out here from
// pixel coordinates. frame_done must follow the last row by one cycle.
module event_detection_engine_tb;
  localparam int BSIZE = 3, RSIZE = 4, RCOLS = 4, RROWS = 3;
  localparam int BCOLS = RCOLS * RSIZE / BSIZE, BROWS = RROWS * RSIZE / BSIZE;

  logic clk = 1'b0, rst_n, frame_start, row_valid;
  logic [$clog2(BROWS)-1:0] row_idx;
  logic [1:0] msb2 [BCOLS];
  logic [RCOLS-1:0] event_map [RROWS];
  logic any_event, frame_done, primed;
  int checks = 0, failures = 0;
  logic [1:0] frame [BROWS][BCOLS];
  bit exp_map [RROWS][RCOLS];

  event_detection_engine #(.BCOLS(BCOLS), .BROWS(BROWS), .RCOLS(RCOLS), .RROWS(RROWS),
                           .BSIZE(BSIZE), .RSIZE(RSIZE)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic scan(bit expect_events);
    bit any = 0;
    frame_start = 1'b1;
    @(posedge clk); #1;
    frame_start = 1'b0;
    for (int r = 0; r < BROWS; r++) begin
      row_valid = 1'b1;
      row_idx = $bits(row_idx)'(r);
      msb2 = frame[r];
      @(posedge clk); #1;
    end
    row_valid = 1'b0;
    checks++;
    if (!frame_done) begin failures++; $display("FAIL frame_done missing"); end
    for (int rr = 0; rr < RROWS; rr++)
      for (int rc = 0; rc < RCOLS; rc++) begin
        bit e = expect_events && exp_map[rr][rc];
        any |= e;
        checks++;
        if (event_map[rr][rc] != e) begin
          failures++;
          $display("FAIL region (%0d,%0d) got %0b exp %0b", rr, rc, event_map[rr][rc], e);
        end
      end
    checks++;
    if (any_event != any) begin failures++; $display("FAIL any_event"); end
    @(posedge clk); #1;
  endtask

  task automatic change(int nchanges);
    foreach (exp_map[a, b]) exp_map[a][b] = 0;
    for (int i = 0; i < nchanges; i++) begin
      int r = $urandom % BROWS, c = $urandom % BCOLS;
      frame[r][c] = frame[r][c] + 2'(1 + $urandom % 3);
      exp_map[(r * BSIZE + 1) / RSIZE][(c * BSIZE + 1) / RSIZE] = 1;
    end
  endtask

  initial begin
    rst_n = 1'b0; frame_start = 1'b0; row_valid = 1'b0; row_idx = '0;
    foreach (msb2[c]) msb2[c] = '0;
    foreach (frame[r, c]) frame[r][c] = 2'($urandom);
    repeat (2) @(posedge clk); #1;
    rst_n = 1'b1;
    change(5);
    scan(0);
    checks++;
    if (!primed) begin failures++; $display("FAIL not primed"); end
    for (int f = 0; f < 12; f++) begin
      change(f % 4);
      scan(1);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
