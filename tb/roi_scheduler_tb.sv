// roi_scheduler_tb: loads random event maps and follows every pass. Each
// pass must lie in one row, use each bus at most once, take for each bus the
// leftmost region still pending, and the walk must cover every flagged
// region exactly once with the least number of passes per row (the largest
// number of flagged regions sharing one bus).
module roi_scheduler_tb;
  localparam int RCOLS = 32, RROWS = 5, NBUS = 8;
  logic clk = 1'b0, rst_n, load, accept, busy, pass_valid;
  logic [RCOLS-1:0] event_map [RROWS];
  logic [$clog2(RROWS)-1:0] pass_row;
  logic [$clog2(RCOLS)-1:0] roi_col [NBUS];
  logic roi_en [NBUS];
  int checks = 0, failures = 0;

  roi_scheduler #(.RCOLS(RCOLS), .RROWS(RROWS), .NBUS(NBUS)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic walk(int density);
    bit todo [RROWS][RCOLS];
    int passes [RROWS];
    int exp_passes [RROWS];
    int guard = 0;
    foreach (event_map[r]) begin
      for (int c = 0; c < RCOLS; c++) begin
        event_map[r][c] = ($urandom % 100) < density;
        todo[r][c] = event_map[r][c];
      end
      passes[r] = 0;
      exp_passes[r] = 0;
      for (int b = 0; b < NBUS; b++) begin
        int cnt = 0;
        for (int c = b; c < RCOLS; c += NBUS) cnt += int'(event_map[r][c]);
        if (cnt > exp_passes[r]) exp_passes[r] = cnt;
      end
    end
    load = 1'b1;
    @(posedge clk); #1;
    load = 1'b0;
    foreach (event_map[r]) event_map[r] = '0;
    while (busy && guard < 1000) begin
      guard++;
      accept = 1'b0;
      if (pass_valid) begin
        passes[pass_row]++;
        for (int b = 0; b < NBUS; b++) begin
          int lm = -1;
          for (int c = b; c < RCOLS; c += NBUS)
            if (lm < 0 && todo[pass_row][c]) lm = c;
          checks++;
          if ((lm >= 0) != roi_en[b] || (lm >= 0 && int'(roi_col[b]) != lm)) begin
            failures++;
            $display("FAIL row %0d bus %0d en %0b col %0d exp %0d", pass_row, b, roi_en[b], roi_col[b], lm);
          end
          if (roi_en[b]) todo[pass_row][roi_col[b]] = 0;
        end
        accept = ($urandom % 3) != 0;   // sometimes hold the pass a cycle
        if (!accept)
          for (int b = 0; b < NBUS; b++) if (roi_en[b]) todo[pass_row][roi_col[b]] = 1;
        if (!accept) passes[pass_row]--;
      end
      @(posedge clk); #1;
    end
    accept = 1'b0;
    foreach (todo[r, c]) begin
      if (c == 0) begin
        checks++;
        if (passes[r] != exp_passes[r]) begin
          failures++;
          $display("FAIL row %0d passes %0d exp %0d", r, passes[r], exp_passes[r]);
        end
      end
      if (todo[r][c]) begin failures++; $display("FAIL region (%0d,%0d) never served", r, c); end
    end
  endtask

  initial begin
    rst_n = 1'b0; load = 1'b0; accept = 1'b0;
    foreach (event_map[r]) event_map[r] = '0;
    repeat (2) @(posedge clk); #1;
    rst_n = 1'b1;
    walk(0); walk(10); walk(40); walk(100); walk(25);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
