// abc_tb: checks the converter model. For random bit-line levels and two
// ramp periods it counts the high cycles of every output over one period
// and compares them with floor(level * N / 2^LBITS); it also checks that
// the high cycles form a single burst ending with the period.
module abc_tb;
  localparam int LINES = 16;
  localparam int LBITS = 8;
  localparam int NMAX  = 10;

  logic clk = 1'b0;
  logic ramp_rst;
  logic [$clog2(NMAX+1)-1:0] n_log2;
  logic [LBITS-1:0] level [LINES];
  logic pulse [LINES];
  int checks = 0, failures = 0;

  abc #(.LINES(LINES), .LBITS(LBITS), .NMAX(NMAX)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run_period(int nl);
    int ones [LINES];
    int first [LINES];
    int n = 1 << nl;
    n_log2 = 4'(nl);
    foreach (level[i]) level[i] = LBITS'($urandom);
    level[0] = '0;
    level[1] = '1;
    ramp_rst = 1'b1;
    @(posedge clk); #1;
    ramp_rst = 1'b0;
    foreach (ones[i]) begin ones[i] = 0; first[i] = -1; end
    for (int k = 0; k < n; k++) begin
      foreach (pulse[i]) if (pulse[i]) begin
        if (first[i] < 0) first[i] = k;
        ones[i]++;
      end
      @(posedge clk); #1;
    end
    foreach (level[i]) begin
      int expv = (int'(level[i]) * n) / (1 << LBITS);
      checks++;
      if (ones[i] != expv) begin
        failures++;
        $display("FAIL n=%0d line %0d level %0d ones %0d exp %0d", n, i, level[i], ones[i], expv);
      end
      if (expv > 0) begin
        checks++;
        if (first[i] != n - expv) begin
          failures++;
          $display("FAIL n=%0d line %0d burst starts at %0d", n, i, first[i]);
        end
      end
    end
  endtask

  initial begin
    ramp_rst = 1'b0;
    n_log2   = '0;
    foreach (level[i]) level[i] = '0;
    @(posedge clk); #1;
    for (int rep = 0; rep < 4; rep++) begin
      run_period(6);
      run_period(10);
      run_period(3);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
