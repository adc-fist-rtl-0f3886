// weight_stream_gen_tb: loads random signed coefficients, runs full
// periods at several stream lengths and checks, per tap, the number of ones
// on the stream of its sign (ceil(mag / 2^(NMAX - n))), silence on the other
// stream, and that ones of a half period are about half of the total.
module weight_stream_gen_tb;
  import adc_fist_pkg::*;
  localparam int TAPS = 9;
  localparam int NMAX = 10;

  logic clk = 1'b0, rst_n, clear, en;
  logic [$clog2(NMAX+1)-1:0] n_log2;
  weight_t weights [TAPS];
  logic w_pos [TAPS], w_neg [TAPS];
  logic [NMAX-1:0] phase;
  int checks = 0, failures = 0;

  weight_stream_gen #(.TAPS(TAPS), .NMAX(NMAX)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(int nl);
    int n = 1 << nl;
    int pos [TAPS], neg [TAPS], half [TAPS];
    n_log2 = 4'(nl);
    foreach (weights[t]) begin
      weights[t].neg = 1'($urandom);
      weights[t].mag = NMAX'($urandom);
    end
    weights[0].mag = '0;
    weights[1].mag = '1;
    clear = 1'b1; en = 1'b0;
    @(posedge clk); #1;
    clear = 1'b0; en = 1'b1;
    foreach (pos[t]) begin pos[t] = 0; neg[t] = 0; half[t] = 0; end
    for (int k = 0; k < n; k++) begin
      foreach (pos[t]) begin
        pos[t] += int'(w_pos[t]);
        neg[t] += int'(w_neg[t]);
        if (k < n / 2) half[t] += int'(w_pos[t] | w_neg[t]);
      end
      @(posedge clk); #1;
    end
    en = 1'b0;
    foreach (pos[t]) begin
      int step = 1 << (NMAX - nl);
      int expv = (int'(weights[t].mag) + step - 1) / step;
      int got  = weights[t].neg ? neg[t] : pos[t];
      int oth  = weights[t].neg ? pos[t] : neg[t];
      checks += 3;
      if (got != expv || oth != 0) begin
        failures++;
        $display("FAIL n=%0d tap %0d mag %0d got %0d/%0d exp %0d", n, t, weights[t].mag, got, oth, expv);
      end
      if (half[t] < expv / 2 - 1 || half[t] > (expv + 1) / 2 + 1) begin
        failures++;
        $display("FAIL n=%0d tap %0d uneven: %0d of %0d in first half", n, t, half[t], expv);
      end
      if (int'(phase) != (n % (1 << NMAX))) begin
        failures++;
        $display("FAIL phase %0d after %0d cycles", phase, n);
      end
    end
  endtask

  initial begin
    rst_n = 1'b0; clear = 1'b0; en = 1'b0; n_log2 = '0;
    foreach (weights[t]) weights[t] = '0;
    repeat (2) @(posedge clk); #1;
    rst_n = 1'b1;
    for (int rep = 0; rep < 5; rep++) begin
      run(6); run(10); run(8); run(2);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
