// spe_tb: feeds random pixel and weight bits into a small SPE and keeps its
// own count of the positive and negative AND products of every zero-padded
// K x K window. After each pass it checks every pos - neg result and that
// result_valid arrives exactly two cycles after the last input cycle.
module spe_tb;
  localparam int R    = 7;
  localparam int K    = 9;
  localparam int NMAX = 7;
  localparam int ACC_W = $clog2(K * K * (1 << NMAX) + 1);

  logic clk = 1'b0, rst_n, clear, en, last;
  logic pix_pulse [R*R];
  logic w_pos [K*K], w_neg [K*K];
  logic signed [ACC_W:0] result [R*R];
  logic result_valid;
  int checks = 0, failures = 0;
  int ref_sum [R*R];

  spe #(.R(R), .K(K), .NMAX(NMAX)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic pass(int n);
    int wait_cycles;
    clear = 1'b1; en = 1'b0; last = 1'b0;
    @(posedge clk); #1;
    clear = 1'b0;
    foreach (ref_sum[p]) ref_sum[p] = 0;
    for (int k = 0; k < n; k++) begin
      en = 1'b1;
      last = (k == n - 1);
      foreach (pix_pulse[p]) pix_pulse[p] = ($urandom % 3) != 0;
      foreach (w_pos[t]) begin
        int s = $urandom % 4;
        w_pos[t] = (s == 1);
        w_neg[t] = (s == 2);
      end
      for (int y = 0; y < R; y++)
        for (int x = 0; x < R; x++)
          for (int ky = 0; ky < K; ky++)
            for (int kx = 0; kx < K; kx++) begin
              int sy = y + ky - K / 2, sx = x + kx - K / 2;
              if (sy >= 0 && sy < R && sx >= 0 && sx < R && pix_pulse[sy*R+sx])
                ref_sum[y*R+x] += int'(w_pos[ky*K+kx]) - int'(w_neg[ky*K+kx]);
            end
      @(posedge clk); #1;
    end
    en = 1'b0; last = 1'b0;
    wait_cycles = 1;
    while (!result_valid && wait_cycles < 10) begin
      @(posedge clk); #1;
      wait_cycles++;
    end
    checks++;
    if (wait_cycles != 2) begin
      failures++;
      $display("FAIL result_valid %0d cycles after last", wait_cycles);
    end
    foreach (result[p]) begin
      checks++;
      if (int'(result[p]) != ref_sum[p]) begin
        failures++;
        $display("FAIL pixel %0d got %0d exp %0d", p, result[p], ref_sum[p]);
      end
    end
  endtask

  initial begin
    rst_n = 1'b0; clear = 1'b0; en = 1'b0; last = 1'b0;
    foreach (pix_pulse[p]) pix_pulse[p] = 1'b0;
    foreach (w_pos[t]) begin w_pos[t] = 1'b0; w_neg[t] = 1'b0; end
    repeat (2) @(posedge clk); #1;
    rst_n = 1'b1;
    pass(16);
    pass(64);
    pass(128);
    pass(1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
