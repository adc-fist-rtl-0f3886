// command_decoder_tb: checks reset values, then sends each command and
// checks the register or strobe it should change, including refused
// precision values and tap numbers.
module command_decoder_tb;
  import adc_fist_pkg::*;
  localparam int TAPS = 81, NMAX = 10;
  logic clk = 1'b0, rst_n, cmd_valid;
  logic [2:0] cmd_op;
  logic [CMD_ADDR_W-1:0] cmd_addr;
  logic [CMD_DATA_W-1:0] cmd_data;
  mode_t mode;
  logic [$clog2(NMAX+1)-1:0] n_log2;
  weight_t weights [TAPS];
  logic start, stop, cmd_error;
  int checks = 0, failures = 0;
  weight_t model_w [TAPS];

  command_decoder #(.TAPS(TAPS), .NMAX(NMAX)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic send(cmd_op_e op, int addr, int data);
    cmd_valid = 1'b1; cmd_op = op; cmd_addr = CMD_ADDR_W'(addr); cmd_data = CMD_DATA_W'(data);
    @(posedge clk); #1;
    cmd_valid = 1'b0;
  endtask

  task automatic expect_bit(string what, logic got, logic expv);
    checks++;
    if (got !== expv) begin failures++; $display("FAIL %s got %0b exp %0b", what, got, expv); end
  endtask

  initial begin
    rst_n = 1'b0; cmd_valid = 1'b0; cmd_op = '0; cmd_addr = '0; cmd_data = '0;
    repeat (2) @(posedge clk); #1;
    rst_n = 1'b1;
    expect_bit("reset ede", mode.ede, 1'b1);
    expect_bit("reset ote", mode.ote, 1'b1);
    expect_bit("reset continuous", mode.continuous, 1'b0);
    checks++; if (n_log2 != 6) begin failures++; $display("FAIL reset n_log2 %0d", n_log2); end
    send(OP_SET_MODE, 0, 3'b101);
    expect_bit("mode ede", mode.ede, 1'b1);
    expect_bit("mode ote", mode.ote, 1'b0);
    expect_bit("mode cont", mode.continuous, 1'b1);
    send(OP_SET_PREC, 0, 10);
    checks++; if (n_log2 != 10) begin failures++; $display("FAIL n_log2 %0d", n_log2); end
    expect_bit("no error", cmd_error, 1'b0);
    send(OP_SET_PREC, 0, 11);
    expect_bit("prec error", cmd_error, 1'b1);
    checks++; if (n_log2 != 10) begin failures++; $display("FAIL n_log2 changed"); end
    send(OP_SET_PREC, 0, 0);
    expect_bit("prec 0 error", cmd_error, 1'b1);
    foreach (model_w[t]) model_w[t] = '0;
    for (int i = 0; i < 200; i++) begin
      int t = $urandom % TAPS;
      int d = $urandom % 2048;
      send(OP_LOAD_W, t, d);
      model_w[t] = weight_t'(d);
    end
    send(OP_LOAD_W, TAPS, 5);
    expect_bit("tap error", cmd_error, 1'b1);
    foreach (model_w[t]) begin
      checks++;
      if (weights[t] != model_w[t]) begin failures++; $display("FAIL weight %0d", t); end
    end
    send(OP_START, 0, 0);
    expect_bit("start", start, 1'b1);
    expect_bit("stop idle", stop, 1'b0);
    @(posedge clk); #1;
    expect_bit("start pulse", start, 1'b0);
    send(OP_STOP, 0, 0);
    expect_bit("stop", stop, 1'b1);
    send(cmd_op_e'(3'd7), 0, 0);
    expect_bit("bad op", cmd_error, 1'b1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
