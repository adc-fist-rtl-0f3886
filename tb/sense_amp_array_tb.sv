// sense_amp_array_tb: drives random levels into the sense amplifier model
// and checks each 2-bit result against the quarter of full scale the level
// falls in, and that a disabled array reads zero.
module sense_amp_array_tb;
  localparam int COLS  = 12;
  localparam int LBITS = 8;
  logic en;
  logic [LBITS-1:0] level [COLS];
  logic [1:0] msb2 [COLS];
  int checks = 0, failures = 0;

  sense_amp_array #(.COLS(COLS), .LBITS(LBITS)) dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int rep = 0; rep < 200; rep++) begin
      en = (rep % 7) != 3;
      foreach (level[c]) level[c] = LBITS'($urandom);
      level[0] = 8'd63; level[1] = 8'd64; level[2] = 8'd191; level[3] = 8'd192;
      #1;
      foreach (level[c]) begin
        int q;
        q = en ? (int'(level[c]) * 4) / 256 : 0;
        checks++;
        if (int'(msb2[c]) != q) begin
          failures++;
          $display("FAIL level %0d en %0b got %0d exp %0d", level[c], en, msb2[c], q);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
