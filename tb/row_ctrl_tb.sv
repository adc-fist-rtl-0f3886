// row_ctrl_tb: checks every row line for every box row in event-detection
// mode (only the box-centre row is high) and every region row band in
// tracking mode (all rows of the band are high), and that en gates them.
module row_ctrl_tb;
  localparam int H = 36, BSIZE = 9, RSIZE = 12;
  logic en, ote;
  logic [$clog2(H/BSIZE)-1:0] box_row;
  logic [$clog2(H/RSIZE)-1:0] reg_row;
  logic [H-1:0] row_en;
  int checks = 0, failures = 0;

  row_ctrl #(.H(H), .BSIZE(BSIZE), .RSIZE(RSIZE)) dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int e = 0; e < 2; e++)
      for (int m = 0; m < 2; m++)
        for (int b = 0; b < H / BSIZE; b++)
          for (int g = 0; g < H / RSIZE; g++) begin
            en = e[0]; ote = m[0];
            box_row = $bits(box_row)'(b); reg_row = $bits(reg_row)'(g);
            #1;
            for (int r = 0; r < H; r++) begin
              bit expv;
              expv = e && (m ? (r >= g * RSIZE && r < (g + 1) * RSIZE)
                                 : (r == b * BSIZE + 4));
              checks++;
              if (row_en[r] != expv) begin
                failures++;
                $display("FAIL en %0d ote %0d box %0d reg %0d row %0d", e, m, b, g, r);
              end
            end
          end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
