// tb_transpose_buffer: writes three blocks of 64 random coefficients in row
// order (c(8r+k) = coefficient k of row r) with random gaps, takes column 0
// in the cycle of the 64th write as the architecture requires, then reads
// columns 1..7 with random gaps.  Column c must be {c(56+c), ..., c(8+c),
// c(c)} with c(c) in bits [11:0]; empty must be high before the 64th word,
// and full must never be asserted.
module tb_transpose_buffer;
  logic        clk = 0, rst = 1;
  logic [11:0] writeData;
  logic [95:0] readData;
  logic        writeEn, full, readEn, empty;
  int checks = 0, failures = 0;

  transpose_buffer dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  function automatic logic [95:0] column(logic [11:0] c[64], int col);
    logic [95:0] v;
    for (int r = 0; r < 8; r++) v[12*r +: 12] = c[8*r + col];
    return v;
  endfunction

  logic [11:0] coef[64];

  initial begin
    writeEn = 0; readEn = 0; writeData = '0;
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst = 0;
    for (int blk = 0; blk < 3; blk++) begin
      foreach (coef[i]) coef[i] = 12'($urandom);
      for (int i = 0; i < 64; i++) begin
        while ($urandom_range(0, 3) == 0) begin
          writeEn = 0; readEn = 0; #1;
          chk(empty && !full, "no column while filling");
          @(negedge clk);
        end
        writeEn = 1; writeData = coef[i];
        readEn = (i == 63);
        #1;
        chk(!full, "full never asserted");
        if (i < 63) chk(empty, "no column before the 64th word");
        else        chk(!empty && readData == column(coef, 0), "column 0 with 64th word");
        @(negedge clk);
      end
      writeEn = 0;
      for (int col = 1; col < 8; col++) begin
        readEn = 0;
        while ($urandom_range(0, 2) == 0) @(negedge clk);
        readEn = 1; #1;
        chk(!empty && readData == column(coef, col), $sformatf("column %0d", col));
        @(negedge clk);
      end
      readEn = 0; #1;
      chk(empty, "empty after eight columns");
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
