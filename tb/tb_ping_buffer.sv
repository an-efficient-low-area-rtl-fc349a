// tb_ping_buffer: streams 40 rows of random words into the ping buffer with
// random writeEn and readEn.  A queue model checks that each parallel read
// returns the eight words in arrival order (first word in bits [11:0]), that
// full/empty follow the two-state FSM, and that a row with no gaps is full
// exactly eight cycles after its first word.
module tb_ping_buffer;
  logic        clk = 0, rst = 1;
  logic [11:0] writeData;
  logic        writeEn, full, readEn, empty;
  logic [95:0] readData;
  int checks = 0, failures = 0;

  ping_buffer dut (.*);

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

  logic [11:0] words[$];
  int          in_row;
  int          rows_out;
  int          nogap_start;

  initial begin
    writeEn = 0; readEn = 0; writeData = '0;
    in_row = 0; rows_out = 0;
    repeat (3) @(posedge clk);
    rst = 0;
    // first row without gaps: full after exactly 8 cycles
    @(negedge clk);
    chk(empty && !full, "reset flags");
    for (int i = 0; i < 8; i++) begin
      writeEn = 1; writeData = 12'(i + 1);
      words.push_back(writeData);
      @(negedge clk);
      chk(full == (i == 7), "full after eighth word only");
    end
    writeEn = 0;
    // a write while full must be ignored
    writeEn = 1; writeData = 12'hABC; @(negedge clk); writeEn = 0;
    chk(full && readData[11:0] == 12'd1 && readData[95:84] == 12'd8, "row layout");
    // random traffic
    while (rows_out < 40) begin
      writeEn   = ($urandom_range(0, 3) != 0);
      readEn    = ($urandom_range(0, 2) != 0);
      writeData = 12'($urandom);
      #1;
      chk(full == !empty, "flags complementary");
      if (readEn && !empty) begin
        logic [95:0] exp;
        for (int i = 0; i < 8; i++) exp[12*i +: 12] = words.pop_front();
        chk(readData == exp, "row data");
        rows_out++;
      end
      if (writeEn && !full) words.push_back(writeData);
      @(negedge clk);
    end
    writeEn = 0; readEn = 0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
