// tb_pong_buffer: feeds rows and columns with random writeEn/readEn and
// checks that the pong buffer
//  - takes eight lines with MuxSel = 0, then eight with MuxSel = 1, repeatedly,
//  - presents each loaded line unchanged for exactly eight accepted reads,
//  - keeps full/empty complementary (full while holding a line),
//  - needs 144 cycles for the 16 lines of a block when never stalled.
module tb_pong_buffer;
  logic        clk = 0, rst = 1;
  logic [95:0] writeData, readData;
  logic        writeEn, full, readEn, empty, MuxSel;
  int checks = 0, failures = 0;

  pong_buffer dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  logic [95:0] held;
  int          reads_left = 0;
  int          lines = 0;      // lines loaded since reset
  int          cyc;

  // one clock period of stimulus + checking; returns when the edge has passed
  task automatic step(bit we, bit re);
    writeEn   = we;
    readEn    = re;
    writeData = {$urandom, $urandom, $urandom};
    #1;
    chk(full == !empty, "flags complementary");
    chk(empty == (reads_left == 0), "empty only between lines");
    chk(MuxSel == (((lines - (reads_left > 0 ? 1 : 0)) / 8) % 2 == 1), "MuxSel sequence");
    if (readEn && !empty) begin
      chk(readData == held, "line held");
      reads_left--;
    end else if (writeEn && !full) begin
      held = writeData;
      reads_left = 8;
      lines++;
    end
    @(negedge clk);
  endtask

  initial begin
    writeEn = 0; readEn = 0; writeData = '0;
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst = 0;
    // one block with no stalls: 16 lines x 9 cycles
    cyc = 0;
    do begin step(1, 1); cyc++; end while (lines < 16 || reads_left > 0);
    chk(cyc == 144, "144 cycles per block");
    if (cyc != 144) $display("block took %0d cycles", cyc);
    // random stalls for three more blocks
    while (lines < 64 || reads_left > 0)
      step($urandom_range(0, 2) != 0, $urandom_range(0, 2) != 0);
    chk(!MuxSel && empty, "back to row pass");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
