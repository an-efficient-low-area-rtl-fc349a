// tb_dct_1d: sends three blocks of 128 random 96-bit words (12-bit elements)
// to the 1-D DCT core with random writeEn and random consumer readEn.
// Word n of a block must produce coefficient k = n mod 8 of its eight
// elements, bit-exact against the reference fixed-point arithmetic, offered
// to the transpose buffer for n < 64 and to the output buffer for n >= 64.
// Also checks the one-cycle latency, that full is high exactly when a result
// is held and not being taken, and that the core stalls under back-pressure.
module tb_dct_1d;
  import dct_ref_pkg::*;

  logic        clk = 0, rst = 1;
  logic [95:0] writeData;
  logic        writeEn, full;
  logic [11:0] readData;
  logic        readEn_transpose, empty_transpose, readEn_outbuff, empty_outbuff;
  int checks = 0, failures = 0;
  int stalls = 0;

  dct_1d dut (.*);

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

  int exp_val[$];
  bit exp_dst[$];   // 0: transpose, 1: output buffer
  int sent = 0;

  initial begin
    writeEn = 0; readEn_transpose = 0; readEn_outbuff = 0; writeData = '0;
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst = 0;
    // latency: one word in, result available the next cycle
    begin
      vec8_t x;
      for (int i = 0; i < 8; i++) begin
        x[i] = int'($urandom_range(0, 255)) - 128;
        writeData[12*i +: 12] = 12'(x[i]);
      end
      writeEn = 1; #1;
      chk(empty_transpose && empty_outbuff && !full, "idle after reset");
      @(negedge clk);
      writeEn = 0; #1;
      chk(!empty_transpose && empty_outbuff && int'($signed(readData)) == ref_1d(x, 0),
          "first result after one cycle");
      chk(full, "full while result not taken");
      readEn_transpose = 1; #1;
      chk(!full, "full drops when result is taken");
      @(negedge clk);
      readEn_transpose = 0;
      sent = 1;
    end
    while (sent < 3 * 128 || exp_val.size() > 0 || !(empty_transpose && empty_outbuff)) begin
      vec8_t x;
      for (int i = 0; i < 8; i++) begin
        x[i] = int'($urandom_range(0, 4095)) - 2048;
        writeData[12*i +: 12] = 12'(x[i]);
      end
      writeEn          = (sent < 3 * 128) && ($urandom_range(0, 3) != 0);
      readEn_transpose = ($urandom_range(0, 2) != 0);
      readEn_outbuff   = ($urandom_range(0, 2) != 0);
      #1;
      if (!empty_transpose || !empty_outbuff) begin
        bit dst;
        dst = !empty_outbuff;
        chk(exp_val.size() > 0, "result expected");
        chk(dst == exp_dst[0], "destination");
        chk(int'($signed(readData)) == exp_val[0], "coefficient value");
        if (int'($signed(readData)) != exp_val[0])
          $display("  got %0d expected %0d", $signed(readData), exp_val[0]);
        chk(full == !(dst ? readEn_outbuff : readEn_transpose), "full rule");
        if (dst ? readEn_outbuff : readEn_transpose) begin
          void'(exp_val.pop_front());
          void'(exp_dst.pop_front());
        end
      end else chk(!full, "not full when empty");
      if (writeEn && full) stalls++;
      if (writeEn && !full) begin
        exp_val.push_back(ref_1d(x, sent % 8));
        exp_dst.push_back((sent % 128) >= 64);
        sent++;
      end
      @(negedge clk);
    end
    chk(stalls > 0, "back-pressure exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
