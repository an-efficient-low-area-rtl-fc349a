// tb_output_buffer: random writes and reads against a two-entry queue model.
// Checks data order, the flags of the three states (empty only with nothing
// held, full only with two words held) and the one-cycle latency.
module tb_output_buffer;
  logic        clk = 0, rst = 1;
  logic [11:0] writeData, readData;
  logic        writeEn, full, readEn, empty;
  int checks = 0, failures = 0;
  int n_full = 0, n_both = 0;

  output_buffer dut (.*);

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

  logic [11:0] q[$];

  initial begin
    writeEn = 0; readEn = 0; writeData = '0;
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst = 0;
    // latency: written in one cycle, readable in the next
    writeEn = 1; writeData = 12'h5A5; @(negedge clk); writeEn = 0;
    chk(!empty && readData == 12'h5A5, "one-cycle latency");
    q.push_back(12'h5A5);
    for (int i = 0; i < 5000; i++) begin
      writeEn   = ($urandom_range(0, 1) == 1);
      readEn    = ($urandom_range(0, 2) == 0) || (i > 2500 && $urandom_range(0, 1) == 1);
      writeData = 12'($urandom);
      #1;
      chk(empty == (q.size() == 0), "empty flag");
      chk(full  == (q.size() == 2), "full flag");
      if (full) n_full++;
      if (readEn && !empty) begin
        chk(readData == q.pop_front(), "read data");
        if (writeEn) n_both++;
      end
      if (writeEn && !full) q.push_back(writeData);
      @(negedge clk);
    end
    chk(n_full > 0 && n_both > 0, "full state and simultaneous read/write reached");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
