// tb_src_mux: random sources and select; the selected source's data and
// empty must reach the consumer and readEn must go back to that source only.
module tb_src_mux;
  logic        sel, a_empty, b_empty, readEn, a_readEn, b_readEn, empty;
  logic [95:0] a_readData, b_readData, readData;
  int checks = 0, failures = 0;

  src_mux dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 2000; i++) begin
      sel = 1'($urandom); a_empty = 1'($urandom); b_empty = 1'($urandom);
      readEn = 1'($urandom);
      a_readData = {$urandom, $urandom, $urandom};
      b_readData = {$urandom, $urandom, $urandom};
      #1;
      checks++;
      if (readData != (sel ? b_readData : a_readData) || empty != (sel ? b_empty : a_empty) ||
          a_readEn != (readEn && !sel) || b_readEn != (readEn && sel)) begin
        failures++;
        $display("FAIL sel=%0b readEn=%0b", sel, readEn);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
