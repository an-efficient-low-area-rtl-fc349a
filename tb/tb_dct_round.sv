// tb_dct_round: checks the product rounding against floor((r+512)/1024)
// clipped at +2047, over corner values and 20000 random 22-bit products.
module tb_dct_round;
  import dct_ref_pkg::*;

  logic signed [21:0] r;
  logic signed [11:0] q;
  int checks = 0, failures = 0;

  dct_round dut (.r(r), .q(q));

  task automatic check(int val);
    r = 22'(val);
    #1;
    checks++;
    if (int'(q) != ref_round(int'(r))) begin
      failures++;
      $display("FAIL r=%0d q=%0d expected %0d", r, q, ref_round(int'(r)));
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    static int corners[] = '{0, 1, 511, 512, 513, 1023, 1024, 1535, 1536, -1, -511, -512,
                      -513, -1024, -1025, -1536, -1537, 2097151, 2096640, 2096639,
                      2096128, 2096127, -2097152, -2096640, -2096641};
    foreach (corners[i]) check(corners[i]);
    for (int i = 0; i < 20000; i++) check(int'($urandom_range(0, 32'h003F_FFFF)) - 2097152);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
