// tb_dct_weight_rom: every LUT row must hold the four weights of the 8-point
// DCT, round(1024 * 0.5 * cos(k*(2j+1)*pi/16)), w_j in bits [10j+9:10j].
module tb_dct_weight_rom;
  import dct_ref_pkg::*;

  logic [2:0]  idx;
  logic [39:0] w;
  int checks = 0, failures = 0;

  dct_weight_rom dut (.idx(idx), .w(w));

  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < 8; k++) begin
      idx = 3'(k);
      #1;
      for (int j = 0; j < 4; j++) begin
        int got;
        got = int'($signed(w[10*j +: 10]));
        checks++;
        if (got != ref_w(k, j)) begin
          failures++;
          $display("FAIL k=%0d j=%0d w=%0d expected %0d", k, j, got, ref_w(k, j));
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
