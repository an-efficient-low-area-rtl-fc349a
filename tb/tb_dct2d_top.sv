// tb_dct2d_top: end-to-end test of the 8x8 2-D DCT at its default sizes.
//
// Blocks of 64 pixels (-128..127, row-major) are written through the input
// port and the 64 coefficients of each block are read back in the core's
// order (word 8c+k = Z[k][c]).  Each coefficient is compared bit for bit with
// the reference fixed-point model and, for accuracy, with the exact 2-D DCT.
//   Phase 1: writer and reader never stall.  Checks the timing of the
//            pipeline: first coefficient readable 83 cycles after the first
//            pixel is taken, last one of the block 153 cycles after it, and
//            one block every 144 cycles when blocks follow back to back.
//   Phase 2: random writer gaps and random reader back-pressure, including
//            corner blocks (all +127, all -128, checkerboard, impulse).
// Counts every mechanism of the design and fails if one never happened:
// input stalls, mux switching to the transpose buffer and back, column 0
// taken together with the 64th 1-D coefficient, the 1-D core stalled by a
// full output buffer, and the output buffer's full state.
module tb_dct2d_top;
  import dct_ref_pkg::*;

  localparam int PHASE1_BLOCKS = 3;
  localparam int PHASE2_BLOCKS = 12;
  localparam int BLOCKS        = PHASE1_BLOCKS + PHASE2_BLOCKS;
  localparam real TOL          = 6.0;   // max |fixed - exact| accepted (two passes of 12-bit rounding)

  logic        clk = 0, rst = 1;
  logic [11:0] writeData, readData;
  logic        writeEn, full, readEn, empty;
  int checks = 0, failures = 0;

  dct2d_top dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  // ---------------- stimulus blocks ----------------
  blk_t pix [BLOCKS];
  blk_t ref_out [BLOCKS];

  initial begin
    for (int b = 0; b < BLOCKS; b++) begin
      for (int i = 0; i < 64; i++) begin
        case (b)
          4:       pix[b][i] = 127;
          5:       pix[b][i] = -128;
          6:       pix[b][i] = (((i / 8) + (i % 8)) % 2 == 1) ? 127 : -128;
          7:       pix[b][i] = (i == 0) ? 127 : 0;
          default: pix[b][i] = int'($urandom_range(0, 255)) - 128;
        endcase
      end
      ref_out[b] = ref_2d(pix[b]);
    end
  end

  // ---------------- cycle counter and mechanism counters ----------------
  longint cyc = 0;
  int n_in_stall = 0, n_to_tr = 0, n_to_ping = 0, n_col0 = 0;
  int n_core_stall = 0, n_ob_full = 0;
  logic sel_q = 0;

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (!rst) begin
      if (writeEn && full) n_in_stall++;
      if (dut.mux_sel && !sel_q) n_to_tr++;
      if (!dut.mux_sel && sel_q) n_to_ping++;
      sel_q <= dut.mux_sel;
      if (!dut.dct_empty_tr && dut.u_tr.stored == 7'd63 && dut.tr_rd && !dut.tr_empty) n_col0++;
      if (!dut.pong_empty && dut.dct_full) n_core_stall++;
      if (dut.ob_full) n_ob_full++;
    end
  end

  // ---------------- writer ----------------
  bit     random_gaps = 0;
  int     wblk = 0, wpix = 0;
  longint first_in [BLOCKS];

  always @(negedge clk) begin
    if (rst || wblk >= BLOCKS) writeEn <= 0;
    else begin
      writeEn   <= !random_gaps || ($urandom_range(0, 3) != 0);
      writeData <= 12'(pix[wblk][wpix]);
    end
  end
  always @(posedge clk) begin
    if (!rst && writeEn && !full) begin
      if (wpix == 0) first_in[wblk] = cyc;
      if (wpix == 63) begin wpix = 0; wblk++; end
      else wpix++;
      // phase 1 ends after its blocks have been written
      if (wblk == PHASE1_BLOCKS) random_gaps = 1;
    end
  end

  // ---------------- reader ----------------
  int     rblk = 0, rw = 0;
  longint first_out [BLOCKS], last_out [BLOCKS];
  real    max_err = 0.0;
  bit     backpressure = 0;

  always @(negedge clk) begin
    readEn <= !backpressure || ($urandom_range(0, 2) == 0);
  end
  always @(posedge clk) begin
    if (!rst && readEn && !empty && rblk < BLOCKS) begin
      int  got, k, c;
      real err;
      got = int'($signed(readData));
      k = rw % 8; c = rw / 8;
      checks++;
      if (got != ref_out[rblk][rw]) begin
        failures++;
        $display("FAIL block %0d word %0d (Z[%0d][%0d]) got %0d expected %0d",
                 rblk, rw, k, c, got, ref_out[rblk][rw]);
      end
      err = ideal_2d(pix[rblk], k, c) - real'(got);
      if (err < 0) err = -err;
      if (err > max_err) max_err = err;
      checks++;
      if (err > TOL) begin
        failures++;
        $display("FAIL accuracy block %0d Z[%0d][%0d] err %f", rblk, k, c, err);
      end
      if (rw == 0) first_out[rblk] = cyc;
      if (rw == 63) begin last_out[rblk] = cyc; rw = 0; rblk++; end
      else rw++;
      if (rblk == PHASE1_BLOCKS) backpressure = 1;
    end
  end

  // ---------------- sequence ----------------
  initial begin
    writeEn = 0; readEn = 0; writeData = '0;
    repeat (4) @(posedge clk);
    @(negedge clk);
    rst = 0;
    wait (rblk == BLOCKS);
    repeat (5) @(posedge clk);
    // phase 1 timing
    $display("first output after %0d cycles, last after %0d, block period %0d",
             first_out[0] - first_in[0], last_out[0] - first_in[0],
             first_out[1] - first_out[0]);
    chk(first_out[0] - first_in[0] == 83, "first coefficient latency 83");
    chk(last_out[0] - first_in[0] == 153, "block completion 153");
    chk(last_out[0] - first_in[0] <= 210, "within the 210-cycle latency budget");
    for (int b = 1; b < PHASE1_BLOCKS; b++)
      chk(first_out[b] - first_out[b-1] == 144, "144-cycle block period");
    chk(empty && !full, "idle at the end");
    $display("max |fixed-point - exact| = %f", max_err);
    $display("input stalls %0d, mux to transpose %0d, mux to ping %0d, col0+64th %0d, core stalls %0d, outbuf full %0d",
             n_in_stall, n_to_tr, n_to_ping, n_col0, n_core_stall, n_ob_full);
    chk(n_in_stall > 0,   "input stall happened");
    chk(n_to_tr == BLOCKS && n_to_ping == BLOCKS, "mux switched once each way per block");
    chk(n_col0 == BLOCKS, "column 0 read with 64th coefficient once per block");
    chk(n_core_stall > 0, "core stalled by output back-pressure");
    chk(n_ob_full > 0,    "output buffer full state reached");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
