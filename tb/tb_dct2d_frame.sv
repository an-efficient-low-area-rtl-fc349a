// tb_dct2d_frame: whole video frames through the 2-D DCT core.
//
// Streams a synthetic 720x480 frame and then a synthetic 1920x1080 frame
// (luma only), 8x8 block by block in raster order of blocks, with a writer
// that is always ready and a reader that always takes the output.  Every
// coefficient is compared bit for bit with the reference fixed-point model.
// The cycle count of each frame must equal (blocks - 1) x 144 + 153, and the
// frame rate implied at the clock rates reported for FPGA implementations of
// this architecture (80.5 MHz for the SD frame, about 206 MHz for the HD
// frame) must reach 70 and 30 frames per second respectively.
// 1080 lines are 135 block rows; no padding is needed.
module tb_dct2d_frame;
  import dct_ref_pkg::*;

  logic        clk = 0, rst = 1;
  logic [11:0] writeData, readData;
  logic        writeEn, full, readEn, empty;
  int checks = 0, failures = 0;

  dct2d_top dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (6_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  // synthetic picture: gradients, a texture term and a hard edge, level-shifted
  function automatic int pixel(int x, int y);
    int v;
    v = (x * 3 + y * 5 + ((x * y) % 17) * 4) % 256;
    if ((x / 37 + y / 29) % 5 == 0) v = 255 - v;
    return v - 128;
  endfunction

  longint cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  // the writer and reader work on a queue of expected blocks
  blk_t   expq[$];
  int     w_bx, w_by, w_i;
  bit     wdone;
  int     r_blk, r_i, mismatches;
  longint t_first_in, t_last_out;

  task automatic run_frame(int width, int height, real clk_mhz, real min_fps, string name);
    int  blocks;
    real fps;
    blocks = (width / 8) * (height / 8);
    w_bx = 0; w_by = 0; w_i = 0; wdone = 0;
    r_blk = 0; r_i = 0; mismatches = 0;
    fork
      // writer
      begin
        while (!wdone) begin
          int x, y;
          blk_t p;
          x = w_bx * 8 + w_i % 8;
          y = w_by * 8 + w_i / 8;
          writeData = 12'(pixel(x, y));
          writeEn   = 1;
          @(posedge clk);
          if (!full) begin
            if (w_bx == 0 && w_by == 0 && w_i == 0) t_first_in = cyc;
            if (w_i == 63) begin
              for (int i = 0; i < 64; i++) p[i] = pixel(w_bx * 8 + i % 8, w_by * 8 + i / 8);
              expq.push_back(ref_2d(p));
              w_i = 0;
              if (w_bx == width / 8 - 1) begin
                w_bx = 0;
                if (w_by == height / 8 - 1) wdone = 1; else w_by++;
              end else w_bx++;
            end else w_i++;
          end
          #1;
        end
        writeEn = 0;
      end
      // reader
      begin
        readEn = 1;
        while (r_blk < blocks) begin
          @(posedge clk);
          if (!empty) begin
            if (expq.size() == 0 || int'($signed(readData)) != expq[0][r_i]) begin
              mismatches++;
              if (mismatches < 5) $display("FAIL %s block %0d word %0d", name, r_blk, r_i);
            end
            if (r_i == 63) begin
              void'(expq.pop_front());
              r_i = 0; r_blk++;
              if (r_blk == blocks) t_last_out = cyc;
            end else r_i++;
          end
        end
      end
    join
    checks++;
    if (mismatches != 0) failures++;
    fps = clk_mhz * 1.0e6 / real'(t_last_out - t_first_in);
    $display("%s: %0d blocks, %0d cycles, %0.1f frames/s at %0.1f MHz, %0d coefficient mismatches",
             name, blocks, t_last_out - t_first_in, fps, clk_mhz, mismatches);
    chk(t_last_out - t_first_in == longint'(blocks) * 144 + 9, {name, " frame cycle count"});
    chk(fps >= min_fps, {name, " frame rate"});
  endtask

  initial begin
    writeEn = 0; readEn = 0; writeData = '0;
    repeat (4) @(posedge clk);
    #1 rst = 0;
    run_frame(720, 480, 80.5, 70.0, "720x480");
    repeat (200) @(posedge clk);
    #1;
    run_frame(1920, 1080, 210.0 / 1.02, 30.0, "1920x1080");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
