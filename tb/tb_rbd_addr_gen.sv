// tb_rbd_addr_gen: runs one full frame of block periods plus one block. In
// each period the first 64 addresses must walk the 8x8 current block of
// the current block in raster order (line pitch 176), the count must follow
// 0..577, and the block base must step through the 22 x 18 blocks of the
// frame in raster order and then return to the first block.
module tb_rbd_addr_gen;
  import fsbma_pkg::*;
  localparam int NBX = FRAME_W / BLK, NBY = FRAME_H / BLK, MEMSZ = 1 << ADDR_W;
  logic clk = 0, rst_n = 0;
  addr_t addr;
  cnt_t  cnt;
  logic  blk_last;
  int checks = 0, failures = 0;

  rbd_addr_gen dut (.clk(clk), .rst_n(rst_n), .addr(addr), .cnt(cnt), .blk_last(blk_last));

  always #5 clk = ~clk;

  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst_n = 1;
    for (int b = 0; b <= NBX * NBY; b++) begin
      int bb, org;
      bb  = b % (NBX * NBY);
      org = (bb / NBX) * BLK * FRAME_W + (bb % NBX) * BLK + (0);
      for (int c = 0; c < PERIOD; c++) begin
        checks++;
        if (int'(cnt) != c || blk_last !== (c == PERIOD - 1)) failures++;
        if (c < 64) begin
          int e;
          e = (org + (c / 8) * FRAME_W + (c % 8) + MEMSZ) % MEMSZ;
          checks++;
          if (int'(addr) != e) begin
            failures++;
            if (failures < 5) $display("FAIL block %0d count %0d addr=%0d expected %0d", b, c, addr, e);
          end
        end
        @(negedge clk);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat ((NBX * NBY + 2) * PERIOD) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
