// tb_bmsu: several "blocks" of candidate distortions, with gaps between the
// valid ones as in the real stream, random skips (only where a minimum is
// recorded and the distortion is not smaller, as the DAU guarantees) and
// repeated values to exercise ties. The search address input counts up by
// one per clock; the testbench predicts the vector as (address 4 clocks
// earlier) - 1239 of the first strictly smallest candidate, and checks
// mv_addr, mv_mad and the single mv_valid pulse per block.
module tb_bmsu;
  import fsbma_pkg::*;
  logic clk = 0, rst_n = 0;
  mad_t  mad, min_mad, mv_mad;
  logic  skip, valid, first, last, min_valid, upd, mv_valid;
  addr_t sa_addr, mv_addr;
  addr_t ahist [$];
  int checks = 0, failures = 0, n_upd = 0, n_skip = 0, n_mv = 0;
  int exp_addr, exp_mad;
  bit have;

  bmsu dut (
    .clk(clk), .rst_n(rst_n), .mad(mad), .skip(skip), .valid(valid), .first(first), .last(last),
    .sa_addr(sa_addr), .min_mad(min_mad), .min_valid(min_valid), .upd(upd),
    .mv_valid(mv_valid), .mv_addr(mv_addr), .mv_mad(mv_mad)
  );

  always #5 clk = ~clk;

  initial begin
    mad = 0; skip = 0; valid = 0; first = 0; last = 0; sa_addr = 0;
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 6; t++) begin
      sa_addr = sa_addr + 1;
      ahist.push_back(sa_addr);
      @(negedge clk);
    end
    for (int blk = 0; blk < 30; blk++) begin
      have = 0;
      for (int c = 0; c < 50; c++) begin
        bit sk;
        int a4;
        // one invalid clock between some candidates
        if (c % 7 == 3) begin
          valid = 0; first = 0; last = 0; mad = mad_t'($urandom); skip = 1'($urandom);
          sa_addr = sa_addr + 1; ahist.push_back(sa_addr);
          @(negedge clk);
          checks++; if (mv_valid) failures++;
        end
        valid = 1;
        first = (c == 0);
        last  = (c == 49);
        mad   = mad_t'($urandom_range(100, 160));
        sk    = have && (int'(mad) >= exp_mad) && ($urandom_range(0, 1) == 1);
        skip  = sk;
        a4    = int'(ahist[ahist.size() - 4]);
        if (sk) n_skip++;
        if (!sk && (!have || int'(mad) < exp_mad)) begin
          exp_mad  = int'(mad);
          exp_addr = (a4 - 1239 + 32768) % 32768;
          have = 1;
          n_upd++;
        end
        sa_addr = sa_addr + 1;
        ahist.push_back(sa_addr);
        @(negedge clk);
        checks++;
        if (mv_valid !== (c == 49)) begin failures++; $display("FAIL mv_valid at %0d/%0d", blk, c); end
        if (c == 49) begin
          n_mv++;
          checks++;
          if (int'(mv_addr) != exp_addr || int'(mv_mad) != exp_mad) begin
            failures++;
            $display("FAIL block %0d: %0d/%0d expected %0d/%0d", blk, mv_addr, mv_mad, exp_addr, exp_mad);
          end
        end
      end
      valid = 0; first = 0; last = 0; skip = 0;
      for (int g = 0; g < 5; g++) begin
        sa_addr = sa_addr + 1; ahist.push_back(sa_addr);
        @(negedge clk);
        checks++; if (mv_valid || min_valid) failures++;
      end
    end
    checks++;
    if (n_skip == 0 || n_upd <= 30) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
