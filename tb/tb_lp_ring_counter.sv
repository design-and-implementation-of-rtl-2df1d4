// tb_lp_ring_counter: self-checking test of the low-power ring counter.
// A reference position p advances with adv and wraps at N.  Every cycle the
// count must be exactly 1 << p, and the block enables must be exactly the Hot
// Block plus, when the '1' sits in the last bit of a block, the next block.
// Counts how often the '1' crossed a block boundary and wrapped around.
module tb_lp_ring_counter;
  localparam int N = 16, BLOCK = 4, NB = N / BLOCK;
  logic          clk = 0, rst_n = 0, adv = 0;
  logic [N-1:0]  q;
  logic [NB-1:0] blk_en, exp_en;
  int p = 0;
  int checks = 0, failures = 0, crossings = 0, wraps = 0, two_blocks = 0;

  lp_ring_counter #(.N(N), .BLOCK(BLOCK)) dut (.clk, .rst_n, .adv, .q, .blk_en);

  always #5 clk = ~clk;

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 400; t++) begin
      adv = (t < 40) ? 1'b1 : ($urandom_range(3) != 0);
      #1;
      exp_en = '0;
      if (adv) begin
        exp_en[p / BLOCK] = 1'b1;
        if (p % BLOCK == BLOCK - 1) exp_en[(p / BLOCK + 1) % NB] = 1'b1;
      end
      checks++;
      if (q !== N'(1) << p) begin
        failures++;
        $display("FAIL t=%0d q=%b expected position %0d", t, q, p);
      end
      checks++;
      if (blk_en !== exp_en) begin
        failures++;
        $display("FAIL t=%0d blk_en=%b expected %b", t, blk_en, exp_en);
      end
      if ($countones(blk_en) == 2) two_blocks++;
      @(negedge clk);
      if (adv) begin
        if (p % BLOCK == BLOCK - 1) crossings++;
        if (p == N - 1) wraps++;
        p = (p + 1) % N;
      end
    end
    checks++;
    if (crossings == 0 || wraps == 0 || two_blocks == 0) begin
      failures++;
      $display("FAIL crossings=%0d wraps=%0d", crossings, wraps);
    end
    $display("crossings=%0d wraps=%0d two-block cycles=%0d", crossings, wraps, two_blocks);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
