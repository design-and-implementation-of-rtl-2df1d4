// tb_bzfad_multiplier: end-to-end test of the BZ-FAD multiplier at its
// default size (16 x 16 bits, counter blocks of 4).
//
// Runs corner-case and random multiplications and compares each product
// with A*B computed in the testbench.  For every multiplication it checks
// that done rises exactly N+1 cycles after start, that busy is high for N
// cycles and that product holds its value until the next start.  It also
// watches the internal mechanisms and counts how often each happened:
// adder cycles (B(n)=1), bypassed cycles (B(n)=0), stores into the Feeder and
// into the Bypass register, Hot Block hand-overs (two counter blocks enabled)
// and starts ignored while busy.  Any that never happened is a failure.
module tb_bzfad_multiplier;
  localparam int N = 16;
  localparam int NB = 4;
  logic           clk = 0, rst_n = 0, start = 0;
  logic [N-1:0]   a, b;
  logic           busy, done;
  logic [2*N-1:0] product;
  logic [NB-1:0]  cnt_blk_en;
  int checks = 0, failures = 0;
  int n_add = 0, n_bypass = 0, n_feed = 0, n_bystore = 0, n_handover = 0,
      n_ignored = 0, n_mults = 0, max_blocks = 0;

  bzfad_multiplier dut (.clk, .rst_n, .start, .a, .b, .busy, .done, .product, .cnt_blk_en);

  always #5 clk = ~clk;

  // Mechanism counters, sampled from the datapath's control signals.
  always @(posedge clk) if (rst_n && dut.step) begin
    if (dut.b_n) n_add++; else n_bypass++;
    if (dut.next_add) n_feed++; else n_bystore++;
    if ($countones(cnt_blk_en) == 2) n_handover++;
    if ($countones(cnt_blk_en) > max_blocks) max_blocks = $countones(cnt_blk_en);
  end

  task automatic multiply(input logic [N-1:0] x, input logic [N-1:0] y, input bit poke);
    logic [2*N-1:0] expected;
    int cyc, busy_cyc;
    expected = (2*N)'(x) * (2*N)'(y);
    @(negedge clk);
    a = x; b = y; start = 1;
    @(negedge clk);
    start = 0;
    a = N'($urandom); b = N'($urandom);   // operands must have been captured
    cyc = 1; busy_cyc = 0;
    while (!done && cyc < 3 * N) begin
      if (busy) busy_cyc++;
      if (poke && cyc == 4) begin
        start = 1;
        n_ignored++;
      end else start = 0;
      @(negedge clk);
      cyc++;
    end
    start = 0;
    n_mults++;
    checks++;
    if (!done || cyc != N + 1 || busy_cyc != N) begin
      failures++;
      $display("FAIL latency: done=%b after %0d cycles (expected %0d), busy for %0d", done, cyc, N + 1, busy_cyc);
    end
    checks++;
    if (product !== expected) begin
      failures++;
      $display("FAIL %h * %h = %h, expected %h", x, y, product, expected);
    end
    repeat (2) @(negedge clk);
    checks++;
    if (product !== expected || busy) begin
      failures++;
      $display("FAIL product not held: %h", product);
    end
  endtask

  initial begin
    a = '0; b = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    multiply('1, '1, 0);
    multiply('0, '1, 0);
    multiply('1, '0, 0);
    multiply(N'(1), N'(1) << (N - 1), 0);
    multiply(16'h8001, 16'hAAAA, 1);
    multiply(16'h1234, 16'h5555, 0);
    for (int t = 0; t < 300; t++) multiply(N'($urandom), N'($urandom), t % 17 == 0);
    $display("mults=%0d adder=%0d bypass=%0d feeder-stores=%0d bypass-stores=%0d handovers=%0d ignored-starts=%0d max-blocks=%0d",
             n_mults, n_add, n_bypass, n_feed, n_bystore, n_handover, n_ignored, max_blocks);
    checks++;
    if (n_add == 0 || n_bypass == 0 || n_feed == 0 || n_bystore == 0 || n_handover == 0 || n_ignored == 0) begin
      failures++;
      $display("FAIL a mechanism never happened");
    end
    checks++;
    if (max_blocks > 2) begin
      failures++;
      $display("FAIL more than two counter blocks clocked in one cycle");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
