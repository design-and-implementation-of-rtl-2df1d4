// bzfad_width_check: testbench helper that drives one BZ-FAD multiplier of
// width N through NMULT multiplications (corner cases first, then random
// operands), checks every product against A*B and the N+1-cycle latency, and
// reports its totals on its outputs when finished is raised.
module bzfad_width_check #(
  parameter int N     = 8,
  parameter int NMULT = 100
) (
  input  logic clk,
  input  logic rst_n,
  output int   checks,
  output int   failures,
  output int   bypassed,
  output logic finished
);
  logic           start = 0;
  logic [N-1:0]   a, b;
  logic           busy, done;
  logic [2*N-1:0] product;
  logic [N/4-1:0] cnt_blk_en;

  bzfad_multiplier #(.N(N), .CNT_BLOCK(4)) dut (
    .clk, .rst_n, .start, .a, .b, .busy, .done, .product, .cnt_blk_en
  );

  always @(posedge clk) if (rst_n && dut.step && !dut.b_n) bypassed++;

  function automatic logic [N-1:0] rand_word();
    logic [N-1:0] w;
    for (int i = 0; i < N; i += 16) w[i +: 16 > N ? N : 16] = ($urandom);
    return w;
  endfunction

  initial begin
    logic [2*N-1:0] expected;
    logic [N-1:0]   x, y;
    int cyc;
    checks = 0; failures = 0; bypassed = 0; finished = 0;
    a = '0; b = '0;
    @(posedge rst_n);
    for (int t = 0; t < NMULT; t++) begin
      case (t)
        0: begin x = '1; y = '1; end
        1: begin x = '1; y = '0; end
        2: begin x = N'(1); y = N'(1) << (N - 1); end
        default: begin x = rand_word(); y = rand_word(); end
      endcase
      expected = (2*N)'(x) * (2*N)'(y);
      @(negedge clk);
      a = x; b = y; start = 1;
      @(negedge clk);
      start = 0;
      cyc = 1;
      while (!done && cyc < 3 * N) begin
        @(negedge clk);
        cyc++;
      end
      checks += 2;
      if (!done || cyc != N + 1) begin
        failures++;
        $display("FAIL N=%0d latency %0d cycles", N, cyc);
      end
      if (product !== expected) begin
        failures++;
        $display("FAIL N=%0d %h * %h = %h, expected %h", N, x, y, product, expected);
      end
    end
    finished = 1;
  end
endmodule
