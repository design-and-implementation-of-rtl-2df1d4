// tb_feeder_bypass: self-checking test of the Feeder/Bypass registers.
// The testbench plays the rest of the multiplier: it supplies B(n), B(n+1)
// (0 in the last cycle) and the sum A + Feeder, and collects the bits that
// leave the partial product.  After N steps {Bypass, collected bits} must be
// A*B.  Each step also checks that the register not chosen by B(n+1) kept its
// value, and counts adder cycles and bypass cycles.
module tb_feeder_bypass;
  localparam int N = 16;
  logic           clk = 0, rst_n = 0, clear = 0, step = 0, use_add = 0, next_add = 0;
  logic [N:0]     sum;
  logic [N-1:0]   feeder_q, bypass_q;
  logic           lsb;
  logic [N-1:0]   opa, opb, low, f_before, b_before;
  logic [2*N-1:0] expected;
  int checks = 0, failures = 0, n_add = 0, n_bypass = 0;

  feeder_bypass #(.N(N)) dut (.clk, .rst_n, .clear, .step, .use_add, .next_add,
                              .sum, .feeder_q, .bypass_q, .lsb);

  always #5 clk = ~clk;
  assign sum = {1'b0, opa} + {1'b0, feeder_q};

  task automatic multiply(input logic [N-1:0] x, input logic [N-1:0] y);
    opa = x; opb = y;
    @(negedge clk);
    clear = 1;
    @(negedge clk);
    clear = 0;
    for (int n = 0; n < N; n++) begin
      step = 1;
      use_add  = opb[n];
      next_add = (n < N - 1) ? opb[n+1] : 1'b0;
      if (use_add) n_add++; else n_bypass++;
      #1;
      low[n] = lsb;
      f_before = feeder_q; b_before = bypass_q;
      @(negedge clk);
      checks++;
      if (next_add ? (bypass_q !== b_before) : (feeder_q !== f_before)) begin
        failures++;
        $display("FAIL step %0d: unselected register changed", n);
      end
    end
    step = 0;
    expected = (2*N)'(x) * (2*N)'(y);
    checks++;
    if ({bypass_q, low} !== expected) begin
      failures++;
      $display("FAIL %h * %h = %h, expected %h", x, y, {bypass_q, low}, expected);
    end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    multiply('1, '1);
    multiply('0, '1);
    multiply('1, '0);
    multiply(16'h8001, 16'hAAAA);
    for (int t = 0; t < 100; t++) multiply(N'($urandom), N'($urandom));
    checks++;
    if (n_add == 0 || n_bypass == 0) failures++;
    $display("adder cycles=%0d bypass cycles=%0d", n_add, n_bypass);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
