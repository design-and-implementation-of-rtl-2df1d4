// tb_bzfad_adder: self-checking test of the BZ-FAD adder.
// Corner values and random operands; the expected sum with carry is
// computed in 32-bit arithmetic.
module tb_bzfad_adder;
  localparam int N = 16;
  logic [N-1:0] a, b;
  logic [N:0]   sum;
  int checks = 0, failures = 0;

  bzfad_adder #(.N(N)) dut (.a, .b, .sum);

  task automatic check(input logic [N-1:0] x, input logic [N-1:0] z);
    int unsigned exp;
    a = x; b = z;
    #1;
    exp = int'(x) + int'(z);
    checks++;
    if (32'(sum) != exp) begin
      failures++;
      $display("FAIL %h + %h = %h, expected %h", x, z, sum, exp);
    end
  endtask

  initial begin
    check('0, '0);
    check('1, '1);
    check('1, N'(1));
    check(N'(1) << (N-1), N'(1) << (N-1));
    for (int t = 0; t < 1000; t++) check(N'($urandom), N'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
