// tb_bzfad_widths: runs the BZ-FAD multiplier at 8 and 32 bits, the other
// operand widths the design is discussed at besides its default 16 bits
// (covered by tb_bzfad_multiplier), with random and corner-case operands.
module tb_bzfad_widths;
  logic clk = 0, rst_n = 0;
  int   c8, f8, by8, c32, f32, by32;
  logic done8, done32;
  int   checks = 0, failures = 0;

  bzfad_width_check #(.N(8),  .NMULT(200)) u_w8  (.clk, .rst_n, .checks(c8),  .failures(f8),  .bypassed(by8),  .finished(done8));
  bzfad_width_check #(.N(32), .NMULT(200)) u_w32 (.clk, .rst_n, .checks(c32), .failures(f32), .bypassed(by32), .finished(done32));

  always #5 clk = ~clk;

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    wait (done8 && done32);
    checks   = c8 + c32 + 1;
    failures = f8 + f32;
    if (by8 == 0 || by32 == 0) failures++;
    $display("8-bit: %0d checks, %0d bypassed cycles; 32-bit: %0d checks, %0d bypassed cycles", c8, by8, c32, by32);
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
