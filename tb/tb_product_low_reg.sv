// tb_product_low_reg: self-checking test of M2 and the low product half.
// Writes random bits at random one-hot positions, sometimes with we low, and
// compares the register with a reference array updated the same way; checks
// that only the addressed bit changes.
module tb_product_low_reg;
  localparam int N = 16;
  logic         clk = 0;
  logic         we, d;
  logic [N-1:0] sel, q, ref_q;
  int checks = 0, failures = 0;

  product_low_reg #(.N(N)) dut (.clk, .we, .sel, .d, .q);

  always #5 clk = ~clk;

  initial begin
    int pos;
    we = 0; d = 0; sel = '0;
    // Fill every position with a known value first.
    for (int i = 0; i < N; i++) begin
      @(negedge clk);
      we = 1; sel = N'(1) << i; d = i[0];
      ref_q[i] = i[0];
    end
    @(negedge clk);
    checks++;
    if (q !== ref_q) begin failures++; $display("FAIL fill q=%h ref=%h", q, ref_q); end
    for (int t = 0; t < 500; t++) begin
      pos = $urandom_range(N-1);
      we  = ($urandom_range(3) != 0);
      d   = 1'($urandom);
      sel = N'(1) << pos;
      if (we) ref_q[pos] = d;
      @(negedge clk);
      checks++;
      if (q !== ref_q) begin
        failures++;
        $display("FAIL t=%0d pos=%0d we=%b d=%b q=%h ref=%h", t, pos, we, d, q, ref_q);
      end
    end
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
