// tb_onehot_mux: self-checking test of the one-hot multiplexer M1.
// For random data words and every one-hot selector position, the output must
// equal the selected bit, computed here by indexing the word directly.
module tb_onehot_mux;
  localparam int N = 16;
  logic [N-1:0] data, sel;
  logic         y;
  int checks = 0, failures = 0;

  onehot_mux #(.N(N)) dut (.data, .sel, .y);

  initial begin
    for (int t = 0; t < 200; t++) begin
      data = N'($urandom);
      if (t == 0) data = '0;
      if (t == 1) data = '1;
      for (int i = 0; i < N; i++) begin
        sel = N'(1) << i;
        #1;
        checks++;
        if (y !== data[i]) begin
          failures++;
          $display("FAIL data=%h sel=%0d y=%b", data, i, y);
        end
      end
    end
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
