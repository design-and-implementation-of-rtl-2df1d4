// product_low_reg: block M2 and the low half of the product register.
//
// In a conventional shift-and-add multiplier the whole product register
// shifts right every cycle.  Here the bit that leaves the partial product in
// cycle n is written straight into position n of the low half, addressed by
// the same one-hot counter that drives M1, and no other bit of the low half is
// clocked.  Each bit is a flip-flop with its own enable (we & sel[i]).
//
// Timing: on a rising clk edge with we high, q[i] <= d for the single i with
// sel[i] high.  No reset: all N bits are written during every multiplication
// before the product is read.  Using the counter for M2 follows the design;
// the per-bit enable form is this implementation's choice.
module product_low_reg #(
  parameter int unsigned N = 16
) (
  input  logic         clk,
  input  logic         we,
  input  logic [N-1:0] sel,
  input  logic         d,
  output logic [N-1:0] q
);
  for (genvar i = 0; i < N; i++) begin : g_bit
    always_ff @(posedge clk) begin
      if (we && sel[i]) q[i] <= d;
    end
  end
endmodule
