// onehot_mux: multiplexer M1 of the BZ-FAD multiplier.
//
// Selects one bit of the multiplier word with a one-hot selector taken
// straight from the ring counter, so register B is never shifted and its bit
// 0 (a high-fanout select line in a conventional shift-and-add multiplier)
// disappears.  Written as an AND-OR tree: y = OR over i of (data[i] & sel[i]).
// The one-hot select follows the design; the AND-OR form is this
// implementation's choice.  Purely combinational.
module onehot_mux #(
  parameter int unsigned N = 16
) (
  input  logic [N-1:0] data,
  input  logic [N-1:0] sel,
  output logic         y
);
  assign y = |(data & sel);
endmodule
