// bzfad_adder: the adder of the BZ-FAD multiplier.
//
// Adds the multiplicand A, fed directly from its register with no 0/A
// multiplexer in front of it, to the partial product held in the Feeder
// register.  Its inputs change only in cycles where the multiplier bit is
// one, because the Feeder register is loaded only then; in the other cycles
// the adder is bypassed and stays quiet.  Unsigned N-bit operands, N+1-bit
// result with the carry on top.  Purely combinational; the adder structure
// is left to synthesis.
module bzfad_adder #(
  parameter int unsigned N = 16
) (
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  output logic [N:0]   sum
);
  assign sum = {1'b0, a} + {1'b0, b};
endmodule
