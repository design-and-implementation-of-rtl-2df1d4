// feeder_bypass: Feeder and Bypass registers of the BZ-FAD multiplier.
//
// The high half of the partial product lives in one of two registers.  The
// current partial product is the adder output (Feeder + A) when the current
// multiplier bit B(n) is one, and the Bypass register when it is zero, so the
// adder is skipped in zero cycles.  It is shifted right by one by wiring: its
// bit 0 goes out on lsb (to M2) and bits N..1 are stored.  Where they are
// stored depends on the multiplier bit of the next cycle, B(n+1): into the
// Feeder register if the adder will be needed next, otherwise into the Bypass
// register.  Only one of the two registers is clocked per cycle.
//
// Interface and timing: clear (synchronous) zeroes both registers at the
// start of a multiplication; each cycle with step high stores the shifted
// partial product on the rising clk edge.  The caller forces next_add low in
// the last cycle so that the final high half of the product ends up in the
// Bypass register (bypass_q).  The two registers and the choice by B(n+1)
// follow the design; the use of B(n) as the multiplexer select, the clear and
// the last-cycle rule are this implementation's choices.
module feeder_bypass #(
  parameter int unsigned N = 16
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         clear,
  input  logic         step,
  input  logic         use_add,
  input  logic         next_add,
  input  logic [N:0]   sum,
  output logic [N-1:0] feeder_q,
  output logic [N-1:0] bypass_q,
  output logic         lsb
);
  logic [N:0] pp;   // current partial product, high half plus carry

  always_comb begin
    pp  = use_add ? sum : {1'b0, bypass_q};
    lsb = pp[0];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                   feeder_q <= '0;
    else if (clear)               feeder_q <= '0;
    else if (step && next_add)    feeder_q <= pp[N:1];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                   bypass_q <= '0;
    else if (clear)               bypass_q <= '0;
    else if (step && !next_add)   bypass_q <= pp[N:1];
  end
endmodule
