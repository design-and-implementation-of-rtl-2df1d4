// lp_ring_counter: low-power one-hot ("Johnson") counter for the BZ-FAD
// multiplier.
//
// A single '1' circulates through N flip-flops; in cycle n of a
// multiplication q[n] is high and selects bit n of the multiplier.  A plain
// ring counter of N bits clocks all N flip-flops every cycle although only two
// of them change.  Here the ring is cut into N/BLOCK blocks and only the Hot
// Block - the block holding the '1' - is clocked, plus the block the '1' is
// about to enter when it sits in the last bit of the previous block.  Which
// block is hot is kept in one flag flip-flop per block, so no OR of the block's
// bits is needed to build its clock condition.
//
// The per-block clock condition is exported as blk_en and is used here as a
// flip-flop enable, which synthesis maps onto a clock-gating cell.  The
// partitioning and the Hot Block idea follow the design; the block size, the
// flag flip-flops and the reset state are choices of this implementation.
//
// Interface: adv moves the '1' one position up on the next rising clk edge,
// wrapping from N-1 to 0, so after N advances the counter is back at 0.
// rst_n (asynchronous, active low) places the '1' in bit 0.
module lp_ring_counter #(
  parameter int unsigned N     = 16,
  parameter int unsigned BLOCK = 4
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 adv,
  output logic [N-1:0]         q,
  output logic [N/BLOCK-1:0]   blk_en
);
  localparam int unsigned NB = N / BLOCK;

  logic [NB-1:0] hot;       // hot[i]: the '1' is inside block i
  logic [NB-1:0] enter;     // enter[i]: the '1' leaves block i-1 on this advance

  always_comb begin
    for (int i = 0; i < NB; i++) begin
      enter[i]  = q[((i + NB - 1) % NB) * BLOCK + BLOCK - 1];
      blk_en[i] = adv & (hot[i] | enter[i]);
    end
  end

  for (genvar i = 0; i < NB; i++) begin : g_blk
    // Bits of block i; bit 0 of the block takes the last bit of block i-1.
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        q[i*BLOCK +: BLOCK] <= (i == 0) ? BLOCK'(1) : '0;
        hot[i]              <= (i == 0);
      end else if (blk_en[i]) begin
        q[i*BLOCK +: BLOCK] <= {q[i*BLOCK +: BLOCK-1], enter[i]};
        hot[i]              <= enter[i] | (hot[i] & ~q[i*BLOCK + BLOCK - 1]);
      end
    end
  end

  initial begin
    assert (N % BLOCK == 0 && BLOCK >= 2)
      else $error("lp_ring_counter: N must be a multiple of BLOCK >= 2");
  end

  // The count stays one-hot.
  a_onehot: assert property (@(posedge clk) disable iff (!rst_n) $onehot(q));
endmodule
