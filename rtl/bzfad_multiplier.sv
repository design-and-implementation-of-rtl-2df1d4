// bzfad_multiplier: N x N unsigned "Bypass Zero, Feed A Directly" (BZ-FAD)
// shift-and-add multiplier.
//
// A shift-and-add multiplier spends one cycle per multiplier bit.  BZ-FAD
// keeps that schedule but removes most of the switching of the conventional
// datapath:
//   * register B is not shifted; M1 (onehot_mux) picks bit B(n) with the
//     one-hot output of a low-power ring counter (lp_ring_counter);
//   * A is fed straight to the adder, with no 0/A multiplexer;
//   * the adder is bypassed when B(n)=0: the partial product is kept in the
//     Feeder register when the next bit B(n+1) is one and in the Bypass
//     register when it is zero (feeder_bypass);
//   * the low half of the product is not shifted: M2 (product_low_reg) writes
//     the bit leaving the partial product into position n.
// The structure follows the design; the operand registers, the controller
// handshake and the reset values are this implementation's choices.
//
// Interface and timing: with busy low, a start pulse captures a and b; busy
// is then high for N cycles, and done pulses one cycle later (N+1 cycles after
// start is sampled), when product = a*b.  product holds its value until the
// next start.  rst_n is asynchronous and active low.  cnt_blk_en shows which
// counter blocks are clocked in each cycle (the Hot Block clock enables), for
// switching-activity measurements.
module bzfad_multiplier #(
  parameter int unsigned N         = 16,
  parameter int unsigned CNT_BLOCK = 4
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           start,
  input  logic [N-1:0]   a,
  input  logic [N-1:0]   b,
  output logic           busy,
  output logic           done,
  output logic [2*N-1:0] product,
  output logic [N/CNT_BLOCK-1:0] cnt_blk_en
);
  logic           load, step, last;
  logic [N-1:0]   reg_a, reg_b;
  logic [N-1:0]   cnt, cnt_next;
  logic           b_n, b_n1, next_add;
  logic [N:0]     sum;
  logic [N-1:0]   feeder_q, bypass_q, p_low;
  logic           pp_lsb;

  // Operand registers A and B, loaded once per multiplication.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      reg_a <= '0;
      reg_b <= '0;
    end else if (load) begin
      reg_a <= a;
      reg_b <= b;
    end
  end

  bzfad_ctrl u_ctrl (
    .clk, .rst_n, .start, .last,
    .load, .step, .busy, .done
  );

  lp_ring_counter #(.N(N), .BLOCK(CNT_BLOCK)) u_cnt (
    .clk, .rst_n, .adv(step), .q(cnt), .blk_en(cnt_blk_en)
  );

  assign last     = cnt[N-1];
  assign cnt_next = {cnt[N-2:0], cnt[N-1]};   // position of the next cycle

  // M1: B(n) for this cycle and B(n+1) for the next.
  onehot_mux #(.N(N)) u_m1 (.data(reg_b), .sel(cnt),      .y(b_n));
  onehot_mux #(.N(N)) u_m1_next (.data(reg_b), .sel(cnt_next), .y(b_n1));
  assign next_add = b_n1 & ~last;

  bzfad_adder #(.N(N)) u_add (.a(reg_a), .b(feeder_q), .sum);

  feeder_bypass #(.N(N)) u_fb (
    .clk, .rst_n, .clear(load), .step,
    .use_add(b_n), .next_add, .sum,
    .feeder_q, .bypass_q, .lsb(pp_lsb)
  );

  // M2 and the low half of the product.
  product_low_reg #(.N(N)) u_m2 (
    .clk, .we(step), .sel(cnt), .d(pp_lsb), .q(p_low)
  );

  assign product = {bypass_q, p_low};
endmodule
