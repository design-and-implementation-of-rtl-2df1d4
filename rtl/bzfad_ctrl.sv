// bzfad_ctrl: sequencer of the BZ-FAD multiplier.
//
// Two states.  In IDLE a start request raises load for one cycle (operands
// are captured and the Feeder and Bypass registers cleared) and moves to RUN.
// RUN raises step for one cycle per multiplier bit; the cycle in which the
// counter reports its last position (last) is the final step, after which the
// sequencer returns to IDLE and pulses done for one cycle.  A multiplication of
// N bits therefore takes N step cycles and done rises N+1 cycles after start
// is sampled.  start is ignored while busy.  The design names no controller;
// this handshake is the implementation's own.
module bzfad_ctrl (
  input  logic clk,
  input  logic rst_n,
  input  logic start,
  input  logic last,
  output logic load,
  output logic step,
  output logic busy,
  output logic done
);
  typedef enum logic {IDLE, RUN} state_t;
  state_t state;

  assign load = (state == IDLE) && start;
  assign step = (state == RUN);
  assign busy = (state == RUN);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= IDLE;
      done  <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (state)
        IDLE: if (start) state <= RUN;
        RUN:  if (last) begin
                state <= IDLE;
                done  <= 1'b1;
              end
        default: state <= IDLE;
      endcase
    end
  end

  a_no_load_when_busy: assert property (@(posedge clk) disable iff (!rst_n) !(load && busy));
endmodule
