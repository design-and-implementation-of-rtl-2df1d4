// tb_bzfad_ctrl: self-checking test of the sequencer.
// The testbench stands in for the counter: last is high in the N-th step
// cycle.  Checks that load pulses once per accepted start, that step is high
// for exactly N cycles, that done pulses exactly N+1 cycles after start is
// sampled, and that a start during a run is ignored.
module tb_bzfad_ctrl;
  localparam int N = 16;
  logic clk = 0, rst_n = 0, start = 0, last;
  logic load, step, busy, done;
  int steps_seen = 0;
  int checks = 0, failures = 0, ignored = 0;

  bzfad_ctrl dut (.clk, .rst_n, .start, .last, .load, .step, .busy, .done);

  always #5 clk = ~clk;
  assign last = step && (steps_seen == N - 1);
  always @(posedge clk) if (step) steps_seen <= (steps_seen == N - 1) ? 0 : steps_seen + 1;

  task automatic run(input bit poke_start);
    int cyc, nsteps, nloads;
    bit seen_done;
    cyc = 0; nsteps = 0; nloads = 0; seen_done = 0;
    @(negedge clk);
    start = 1;
    #1;
    checks++;
    if (!load || busy) begin failures++; $display("FAIL no load on start"); end
    @(negedge clk);
    start = 0;
    while (!seen_done && cyc < 4 * N) begin
      cyc++;
      if (poke_start && cyc == 3) begin
        start = 1;
        #1;
        if (!load) ignored++;
      end else start = 0;
      if (step) nsteps++;
      if (load) nloads++;
      if (done) seen_done = 1;
      else @(negedge clk);
    end
    start = 0;
    checks++;
    if (!seen_done || cyc != N + 1) begin
      failures++;
      $display("FAIL done after %0d cycles, expected %0d", cyc, N + 1);
    end
    checks++;
    if (nsteps != N || nloads != 0) begin
      failures++;
      $display("FAIL steps=%0d loads=%0d", nsteps, nloads);
    end
    @(negedge clk);
    checks++;
    if (done || busy) begin failures++; $display("FAIL done/busy stuck"); end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    checks++;
    if (busy || done || step || load) begin failures++; $display("FAIL not idle after reset"); end
    run(0);
    run(1);
    repeat (3) @(negedge clk);
    run(0);
    checks++;
    if (ignored == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
