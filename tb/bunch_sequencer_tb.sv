// bunch_sequencer_tb: self-checking test of the bunch numbering.
//
// A reference counter is kept in the testbench. Checked every clock: nothing
// runs before enable and the first trigger; bunch 0 follows a trigger edge by
// one clock; the count runs 0..NB-1 and wraps with turn_start on bunch 0; a
// trigger in phase changes nothing; a trigger out of phase restarts the count
// and pulses resync; clearing enable stops it; the turn counter matches.
module bunch_sequencer_tb;
  localparam int NB = 9;
  localparam int BW = $clog2(NB);

  logic clk = 1'b0;
  logic rst, enable, p0_trig;
  logic valid, turn_start, resync;
  logic [BW-1:0] bunch;
  logic [31:0] turns;

  int checks = 0, failures = 0;
  int n_resync = 0, n_turn = 0;

  bunch_sequencer #(.NUM_BUNCHES(NB)) dut (.*);

  always #5 clk = ~clk;

  // reference
  bit r_valid = 0; int r_bunch = 0; int r_turns = 0; bit r_trig_q = 0; bit r_resync = 0;

  always @(posedge clk) begin
    if (rst) begin
      r_valid = 0; r_bunch = 0; r_turns = 0; r_trig_q = 0; r_resync = 0;
    end else begin
      checks++;
      if (valid != r_valid || (r_valid && (bunch != BW'(r_bunch) || turn_start != (r_bunch == 0)))
          || resync != r_resync || turns != r_turns) begin
        failures++;
        $display("FAIL %0t v %0b/%0b b %0d/%0d ts %0b rs %0b/%0b turns %0d/%0d", $time, valid, r_valid,
                 bunch, r_bunch, turn_start, resync, r_resync, turns, r_turns);
      end
      if (resync) n_resync++;
      if (valid && turn_start) n_turn++;
      // next state of the reference
      r_resync = 0;
      if (!enable) begin
        r_valid = 0; r_bunch = 0; r_turns = 0;
      end else if (p0_trig && !r_trig_q) begin
        r_resync = r_valid && (r_bunch != NB - 1);
        if (r_valid) r_turns++;
        r_valid = 1; r_bunch = 0;
      end else if (r_valid) begin
        if (r_bunch == NB - 1) begin r_bunch = 0; r_turns++; end
        else r_bunch++;
      end
      r_trig_q = p0_trig;
    end
  end

  task automatic pulse_after(int n);
    repeat (n) @(posedge clk);
    p0_trig <= 1'b1;
    @(posedge clk);
    p0_trig <= 1'b0;
  endtask

  initial begin
    rst = 1; enable = 0; p0_trig = 0;
    repeat (3) @(posedge clk);
    rst <= 0;
    pulse_after(4);               // ignored: not enabled
    enable <= 1'b1;
    repeat (5) @(posedge clk);
    pulse_after(2);               // start
    for (int t = 0; t < 5; t++) pulse_after(NB - 1);   // in phase: one trigger per turn
    checks++;
    if (n_resync != 0) begin failures++; $display("FAIL in-phase trigger caused resync"); end
    repeat (3 * NB) @(posedge clk); // free running without triggers
    pulse_after(3);               // out of phase
    pulse_after(NB - 2);
    p0_trig <= 1'b1;              // a long trigger level counts once
    repeat (4) @(posedge clk);
    p0_trig <= 1'b0;
    repeat (2 * NB) @(posedge clk);
    enable <= 1'b0;
    repeat (5) @(posedge clk);
    checks++;
    if (n_resync < 1 || n_turn < 8) begin
      failures++; $display("FAIL resync %0d turns %0d", n_resync, n_turn);
    end
    $display("resyncs %0d turns %0d", n_resync, n_turn);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
