// bunch_sequencer: numbers the bunch samples of each storage-ring turn.
//
// The A/D converters run at 88 MHz, a quarter of the RF frequency, so every
// clock carries one sample of every fourth bunch: 324 bunches per 3.68 us
// turn. Processing starts when the P0 (first bunch) trigger is seen; from
// then on the block counts 0..NUM_BUNCHES-1 and wraps, one bunch per clock,
// and both feedback channels use the same number.
//
// Timing: a rising edge on p0_trig in clock t makes bunch 0 current in clock
// t+1 (bunch/valid are registered). The trigger is expected once per turn,
// in the clock where bunch NUM_BUNCHES-1 is current. A trigger that arrives at
// any other count restarts the count at 0 and pulses resync. Clearing enable
// stops the count and drops valid. turn_start marks bunch 0 of every turn,
// and turns counts turns since enable was set.
//
// The published P0 design gives the bunch count and the role of the P0 trigger; the
// edge detection, re-synchronisation and turn counter are this design's own.
module bunch_sequencer #(
  parameter int unsigned NUM_BUNCHES = p0_pkg::NUM_BUNCHES,
  localparam int unsigned BW = $clog2(NUM_BUNCHES)
) (
  input  logic          clk,
  input  logic          rst,        // synchronous, active high
  input  logic          enable,     // feedback enable from the control registers
  input  logic          p0_trig,    // P0 trigger from the event receiver, synchronous to clk
  output logic          valid,      // a bunch is current this clock
  output logic [BW-1:0] bunch,      // its number
  output logic          turn_start, // bunch 0 is current
  output logic          resync,     // one-clock pulse: trigger arrived out of phase
  output logic [31:0]   turns
);

  logic trig_q;
  logic rise;

  assign rise = p0_trig & ~trig_q;

  always_ff @(posedge clk) begin
    if (rst) begin
      trig_q     <= 1'b0;
      valid      <= 1'b0;
      bunch      <= '0;
      turn_start <= 1'b0;
      resync     <= 1'b0;
      turns      <= '0;
    end else begin
      trig_q <= p0_trig;
      resync <= 1'b0;
      if (!enable) begin
        valid      <= 1'b0;
        bunch      <= '0;
        turn_start <= 1'b0;
        turns      <= '0;
      end else if (rise) begin
        valid      <= 1'b1;
        bunch      <= '0;
        turn_start <= 1'b1;
        if (valid) turns <= turns + 1;
        resync     <= valid && (bunch != BW'(NUM_BUNCHES - 1));
      end else if (valid) begin
        if (bunch == BW'(NUM_BUNCHES - 1)) begin
          bunch      <= '0;
          turn_start <= 1'b1;
          turns      <= turns + 1;
        end else begin
          bunch      <= bunch + 1'b1;
          turn_start <= 1'b0;
        end
      end
    end
  end

endmodule
