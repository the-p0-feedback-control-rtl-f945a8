// hp_filter: programmable high-pass filter applied to every bunch separately.
//
// Each bunch's turn-by-turn position samples pass through a first-order DC
// blocker before the FIR filter:
//     y[n]   = x[n] - m[n]
//     m[n+1] = m[n] + (y[n] >>> shift)      (m kept with FRAC fraction bits)
// so the slow part of the signal (the closed-orbit offset) is removed and the
// corner frequency is set by 'shift' (a larger shift gives a lower corner).
// m is held per bunch in a NUM_BUNCHES-deep memory, read when the bunch's
// sample arrives and written back one clock later; since the same bunch
// returns only after a full turn there is no read/write hazard. m is always
// updated; hpf_en only chooses whether y or the raw sample is passed on.
//
// After reset the block spends NUM_BUNCHES clocks clearing the memory (busy
// high); samples offered then are dropped. Latency is 2 register stages: a
// sample taken with in_valid at clock edge t appears on out_* at edge t+1.
//
// The published P0 design says only that the samples are preprocessed by a programmable
// high-pass filter; the filter form, the shift control and the fraction
// width are this design's own choices.
module hp_filter #(
  parameter int unsigned NUM_BUNCHES = p0_pkg::NUM_BUNCHES,
  parameter int unsigned IN_W        = p0_pkg::ADC_W,
  parameter int unsigned OUT_W       = p0_pkg::SAMPLE_W,
  parameter int unsigned SH_W        = p0_pkg::HPF_SH_W,
  parameter int unsigned FRAC        = 16,
  localparam int unsigned BW = $clog2(NUM_BUNCHES)
) (
  input  logic                    clk,
  input  logic                    rst,
  input  logic                    hpf_en,
  input  logic [SH_W-1:0]         shift,
  input  logic                    in_valid,
  input  logic [BW-1:0]           in_bunch,
  input  logic signed [IN_W-1:0]  in_x,
  output logic                    busy,
  output logic                    out_valid,
  output logic [BW-1:0]           out_bunch,
  output logic signed [OUT_W-1:0] out_y
);

  localparam int unsigned M_W = IN_W + 1 + FRAC;   // state: input range plus sign and fraction

  logic signed [M_W-1:0] mem [NUM_BUNCHES];

  logic [BW-1:0]         init_cnt;
  logic                  s1_valid;
  logic [BW-1:0]         s1_bunch;
  logic signed [IN_W-1:0] s1_x;
  logic signed [M_W-1:0] s1_m;

  logic signed [M_W:0]   y_full;
  logic signed [M_W-1:0] m_next;
  logic signed [OUT_W-1:0] y_int;

  always_comb begin
    y_full = (M_W+1)'(s1_x) * (M_W+1)'(2**FRAC) - (M_W+1)'(s1_m);
    m_next = s1_m + M_W'(y_full >>> shift);
    y_int  = OUT_W'(y_full >>> FRAC);
  end

  // state memory: clear sweep after reset, then read-modify-write per bunch
  always_ff @(posedge clk) begin
    if (busy)
      mem[init_cnt] <= '0;
    else if (s1_valid)
      mem[s1_bunch] <= m_next;
    s1_m <= mem[in_bunch];
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      busy      <= 1'b1;
      init_cnt  <= '0;
      s1_valid  <= 1'b0;
      s1_bunch  <= '0;
      s1_x      <= '0;
      out_valid <= 1'b0;
      out_bunch <= '0;
      out_y     <= '0;
    end else begin
      if (busy) begin
        if (init_cnt == BW'(NUM_BUNCHES - 1)) busy <= 1'b0;
        else init_cnt <= init_cnt + 1'b1;
      end
      s1_valid  <= in_valid && !busy;
      s1_bunch  <= in_bunch;
      s1_x      <= in_x;
      out_valid <= s1_valid;
      out_bunch <= s1_bunch;
      out_y     <= hpf_en ? y_int : OUT_W'(s1_x);
    end
  end

  // the read-modify-write of the per-bunch memory needs a different bunch on
  // consecutive samples
  a_no_repeat: assert property (@(posedge clk) disable iff (rst)
                                in_valid && s1_valid |-> in_bunch != s1_bunch)
    else $error("same bunch on two consecutive clocks");

endmodule
