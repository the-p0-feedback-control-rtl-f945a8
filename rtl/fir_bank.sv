// fir_bank: one feedback channel's 32-tap FIR filter, time-shared by all
// bunches of the ring.
//
// Every clock one bunch's new sample x[n] arrives, with the bunch number. Each
// bunch keeps its own history of earlier turns: together with the sample just
// arrived that is NUM_TAPS values, x[n] .. x[n-31], and the filter output is
//     y[n] = sum_k c[k] * x[n-k],   k = 0 .. NUM_TAPS-1
// computed with NUM_TAPS parallel 18x18 multipliers, so a complete filter
// evaluation finishes every clock and 324 bunches make 324 independent
// turn-by-turn filters. The history is one memory word per bunch holding the
// NUM_TAPS-1 earlier samples; it is read when the bunch's sample arrives and
// written back, shifted by one, the next clock. The coefficients are an input:
// one shared set drives both channels and may change at any time.
//
// The sum is scaled to the D/A converter by an arithmetic right shift
// (out_shift) and saturated; sat pulses when saturation happened.
//
// Timing: 4 register stages (history read, multiply, add, scale); a sample
// taken with in_valid at clock edge t gives out_* at edge t+3. After reset the history
// memory is cleared for NUM_BUNCHES clocks (busy high), and samples offered
// then are dropped.
//
// From the published P0 design: 32 taps, 18-bit samples and coefficients, a multiplier
// per tap, 324 bunches each with its own stored values, shared coefficients.
// The pipeline, the output scaling and saturation are this design's own.
module fir_bank #(
  parameter int unsigned NUM_BUNCHES = p0_pkg::NUM_BUNCHES,
  parameter int unsigned NUM_TAPS    = p0_pkg::NUM_TAPS,
  parameter int unsigned SAMPLE_W    = p0_pkg::SAMPLE_W,
  parameter int unsigned COEF_W      = p0_pkg::COEF_W,
  parameter int unsigned OUT_W       = p0_pkg::DAC_W,
  parameter int unsigned SH_W        = p0_pkg::OUT_SH_W,
  localparam int unsigned BW    = $clog2(NUM_BUNCHES),
  localparam int unsigned ACC_W = SAMPLE_W + COEF_W + $clog2(NUM_TAPS)
) (
  input  logic                                    clk,
  input  logic                                    rst,
  input  logic signed [NUM_TAPS-1:0][COEF_W-1:0]  coefs,     // c[k] in element k
  input  logic [SH_W-1:0]                         out_shift,
  input  logic                                    in_valid,
  input  logic [BW-1:0]                           in_bunch,
  input  logic signed [SAMPLE_W-1:0]              in_x,
  output logic                                    busy,
  output logic                                    out_valid,
  output logic [BW-1:0]                           out_bunch,
  output logic signed [OUT_W-1:0]                 out_y,
  output logic                                    sat
);

  localparam int unsigned HIST = NUM_TAPS - 1;
  localparam int unsigned PW   = SAMPLE_W + COEF_W;

  typedef logic [HIST-1:0][SAMPLE_W-1:0] hist_t;   // element j holds x[n-1-j]

  hist_t mem [NUM_BUNCHES];

  logic [BW-1:0]               init_cnt;
  // stage 1: sample and its bunch's history
  logic                        s1_valid;
  logic [BW-1:0]               s1_bunch;
  logic signed [SAMPLE_W-1:0]  s1_x;
  hist_t                       s1_hist;
  logic [NUM_TAPS-1:0][SAMPLE_W-1:0] line;
  // stage 2: products
  logic                        s2_valid;
  logic [BW-1:0]               s2_bunch;
  logic signed [PW-1:0]        s2_prod [NUM_TAPS];
  // stage 3: sum
  logic                        s3_valid;
  logic [BW-1:0]               s3_bunch;
  logic signed [ACC_W-1:0]     s3_acc;

  logic signed [ACC_W-1:0]     sum;
  logic signed [ACC_W-1:0]     scaled;
  logic signed [OUT_W-1:0]     clipped;
  logic                        clip;

  assign line = {s1_hist, s1_x};

  always_comb begin
    sum = '0;
    for (int k = 0; k < NUM_TAPS; k++)
      sum += ACC_W'(s2_prod[k]);
  end

  always_comb begin
    scaled = s3_acc >>> out_shift;
    clip   = 1'b0;
    if (scaled > ACC_W'(2**(OUT_W-1) - 1)) begin
      clipped = {1'b0, {(OUT_W-1){1'b1}}};
      clip    = 1'b1;
    end else if (scaled < -ACC_W'(2**(OUT_W-1))) begin
      clipped = {1'b1, {(OUT_W-1){1'b0}}};
      clip    = 1'b1;
    end else begin
      clipped = OUT_W'(scaled);
    end
  end

  // history memory: clear sweep after reset, then read and shifted write-back
  always_ff @(posedge clk) begin
    if (busy)
      mem[init_cnt] <= '0;
    else if (s1_valid)
      mem[s1_bunch] <= line[HIST-1:0];
    s1_hist <= mem[in_bunch];
  end

  always_ff @(posedge clk) begin
    for (int k = 0; k < NUM_TAPS; k++)
      s2_prod[k] <= $signed(coefs[k]) * $signed(line[k]);
    s3_acc <= sum;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      busy      <= 1'b1;
      init_cnt  <= '0;
      s1_valid  <= 1'b0;
      s1_bunch  <= '0;
      s1_x      <= '0;
      s2_valid  <= 1'b0;
      s2_bunch  <= '0;
      s3_valid  <= 1'b0;
      s3_bunch  <= '0;
      out_valid <= 1'b0;
      out_bunch <= '0;
      out_y     <= '0;
      sat       <= 1'b0;
    end else begin
      if (busy) begin
        if (init_cnt == BW'(NUM_BUNCHES - 1)) busy <= 1'b0;
        else init_cnt <= init_cnt + 1'b1;
      end
      s1_valid  <= in_valid && !busy;
      s1_bunch  <= in_bunch;
      s1_x      <= in_x;
      s2_valid  <= s1_valid;
      s2_bunch  <= s1_bunch;
      s3_valid  <= s2_valid;
      s3_bunch  <= s2_bunch;
      out_valid <= s3_valid;
      out_bunch <= s3_bunch;
      out_y     <= s3_valid ? clipped : '0;
      sat       <= s3_valid && clip;
    end
  end

  // the read-modify-write of the per-bunch memory needs a different bunch on
  // consecutive samples
  a_no_repeat: assert property (@(posedge clk) disable iff (rst)
                                in_valid && s1_valid |-> in_bunch != s1_bunch)
    else $error("same bunch on two consecutive clocks");

endmodule
