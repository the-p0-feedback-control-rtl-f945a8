// p0_feedback_top: the FPGA of the P0 bunch-by-bunch feedback system.
//
// Two beam-position channels are sampled at 88 MHz, one sample per clock,
// which is one of every fourth RF bucket: 324 bunches per turn. After the P0
// trigger the bunch sequencer numbers the samples, and each channel passes
// them through a per-bunch high-pass filter, a per-bunch 32-tap FIR filter
// (one coefficient set shared by both channels) and a programmable delay to
// its D/A converter. Both channels together act as 648 independent filters.
// The ColdFire CPU reaches the design through the ColdFire bridge, an Avalon
// bus master in the sample-clock domain, and the Avalon fabric, whose slaves
// are the coefficient register, the control/status registers, the
// four-channel scope and the event receiver. The event receiver is an
// existing design that is not part of this RTL: its Avalon slave port, its
// interrupt request and its P0 trigger are ports of this module. The scope's
// and the event receiver's interrupts reach the CPU through the bridge.
//
// Clocks: clk is the 88 MHz sample clock (all filtering and the Avalon bus);
// cf_clk is the CPU bus clock, used only inside the bridge. Each reset is
// synchronous to its own clock. The D/A value computed from the A/D sample
// taken at clock edge t is updated at edge t+6+delay (high-pass filter 2
// register stages, FIR filter 4, delay 'delay' plus its output register).
module p0_feedback_top #(
  parameter int unsigned NUM_BUNCHES = p0_pkg::NUM_BUNCHES,
  parameter int unsigned NUM_TAPS    = p0_pkg::NUM_TAPS,
  parameter int unsigned SCOPE_DEPTH = p0_pkg::SCOPE_DEPTH,
  parameter int unsigned DELAY_DEPTH = 1024
) (
  input  logic                               clk,
  input  logic                               rst,
  // converters
  input  logic signed [p0_pkg::ADC_W-1:0]     adc_a [p0_pkg::NUM_CH],  // daughterboard A/Ds, one per channel
  input  logic signed [p0_pkg::AUX_ADC_W-1:0] adc_b [2],               // on-board A/Ds, scope only
  output logic signed [p0_pkg::DAC_W-1:0]     dac   [p0_pkg::NUM_CH],
  output logic [p0_pkg::NUM_CH-1:0]           dac_valid,
  // event receiver
  input  logic                               p0_trig,
  output p0_pkg::av_req_t                    evr_req,
  input  p0_pkg::av_rsp_t                    evr_rsp,
  input  logic                               evr_irq,
  // ColdFire CPU bus
  input  logic                               cf_clk,
  input  logic                               cf_rst,
  input  logic                               cf_cs_n,
  input  logic                               cf_rw,
  input  logic [p0_pkg::AV_AW-1:0]           cf_addr,
  input  logic [p0_pkg::AV_DW-1:0]           cf_wdata,
  output logic [p0_pkg::AV_DW-1:0]           cf_rdata,
  output logic                               cf_ta_n,
  output logic [1:0]                         cf_irq_n,   // to the CPU: [0] scope, [1] event receiver
  output logic                               scope_overflow
);

  localparam int unsigned NCH = p0_pkg::NUM_CH;
  localparam int unsigned BW  = $clog2(NUM_BUNCHES);

  // ---------------- Avalon bus ----------------
  p0_pkg::av_req_t m_req;
  p0_pkg::av_rsp_t m_rsp;
  p0_pkg::av_req_t s_req [4];
  p0_pkg::av_rsp_t s_rsp [4];
  logic            scope_irq;

  coldfire_bridge #(.NIRQ(2)) u_bridge (
    .cf_clk, .cf_rst, .cf_cs_n, .cf_rw, .cf_addr, .cf_wdata, .cf_rdata, .cf_ta_n, .cf_irq_n,
    .clk, .rst, .av_req(m_req), .av_rsp(m_rsp), .av_irq({evr_irq, scope_irq})
  );

  avalon_interconnect #(.NS(4)) u_fabric (
    .clk, .rst, .m_req, .m_rsp, .s_req, .s_rsp
  );

  assign evr_req  = s_req[3];
  assign s_rsp[3] = evr_rsp;

  // ---------------- registers ----------------
  logic signed [NUM_TAPS-1:0][p0_pkg::COEF_W-1:0] coefs;
  logic                          fb_en, hpf_en;
  logic [p0_pkg::HPF_SH_W-1:0]   hpf_shift [NCH];
  logic [p0_pkg::OUT_SH_W-1:0]   out_shift [NCH];
  logic [p0_pkg::DELAY_W-1:0]    delay     [NCH];
  logic [NCH-1:0]                sat, hp_busy, fir_busy;
  logic [31:0]                   turns;

  coef_regs #(.NUM_TAPS(NUM_TAPS)) u_coefs (
    .clk, .rst, .av_req(s_req[0]), .av_rsp(s_rsp[0]), .coefs
  );

  // ---------------- bunch numbering ----------------
  logic          seq_valid, resync;
  logic [BW-1:0] bunch;

  bunch_sequencer #(.NUM_BUNCHES(NUM_BUNCHES)) u_seq (
    .clk, .rst, .enable(fb_en), .p0_trig,
    .valid(seq_valid), .bunch, .turn_start(), .resync, .turns
  );

  ctrl_regs u_ctrl (
    .clk, .rst, .av_req(s_req[1]), .av_rsp(s_rsp[1]),
    .fb_en, .hpf_en, .hpf_shift, .out_shift, .delay,
    .running(seq_valid), .busy(|{hp_busy, fir_busy}), .resync, .sat, .turns
  );

  // ---------------- feedback channels ----------------
  for (genvar c = 0; c < NCH; c++) begin : g_ch
    logic                                hp_valid, fir_valid;
    logic [BW-1:0]                       hp_bunch;
    logic signed [p0_pkg::SAMPLE_W-1:0]  hp_y;
    logic signed [p0_pkg::DAC_W-1:0]     fir_y;

    hp_filter #(.NUM_BUNCHES(NUM_BUNCHES)) u_hpf (
      .clk, .rst, .hpf_en, .shift(hpf_shift[c]),
      .in_valid(seq_valid), .in_bunch(bunch), .in_x(adc_a[c]),
      .busy(hp_busy[c]), .out_valid(hp_valid), .out_bunch(hp_bunch), .out_y(hp_y)
    );

    fir_bank #(.NUM_BUNCHES(NUM_BUNCHES), .NUM_TAPS(NUM_TAPS)) u_fir (
      .clk, .rst, .coefs, .out_shift(out_shift[c]),
      .in_valid(hp_valid), .in_bunch(hp_bunch), .in_x(hp_y),
      .busy(fir_busy[c]), .out_valid(fir_valid), .out_bunch(), .out_y(fir_y),
      .sat(sat[c])
    );

    prog_delay #(.DEPTH(DELAY_DEPTH)) u_delay (
      .clk, .rst, .delay(delay[c]),
      .in_valid(fir_valid), .in_data(fir_y),
      .out_valid(dac_valid[c]), .out_data(dac[c])
    );
  end

  // ---------------- scope ----------------
  scope #(.DEPTH(SCOPE_DEPTH)) u_scope (
    .clk, .rst, .av_req(s_req[2]), .av_rsp(s_rsp[2]),
    .adc_a, .adc_b, .irq(scope_irq), .overflow(scope_overflow)
  );

endmodule
