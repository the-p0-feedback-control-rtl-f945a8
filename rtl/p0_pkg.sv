// p0_pkg: widths, sizes and Avalon bus types shared by the P0 bunch-by-bunch
// feedback design.
//
// The filter sizes follow the published design: 32 taps, 18-bit samples and
// coefficients, 324 bunches per revolution (every fourth of the 1296 RF
// buckets, sampled at 88 MHz), two channels, 14-bit A/D and D/A converters
// and a four-channel scope with 4k samples per channel. The Avalon bus is
// carried as two packed structs: a request from master to slave and a
// response back. Every slave in this design answers a read exactly one clock
// later (readdatavalid) and never stalls; that bus timing, the register map
// and the scope sample width are this design's own choices.
package p0_pkg;

  // Filter datapath
  localparam int unsigned NUM_TAPS    = 32;   // FIR taps per bunch
  localparam int unsigned NUM_BUNCHES = 324;  // bunches handled per turn
  localparam int unsigned NUM_CH      = 2;    // feedback channels
  localparam int unsigned SAMPLE_W    = 18;   // stored sample width
  localparam int unsigned COEF_W      = 18;   // coefficient width
  localparam int unsigned ADC_W       = 14;   // daughterboard A/D converters
  localparam int unsigned AUX_ADC_W   = 12;   // on-board A/D converters
  localparam int unsigned DAC_W       = 14;   // D/A converters

  // Scope
  localparam int unsigned SCOPE_CH    = 4;
  localparam int unsigned SCOPE_DEPTH = 4096;
  localparam int unsigned SCOPE_W     = 16;

  // Avalon memory-mapped bus, word addressed
  localparam int unsigned AV_AW = 12;
  localparam int unsigned AV_DW = 32;

  typedef struct packed {
    logic [AV_AW-1:0] address;
    logic             read;
    logic             write;
    logic [AV_DW-1:0] writedata;
  } av_req_t;

  typedef struct packed {
    logic [AV_DW-1:0] readdata;
    logic             readdatavalid;
  } av_rsp_t;

  // Address map (32-bit word addresses)
  localparam logic [AV_AW-1:0] COEF_BASE  = 12'h000;  // 32 words
  localparam logic [AV_AW-1:0] CTRL_BASE  = 12'h040;  // 16 words
  localparam logic [AV_AW-1:0] SCOPE_BASE = 12'h080;  // 8 words
  localparam logic [AV_AW-1:0] EVR_BASE   = 12'h400;  // 1024 words

  // Control register offsets (within CTRL_BASE)
  localparam int unsigned CTRL_CONTROL  = 0;  // bit0 feedback enable, bit1 high-pass enable
  localparam int unsigned CTRL_STATUS   = 1;  // read only
  localparam int unsigned CTRL_TURNS    = 2;  // read only: turns since enable
  localparam int unsigned CTRL_CH_BASE  = 4;  // 4 words per channel:
  localparam int unsigned CTRL_HPF_SH   = 0;  //   high-pass time constant (shift)
  localparam int unsigned CTRL_OUT_SH   = 1;  //   output scaling (right shift)
  localparam int unsigned CTRL_DELAY    = 2;  //   output delay in clocks

  // Scope register offsets (within SCOPE_BASE)
  localparam int unsigned SCOPE_CTRL    = 0;  // bit0 run, bit1 irq enable, bit2 clear (self clearing)
  localparam int unsigned SCOPE_DECIM   = 1;  // record one sample set every DECIM+1 clocks
  localparam int unsigned SCOPE_STATUS  = 2;  // [12:0] fill count, bit16 half full, bit17 overflow
  localparam int unsigned SCOPE_DATA01  = 3;  // {ch1, ch0} of the oldest entry
  localparam int unsigned SCOPE_DATA23  = 4;  // {ch3, ch2} of the oldest entry; reading pops it

  localparam int unsigned HPF_SH_W = 4;
  localparam int unsigned OUT_SH_W = 6;
  localparam int unsigned DELAY_W  = 10;

endpackage
