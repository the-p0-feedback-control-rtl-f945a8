// ctrl_regs: Avalon slave with the run-time settings and status of the two
// feedback channels.
//
// Word map (offsets within the slave, 32-bit words):
//   0 CONTROL  bit0 feedback enable (starts the bunch count at the next P0
//              trigger), bit1 high-pass filter enable
//   1 STATUS   bit0 running, bit1 filter memories still clearing,
//              bit4 P0 trigger arrived out of phase (sticky),
//              bit8+c channel c output saturated (sticky);
//              writing 1 to a sticky bit clears it
//   2 TURNS    turns processed since enable (read only)
//   4+4c+0     channel c high-pass shift   (HPF_SH_W bits)
//   4+4c+1     channel c output shift      (OUT_SH_W bits)
//   4+4c+2     channel c output delay, in clocks (DELAY_W bits)
// Reads return data with readdatavalid one clock after the request.
//
// The published P0 design says the high-pass filter and the delay are programmable and
// that the IOC controls and monitors the system over the Avalon bus; the
// register map, reset values and status bits are this design's own.
module ctrl_regs #(
  parameter int unsigned NUM_CH   = p0_pkg::NUM_CH,
  parameter int unsigned HPF_SH_W = p0_pkg::HPF_SH_W,
  parameter int unsigned OUT_SH_W = p0_pkg::OUT_SH_W,
  parameter int unsigned DELAY_W  = p0_pkg::DELAY_W,
  parameter logic [OUT_SH_W-1:0] OUT_SH_RESET = 17,  // coefficients read as Q1.17 fractions
  parameter logic [HPF_SH_W-1:0] HPF_SH_RESET = 8
) (
  input  logic                       clk,
  input  logic                       rst,
  input  p0_pkg::av_req_t            av_req,     // already selected by the interconnect
  output p0_pkg::av_rsp_t            av_rsp,
  // settings
  output logic                       fb_en,
  output logic                       hpf_en,
  output logic [HPF_SH_W-1:0]        hpf_shift [NUM_CH],
  output logic [OUT_SH_W-1:0]        out_shift [NUM_CH],
  output logic [DELAY_W-1:0]         delay     [NUM_CH],
  // status
  input  logic                       running,
  input  logic                       busy,
  input  logic                       resync,
  input  logic [NUM_CH-1:0]          sat,
  input  logic [31:0]                turns
);

  localparam int unsigned DW = p0_pkg::AV_DW;

  logic              resync_seen;
  logic [NUM_CH-1:0] sat_seen;
  logic [3:0]        off;
  logic [DW-1:0]     rdata;

  localparam int unsigned CHW = (NUM_CH > 1) ? $clog2(NUM_CH) : 1;

  logic [CHW-1:0] ch;       // channel addressed by offsets 4 and up
  logic           ch_hit;
  logic [3:0]     ch_off;

  assign off    = av_req.address[3:0];
  assign ch     = CHW'(ch_off);
  assign ch_off = (off - 4'd4) >> 2;
  assign ch_hit = off >= 4'd4 && 32'(ch_off) < NUM_CH;

  always_comb begin
    rdata = '0;
    case (off)
      4'd0: rdata = {30'd0, hpf_en, fb_en};
      4'd1: rdata = DW'({sat_seen, 3'd0, resync_seen, 2'd0, busy, running});
      4'd2: rdata = turns;
      default:
        if (ch_hit) begin
          case (off[1:0])
            2'd0:    rdata = DW'(hpf_shift[ch]);
            2'd1:    rdata = DW'(out_shift[ch]);
            2'd2:    rdata = DW'(delay[ch]);
            default: rdata = '0;
          endcase
        end
    endcase
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      fb_en       <= 1'b0;
      hpf_en      <= 1'b0;
      resync_seen <= 1'b0;
      sat_seen    <= '0;
      av_rsp      <= '0;
      for (int c = 0; c < NUM_CH; c++) begin
        hpf_shift[c] <= HPF_SH_RESET;
        out_shift[c] <= OUT_SH_RESET;
        delay[c]     <= '0;
      end
    end else begin
      // sticky status: set by events, cleared by writing 1
      if (av_req.write && off == 4'd1) begin
        if (av_req.writedata[4]) resync_seen <= 1'b0;
      end
      if (resync) resync_seen <= 1'b1;
      sat_seen <= (av_req.write && off == 4'd1) ? (sat_seen & ~av_req.writedata[8 +: NUM_CH]) | sat
                                                : sat_seen | sat;
      if (av_req.write) begin
        if (off == 4'd0) begin
          fb_en  <= av_req.writedata[0];
          hpf_en <= av_req.writedata[1];
        end
        if (ch_hit) begin
          case (off[1:0])
            2'd0:    hpf_shift[ch] <= av_req.writedata[HPF_SH_W-1:0];
            2'd1:    out_shift[ch] <= av_req.writedata[OUT_SH_W-1:0];
            2'd2:    delay[ch]     <= av_req.writedata[DELAY_W-1:0];
            default: ;
          endcase
        end
      end
      av_rsp.readdatavalid <= av_req.read;
      av_rsp.readdata      <= av_req.read ? rdata : '0;
    end
  end

endmodule
