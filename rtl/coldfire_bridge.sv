// coldfire_bridge: Avalon bus master driven by the ColdFire CPU's external bus.
//
// The CPU module runs on its own bus clock (cf_clk); the Avalon bus and the
// feedback logic run on the 88 MHz sample clock (clk). A CPU cycle starts
// when cf_cs_n goes low. The bridge latches address, write data and
// direction in the CPU domain, then passes the request across with a toggle
// handshake: req_tgl flips in the CPU domain, is synchronised by two flops in
// the Avalon domain, and there starts one Avalon read or write. A write is
// done at once; a read is done when readdatavalid returns, and its data is
// held in a register. The Avalon side then flips ack_tgl, which comes back
// through two flops and ends the CPU cycle by pulling cf_ta_n (transfer
// acknowledge) low for one cf_clk clock, with the read data on cf_rdata. The
// CPU must then release cf_cs_n before the next cycle. The latched request
// and the read-data register stay unchanged while the other domain samples
// them, so only the toggles need synchronisers.
//
// Timing: about 3 clk plus 3 cf_clk periods per write, one clk more per read.
//
// Interrupts: the level interrupt requests of the Avalon slaves (av_irq) are
// passed to the CPU as active-low lines (cf_irq_n), each through two cf_clk
// flops; a request is seen by the CPU two to three cf_clk clocks after it
// rises and drops as soon after the slave releases it.
//
// The published P0 design says the bridge translates the ColdFire bus into Avalon
// master transfers and resolves the two clock domains. The signal set of the
// CPU side (chip select, read/write, word address, transfer acknowledge) and
// the toggle handshake are this design's own choices, as is carrying the
// components' interrupts (the published design says each Avalon component is given an
// IRQ) to the CPU through the bridge.
module coldfire_bridge #(
  parameter int unsigned NIRQ = 2,
  localparam int unsigned AW = p0_pkg::AV_AW,
  localparam int unsigned DW = p0_pkg::AV_DW
) (
  // ColdFire side
  input  logic            cf_clk,
  input  logic            cf_rst,
  input  logic            cf_cs_n,
  input  logic            cf_rw,      // 1 = read, 0 = write
  input  logic [AW-1:0]   cf_addr,    // word address
  input  logic [DW-1:0]   cf_wdata,
  output logic [DW-1:0]   cf_rdata,
  output logic            cf_ta_n,
  output logic [NIRQ-1:0] cf_irq_n,   // interrupt requests to the CPU, active low
  // Avalon side
  input  logic            clk,
  input  logic            rst,
  output p0_pkg::av_req_t av_req,
  input  p0_pkg::av_rsp_t av_rsp,
  input  logic [NIRQ-1:0] av_irq      // level interrupt requests of the slaves
);

  typedef enum logic [1:0] {CF_IDLE, CF_WAIT, CF_DONE} cf_state_t;
  typedef enum logic [1:0] {AV_IDLE, AV_ISSUE, AV_WAIT_RD} av_state_t;

  // CPU domain
  cf_state_t       cf_state;
  logic            req_tgl;
  logic [AW-1:0]   h_addr;
  logic [DW-1:0]   h_wdata;
  logic            h_rd;
  logic            ack_s1, ack_s2;
  logic [NIRQ-1:0] irq_s1;

  // Avalon domain
  av_state_t       av_state;
  logic            ack_tgl;
  logic            req_s1, req_s2;
  logic [DW-1:0]   rdata_hold;

  always_ff @(posedge cf_clk) begin
    if (cf_rst) begin
      cf_state <= CF_IDLE;
      req_tgl  <= 1'b0;
      h_addr   <= '0;
      h_wdata  <= '0;
      h_rd     <= 1'b0;
      ack_s1   <= 1'b0;
      ack_s2   <= 1'b0;
      cf_rdata <= '0;
      cf_ta_n  <= 1'b1;
      irq_s1   <= '0;
      cf_irq_n <= '1;
    end else begin
      irq_s1   <= av_irq;
      cf_irq_n <= ~irq_s1;
      ack_s1 <= ack_tgl;
      ack_s2 <= ack_s1;
      cf_ta_n <= 1'b1;
      case (cf_state)
        CF_IDLE:
          if (!cf_cs_n) begin
            h_addr   <= cf_addr;
            h_wdata  <= cf_wdata;
            h_rd     <= cf_rw;
            req_tgl  <= ~req_tgl;
            cf_state <= CF_WAIT;
          end
        CF_WAIT:
          if (ack_s2 == req_tgl) begin
            cf_rdata <= rdata_hold;
            cf_ta_n  <= 1'b0;
            cf_state <= CF_DONE;
          end
        CF_DONE:
          if (cf_cs_n) cf_state <= CF_IDLE;
        default: cf_state <= CF_IDLE;
      endcase
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      av_state   <= AV_IDLE;
      ack_tgl    <= 1'b0;
      req_s1     <= 1'b0;
      req_s2     <= 1'b0;
      rdata_hold <= '0;
    end else begin
      req_s1 <= req_tgl;
      req_s2 <= req_s1;
      case (av_state)
        AV_IDLE:
          if (req_s2 != ack_tgl) av_state <= AV_ISSUE;
        AV_ISSUE:
          if (h_rd) av_state <= AV_WAIT_RD;
          else begin
            ack_tgl  <= ~ack_tgl;
            av_state <= AV_IDLE;
          end
        AV_WAIT_RD:
          if (av_rsp.readdatavalid) begin
            rdata_hold <= av_rsp.readdata;
            ack_tgl    <= ~ack_tgl;
            av_state   <= AV_IDLE;
          end
        default: av_state <= AV_IDLE;
      endcase
    end
  end

  // the bridge issues one transfer at a time, never a read and a write together
  a_one_transfer: assert property (@(posedge clk) disable iff (rst) !(av_req.read && av_req.write));
  a_cs_held: assert property (@(posedge cf_clk) disable iff (cf_rst)
                              cf_state == CF_WAIT |-> !cf_cs_n)
    else $error("chip select released before transfer acknowledge");

  // one-clock Avalon transfer in AV_ISSUE
  always_comb begin
    av_req           = '0;
    av_req.address   = h_addr;
    av_req.writedata = h_wdata;
    av_req.read      = (av_state == AV_ISSUE) &&  h_rd;
    av_req.write     = (av_state == AV_ISSUE) && !h_rd;
  end

endmodule
