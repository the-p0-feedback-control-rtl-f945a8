// avalon_interconnect: the Avalon bus fabric between the single bus master
// (the ColdFire bridge) and the slave components.
//
// Each slave owns an aligned window of word addresses given by BASE and SPAN
// (SPAN a power of two). A master request is forwarded to the one slave whose
// window holds the address, with read/write suppressed for all others; the
// address is passed on unchanged and slaves decode its low bits. All slaves
// answer a read after exactly one clock; the fabric remembers which slave was
// read and returns that slave's readdata and readdatavalid. A read of an
// unmapped address still completes, one clock later, with UNMAPPED_DATA, so
// the master can never hang. Writes to unmapped addresses are dropped.
//
// The published P0 design says the address decoding is done by the Avalon bus (built
// with Altera's system builder) so the slaves need only simple select logic;
// this fixed-latency fabric is this design's own simplest form of it.
module avalon_interconnect #(
  parameter int unsigned NS = 4,
  parameter logic [p0_pkg::AV_AW-1:0] BASE [NS] = '{p0_pkg::COEF_BASE, p0_pkg::CTRL_BASE,
                                                    p0_pkg::SCOPE_BASE, p0_pkg::EVR_BASE},
  parameter int unsigned SPAN [NS] = '{32, 16, 8, 1024},
  parameter logic [p0_pkg::AV_DW-1:0] UNMAPPED_DATA = 32'hDEAD_BEEF
) (
  input  logic            clk,
  input  logic            rst,
  input  p0_pkg::av_req_t m_req,
  output p0_pkg::av_rsp_t m_rsp,
  output p0_pkg::av_req_t s_req [NS],
  input  p0_pkg::av_rsp_t s_rsp [NS]
);

  localparam int unsigned SELW = (NS > 1) ? $clog2(NS) : 1;

  logic [NS-1:0]   hit;
  logic [SELW-1:0] sel, sel_q;
  logic            mapped_q, unmapped_rd_q;

  always_comb begin
    sel = '0;
    for (int i = 0; i < NS; i++) begin
      hit[i] = (m_req.address & ~(p0_pkg::AV_AW'(SPAN[i] - 1))) == BASE[i];
      if (hit[i]) sel = SELW'(i);
    end
  end

  always_comb begin
    for (int i = 0; i < NS; i++) begin
      s_req[i]       = m_req;
      s_req[i].read  = m_req.read  && hit[i];
      s_req[i].write = m_req.write && hit[i];
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      sel_q         <= '0;
      mapped_q      <= 1'b0;
      unmapped_rd_q <= 1'b0;
    end else begin
      if (m_req.read) begin
        sel_q    <= sel;
        mapped_q <= |hit;
      end
      unmapped_rd_q <= m_req.read && !(|hit);
    end
  end

  always_comb begin
    if (unmapped_rd_q) begin
      m_rsp.readdatavalid = 1'b1;
      m_rsp.readdata      = UNMAPPED_DATA;
    end else if (mapped_q) begin
      m_rsp = s_rsp[sel_q];
    end else begin
      m_rsp = '0;
    end
  end

  // address windows must not overlap
  a_one_slave: assert property (@(posedge clk) disable iff (rst)
                                (m_req.read || m_req.write) |-> (hit & (hit - 1'b1)) == '0)
    else $error("address %h hits more than one slave", m_req.address);

endmodule
