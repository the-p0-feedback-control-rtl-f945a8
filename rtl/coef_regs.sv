// coef_regs: the FIR coefficient register shared by both feedback channels.
//
// NUM_TAPS signed coefficients, one per 32-bit Avalon word at word offsets
// 0..NUM_TAPS-1 of the slave. A write stores writedata[COEF_W-1:0] and takes
// effect on the filters from the next clock, so the IOC can retune the
// filters while beam data is being processed. A read returns the coefficient
// sign-extended to 32 bits with readdatavalid one clock after the request.
// Reset clears all coefficients (no feedback until the filter is loaded).
//
// The published P0 design gives the shared, on-line writable coefficient register and
// its size; the register layout and reset value are this design's own.
module coef_regs #(
  parameter int unsigned NUM_TAPS = p0_pkg::NUM_TAPS,
  parameter int unsigned COEF_W   = p0_pkg::COEF_W,
  localparam int unsigned IW = $clog2(NUM_TAPS)
) (
  input  logic                                   clk,
  input  logic                                   rst,
  input  p0_pkg::av_req_t                                av_req,   // already selected by the interconnect
  output p0_pkg::av_rsp_t                                av_rsp,
  output logic signed [NUM_TAPS-1:0][COEF_W-1:0] coefs
);

  logic [IW-1:0] idx;
  assign idx = av_req.address[IW-1:0];

  always_ff @(posedge clk) begin
    if (rst) begin
      coefs  <= '0;
      av_rsp <= '0;
    end else begin
      if (av_req.write)
        coefs[idx] <= av_req.writedata[COEF_W-1:0];
      av_rsp.readdatavalid <= av_req.read;
      av_rsp.readdata      <= av_req.read ? p0_pkg::AV_DW'($signed(coefs[idx])) : '0;
    end
  end

endmodule
