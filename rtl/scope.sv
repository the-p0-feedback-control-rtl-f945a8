// scope: four-channel recorder of the A/D inputs for the IOC.
//
// All four converter inputs (the two daughterboard A/Ds feeding the filters
// and the two on-board A/Ds) are recorded together into a FIFO of DEPTH
// entries, one sign-extended SCOPE_W-bit sample per channel per entry, i.e.
// 4k samples per channel. While running, one sample set is taken every
// DECIM+1 clocks. When the FIFO holds at least half its depth the interrupt
// is raised (if enabled); the CPU then reads entries out over the Avalon bus.
// A sample set that finds the FIFO full is dropped and sets the sticky
// overflow flag.
//
// Word map (offsets within the slave):
//   0 CTRL    bit0 run, bit1 interrupt enable, bit2 clear FIFO and overflow
//             (acts once, reads back 0)
//   1 DECIM   decimation: record every DECIM+1 clocks
//   2 STATUS  [12:0] entries held, bit16 half full, bit17 overflow
//   3 DATA01  {ch1, ch0} of the oldest entry
//   4 DATA23  {ch3, ch2} of the oldest entry; this read removes the entry
// Reads return data with readdatavalid one clock after the request.
//
// The published P0 design gives four channels, 4k of memory per channel, the half-full
// interrupt and that the CPU then reads the data. The FIFO organisation,
// decimation, register map and the sample width are this design's own.
module scope #(
  parameter int unsigned DEPTH   = p0_pkg::SCOPE_DEPTH,
  parameter int unsigned SW      = p0_pkg::SCOPE_W,
  parameter int unsigned A_W     = p0_pkg::ADC_W,
  parameter int unsigned B_W     = p0_pkg::AUX_ADC_W,
  localparam int unsigned AW = $clog2(DEPTH)
) (
  input  logic                  clk,
  input  logic                  rst,
  input  p0_pkg::av_req_t       av_req,    // already selected by the interconnect
  output p0_pkg::av_rsp_t       av_rsp,
  input  logic signed [A_W-1:0] adc_a [2], // daughterboard A/Ds (scope channels 0, 1)
  input  logic signed [B_W-1:0] adc_b [2], // on-board A/Ds (scope channels 2, 3)
  output logic                  irq,
  output logic                  overflow
);

  localparam int unsigned DW = p0_pkg::AV_DW;

  logic [4*SW-1:0] mem [DEPTH];
  logic [AW-1:0]   wp, rp;
  logic [AW:0]     count;
  logic            run, irq_en;
  logic [15:0]     decim, dcnt;
  logic [3:0]      off;
  logic            due, push, pop, half;
  logic [4*SW-1:0] entry, head;
  logic [DW-1:0]   status;

  assign off   = av_req.address[3:0];
  assign half  = count >= (AW+1)'(DEPTH / 2);
  assign due   = run && (dcnt == '0);
  assign push  = due && (count != (AW+1)'(DEPTH));
  assign pop   = av_req.read && off == 4'd4 && count != '0;
  assign entry = {SW'(adc_b[1]), SW'(adc_b[0]), SW'(adc_a[1]), SW'(adc_a[0])};
  assign head  = mem[rp];
  assign irq   = irq_en && half;

  always_comb begin
    status       = '0;
    status[AW:0] = count;
    status[16]   = half;
    status[17]   = overflow;
  end

  always_ff @(posedge clk) begin
    if (push) mem[wp] <= entry;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      wp       <= '0;
      rp       <= '0;
      count    <= '0;
      run      <= 1'b0;
      irq_en   <= 1'b0;
      decim    <= '0;
      dcnt     <= '0;
      overflow <= 1'b0;
      av_rsp   <= '0;
    end else begin
      if (run) dcnt <= (dcnt == '0) ? decim : dcnt - 1'b1;
      else     dcnt <= '0;
      if (push) wp <= wp + 1'b1;
      if (pop)  rp <= rp + 1'b1;
      count <= count + (AW+1)'(push) - (AW+1)'(pop);
      if (due && !push) overflow <= 1'b1;

      if (av_req.write) begin
        case (off)
          4'd0: begin
            run    <= av_req.writedata[0];
            irq_en <= av_req.writedata[1];
            if (av_req.writedata[2]) begin
              wp       <= '0;
              rp       <= '0;
              count    <= '0;
              overflow <= 1'b0;
            end
          end
          4'd1: decim <= av_req.writedata[15:0];
          default: ;
        endcase
      end

      av_rsp.readdatavalid <= av_req.read;
      if (av_req.read) begin
        case (off)
          4'd0:    av_rsp.readdata <= {30'd0, irq_en, run};
          4'd1:    av_rsp.readdata <= DW'(decim);
          4'd2:    av_rsp.readdata <= status;
          4'd3:    av_rsp.readdata <= head[2*SW-1:0];
          4'd4:    av_rsp.readdata <= head[4*SW-1:2*SW];
          default: av_rsp.readdata <= '0;
        endcase
      end else begin
        av_rsp.readdata <= '0;
      end
    end
  end

  a_count_range: assert property (@(posedge clk) disable iff (rst) count <= (AW+1)'(DEPTH));

endmodule
