// prog_delay: programmable delay between a feedback channel's FIR output and
// its D/A converter.
//
// The delay sets when, relative to the beam, the correction leaves the
// FPGA, so that the kick reaches the bunch it was computed for. It is a
// circular buffer of DEPTH words written every clock; the output is read
// 'delay' entries behind the write pointer. A sample (with its valid flag)
// taken at clock edge t appears on out_* after edge t+delay; delay = 0 leaves
// only the output register. delay may be changed at any time; the output
// then jumps to the new position in the buffer. Until 'delay' samples have
// been written since reset the output is held invalid and zero, so stale
// memory contents never reach the converter.
//
// The published P0 design names a programmable delay before the D/A converter; its
// depth, unit (clocks) and implementation are this design's own choices.
module prog_delay #(
  parameter int unsigned W       = p0_pkg::DAC_W,
  parameter int unsigned DEPTH   = 1024,
  parameter int unsigned DELAY_W = p0_pkg::DELAY_W,
  localparam int unsigned AW = $clog2(DEPTH)
) (
  input  logic                clk,
  input  logic                rst,
  input  logic [DELAY_W-1:0]  delay,
  input  logic                in_valid,
  input  logic signed [W-1:0] in_data,
  output logic                out_valid,
  output logic signed [W-1:0] out_data
);

  logic [W:0]    mem [DEPTH];
  logic [AW-1:0] wp;
  logic [AW:0]   filled;    // samples written since reset, saturating at DEPTH
  logic [W:0]    rd;

  assign rd = mem[wp - AW'(delay)];

  always_ff @(posedge clk) begin
    mem[wp] <= {in_valid, in_data};
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      wp        <= '0;
      filled    <= '0;
      out_valid <= 1'b0;
      out_data  <= '0;
    end else begin
      wp <= wp + 1'b1;
      if (filled != (AW+1)'(DEPTH)) filled <= filled + 1'b1;
      if (delay == '0) begin
        out_valid <= in_valid;
        out_data  <= in_valid ? in_data : '0;
      end else if (filled >= (AW+1)'(delay) && rd[W]) begin
        out_valid <= 1'b1;
        out_data  <= rd[W-1:0];
      end else begin
        out_valid <= 1'b0;
        out_data  <= '0;
      end
    end
  end

endmodule
