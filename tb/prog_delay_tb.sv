// prog_delay_tb: self-checking test of the programmable output delay.
//
// Random samples with random valid flags are written every clock. The
// testbench keeps its own record of every input and, for each clock, works
// out what the output must be for the delay in force: the input 'delay'
// clocks back, invalid and zero until that many samples exist. The delay is
// swept over 0, 1, several middle values and the maximum, and changed while
// data flows.
module prog_delay_tb;
  localparam int W = 14;
  localparam int DEPTH = 16;
  localparam int DW = 4;

  logic clk = 1'b0;
  logic rst;
  logic [DW-1:0] delay;
  logic in_valid;
  logic signed [W-1:0] in_data;
  logic out_valid;
  logic signed [W-1:0] out_data;

  int checks = 0, failures = 0, n = 0, nvalid = 0;
  bit   hv [int];
  int   hd [int];
  bit   e_valid = 0; int e_data = 0; bit have_exp = 0;

  prog_delay #(.W(W), .DEPTH(DEPTH), .DELAY_W(DW)) dut (.*);

  always #5 clk = ~clk;

  always @(posedge clk) begin
    if (rst) begin
      n = 0; have_exp = 0;
    end else begin
      if (have_exp) begin
        checks++;
        if (out_valid != e_valid || (e_valid && out_data != W'(e_data)) || (!e_valid && out_data != 0)) begin
          failures++;
          $display("FAIL n %0d delay %0d out %0b/%0d exp %0b/%0d", n, delay, out_valid, out_data, e_valid, e_data);
        end
        if (out_valid) nvalid++;
      end
      hv[n] = in_valid; hd[n] = int'(in_data);
      if (n - int'(delay) >= 0 && hv[n - int'(delay)]) begin
        e_valid = 1; e_data = hd[n - int'(delay)];
      end else begin
        e_valid = 0; e_data = 0;
      end
      have_exp = 1;
      n++;
    end
  end

  initial begin
    rst = 1; delay = 4'd5; in_valid = 0; in_data = '0;
    repeat (3) @(posedge clk);
    rst <= 0;
    for (int i = 0; i < 600; i++) begin
      in_valid <= ($urandom_range(4, 0) != 0);
      in_data  <= W'($urandom);
      if (i % 50 == 49) delay <= DW'(i / 50 == 3 ? 0 : i / 50 == 4 ? 15 : i / 50 == 5 ? 1 : $urandom);
      @(posedge clk);
    end
    repeat (3) @(posedge clk);
    checks++;
    if (nvalid < 300) begin failures++; $display("FAIL only %0d valid outputs", nvalid); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
