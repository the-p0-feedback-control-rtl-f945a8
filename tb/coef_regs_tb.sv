// coef_regs_tb: self-checking test of the shared coefficient register.
//
// Writes random 18-bit coefficients to all taps over the Avalon port in a
// random order, then reads each one back (sign-extended, one clock read
// latency) and checks the coefficient outputs seen by the filters; a
// rewrite of single taps must change only those taps.
module coef_regs_tb;
  localparam int T = 32;
  localparam int CW = 18;

  logic clk = 1'b0;
  logic rst;
  p0_pkg::av_req_t av_req;
  p0_pkg::av_rsp_t av_rsp;
  logic signed [T-1:0][CW-1:0] coefs;

  int checks = 0, failures = 0;
  int model [T];

  coef_regs dut (.*);

  always #5 clk = ~clk;

  task automatic wr(int a, int d);
    @(negedge clk);
    av_req = '{address: 12'(a), read: 1'b0, write: 1'b1, writedata: 32'(d)};
    @(negedge clk);
    av_req = '0;
  endtask

  task automatic rd_check(int a, int exp);
    @(negedge clk);
    av_req = '{address: 12'(a), read: 1'b1, write: 1'b0, writedata: '0};
    @(posedge clk);
    #1;
    av_req = '0;
    checks++;
    if (!av_rsp.readdatavalid || av_rsp.readdata != 32'(exp)) begin
      failures++; $display("FAIL read %0d: %0b %h exp %h", a, av_rsp.readdatavalid, av_rsp.readdata, 32'(exp));
    end
  endtask

  task automatic check_outputs();
    for (int k = 0; k < T; k++) begin
      checks++;
      if (int'($signed(coefs[k])) != model[k]) begin
        failures++; $display("FAIL coef %0d = %0d exp %0d", k, $signed(coefs[k]), model[k]);
      end
    end
  endtask

  initial begin
    rst = 1; av_req = '0;
    for (int k = 0; k < T; k++) model[k] = 0;
    repeat (3) @(posedge clk);
    rst <= 0;
    @(posedge clk);
    check_outputs();
    for (int i = 0; i < 3 * T; i++) begin
      int k, v;
      k = (i < T) ? T - 1 - i : int'($urandom_range(T - 1, 0));
      v = int'($urandom_range(262143, 0)) - 131072;
      wr(k, v);
      model[k] = v;
    end
    @(posedge clk);
    check_outputs();
    for (int k = 0; k < T; k++) rd_check(k, model[k]);
    wr(5, 32'h0FFE_0001);   // upper bits are ignored: -131071
    model[5] = -131071;
    wr(31, 7);
    model[31] = 7;
    @(posedge clk);
    check_outputs();
    rd_check(5, -131071);
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
