// scope_tb: self-checking test of the four-channel scope.
//
// Each A/D input carries a different function of a free-running clock count,
// so every entry read back tells when it was recorded and whether its four
// channels belong together. The test runs the scope with decimation, waits
// for the half-full interrupt, lets the FIFO fill and overflow, stops it and
// reads every entry: the four channels must match, consecutive entries must
// be DECIM+1 clocks apart, the interrupt must drop once less than half is
// left, and reading an empty FIFO must not move it. Clearing resets the
// count and the overflow flag.
module scope_tb;
  localparam int DEPTH = 16;
  localparam int DECIM = 2;

  logic clk = 1'b0;
  logic rst;
  p0_pkg::av_req_t av_req;
  p0_pkg::av_rsp_t av_rsp;
  logic signed [13:0] adc_a [2];
  logic signed [11:0] adc_b [2];
  logic irq, overflow;

  int checks = 0, failures = 0;
  int cyc = 0;
  int irq_cycles = 0;

  scope #(.DEPTH(DEPTH)) dut (.*);

  always #5 clk = ~clk;

  always @(posedge clk) begin
    cyc <= cyc + 1;
    adc_a[0] <= 14'(cyc + 1);
    adc_a[1] <= ~14'(cyc + 1);
    adc_b[0] <= 12'(cyc + 1) ^ 12'h5A5;
    adc_b[1] <= 12'(cyc + 1 + 7);
    if (irq) irq_cycles++;
  end

  task automatic wr(int a, int d);
    @(negedge clk);
    av_req = '{address: 12'(p0_pkg::SCOPE_BASE + a), read: 1'b0, write: 1'b1, writedata: 32'(d)};
    @(negedge clk);
    av_req = '0;
  endtask

  task automatic rd(int a, output logic [31:0] d);
    @(negedge clk);
    av_req = '{address: 12'(p0_pkg::SCOPE_BASE + a), read: 1'b1, write: 1'b0, writedata: '0};
    @(posedge clk);
    #1;
    av_req = '0;
    checks++;
    if (!av_rsp.readdatavalid) begin failures++; $display("FAIL no readdatavalid"); end
    d = av_rsp.readdata;
  endtask

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  function automatic logic [15:0] sx14(logic [13:0] v); return {{2{v[13]}}, v}; endfunction
  function automatic logic [15:0] sx12(logic [11:0] v); return {{4{v[11]}}, v}; endfunction

  initial begin
    logic [31:0] d01, d23, st;
    int prev, stamp;
    rst = 1; av_req = '0;
    repeat (3) @(posedge clk);
    rst <= 0;
    wr(p0_pkg::SCOPE_DECIM, DECIM);
    wr(p0_pkg::SCOPE_CTRL, 3);              // run, interrupt enable
    while (!irq) @(posedge clk);
    rd(p0_pkg::SCOPE_STATUS, st);
    check(st[16] && st[12:0] >= DEPTH/2 && st[12:0] <= DEPTH/2 + 1, "half full at interrupt");
    repeat (4 * DEPTH * (DECIM + 1)) @(posedge clk);
    rd(p0_pkg::SCOPE_STATUS, st);
    check(st[12:0] == DEPTH && st[17] && overflow, "full and overflow");
    wr(p0_pkg::SCOPE_CTRL, 2);              // stop, keep interrupt enabled
    prev = -1;
    for (int i = 0; i < DEPTH; i++) begin
      rd(p0_pkg::SCOPE_DATA01, d01);
      rd(p0_pkg::SCOPE_DATA23, d23);
      stamp = int'(d01[13:0]);
      check(d01[15:0]  == sx14(14'(stamp)) &&
            d01[31:16] == sx14(~14'(stamp)) &&
            d23[15:0]  == sx12(12'(stamp) ^ 12'h5A5) &&
            d23[31:16] == sx12(12'(stamp + 7)), "channels of one entry belong together");
      if (prev >= 0) check(stamp - prev == DECIM + 1, "decimation spacing");
      prev = stamp;
      @(posedge clk); #1;
      if (i == DEPTH/2 - 1) check(irq, "interrupt held while half full");
      if (i == DEPTH/2) check(!irq, "interrupt released below half");
    end
    rd(p0_pkg::SCOPE_STATUS, st);
    check(st[12:0] == 0, "empty after reading all");
    rd(p0_pkg::SCOPE_DATA23, d23);
    rd(p0_pkg::SCOPE_STATUS, st);
    check(st[12:0] == 0, "reading empty FIFO does not pop");
    wr(p0_pkg::SCOPE_CTRL, 4);              // clear
    rd(p0_pkg::SCOPE_STATUS, st);
    check(st[17] == 0 && !overflow, "clear removes overflow");
    check(irq_cycles > 0, "interrupt seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
