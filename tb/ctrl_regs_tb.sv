// ctrl_regs_tb: self-checking test of the control and status registers.
//
// Checks the reset values, writes every setting and reads it back over the
// Avalon port and on the setting outputs, checks that status inputs show in
// STATUS and TURNS, that the saturation and resync events are held (sticky)
// and that writing 1 clears exactly the chosen sticky bits.
module ctrl_regs_tb;
  localparam int NCH = 2;

  logic clk = 1'b0;
  logic rst;
  p0_pkg::av_req_t av_req;
  p0_pkg::av_rsp_t av_rsp;
  logic fb_en, hpf_en;
  logic [3:0] hpf_shift [NCH];
  logic [5:0] out_shift [NCH];
  logic [9:0] delay [NCH];
  logic running, busy, resync;
  logic [NCH-1:0] sat;
  logic [31:0] turns;

  int checks = 0, failures = 0;

  ctrl_regs dut (.*);

  always #5 clk = ~clk;

  task automatic wr(int a, int d);
    @(negedge clk);
    av_req = '{address: 12'(p0_pkg::CTRL_BASE + a), read: 1'b0, write: 1'b1, writedata: 32'(d)};
    @(negedge clk);
    av_req = '0;
  endtask

  task automatic rd_check(int a, logic [31:0] exp, string what);
    @(negedge clk);
    av_req = '{address: 12'(p0_pkg::CTRL_BASE + a), read: 1'b1, write: 1'b0, writedata: '0};
    @(posedge clk);
    #1;
    av_req = '0;
    checks++;
    if (!av_rsp.readdatavalid || av_rsp.readdata !== exp) begin
      failures++; $display("FAIL %s: %h exp %h", what, av_rsp.readdata, exp);
    end
  endtask

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    rst = 1; av_req = '0; running = 0; busy = 1; resync = 0; sat = '0; turns = 0;
    repeat (3) @(posedge clk);
    rst <= 0;
    @(posedge clk);
    check(!fb_en && !hpf_en && out_shift[0] == 17 && hpf_shift[1] == 8 && delay[0] == 0, "reset values");
    rd_check(1, 32'h2, "status busy");
    wr(0, 3);
    for (int c = 0; c < NCH; c++) begin
      wr(4 + 4*c, 3 + c);
      wr(5 + 4*c, 20 + c);
      wr(6 + 4*c, 700 + 100*c);
    end
    @(posedge clk);
    check(fb_en && hpf_en, "enables");
    for (int c = 0; c < NCH; c++) begin
      check(hpf_shift[c] == 4'(3 + c) && out_shift[c] == 6'(20 + c) && delay[c] == 10'(700 + 100*c), "channel settings");
      rd_check(4 + 4*c, 32'(3 + c), "hpf shift");
      rd_check(5 + 4*c, 32'(20 + c), "out shift");
      rd_check(6 + 4*c, 32'(700 + 100*c), "delay");
    end
    rd_check(0, 32'h3, "control");
    running <= 1; busy <= 0; turns <= 32'd12345;
    @(posedge clk);
    rd_check(2, 32'd12345, "turns");
    rd_check(1, 32'h1, "status running");
    resync <= 1; sat <= 2'b10;
    @(posedge clk);
    resync <= 0; sat <= 2'b00;
    repeat (3) @(posedge clk);
    rd_check(1, 32'h211, "sticky bits");
    wr(1, 32'h200);          // clear channel 1 saturation only
    rd_check(1, 32'h11, "clear sat1");
    wr(1, 32'h10);
    rd_check(1, 32'h1, "clear resync");
    wr(0, 0);
    @(posedge clk);
    check(!fb_en && !hpf_en, "disable");
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
