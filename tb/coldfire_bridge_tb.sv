// coldfire_bridge_tb: self-checking test of the ColdFire-to-Avalon bridge.
//
// The CPU side runs on a 15 ns clock and the Avalon side on an 11 ns clock,
// so the two drift against each other. A bus-functional CPU issues random
// writes and reads (chip select low until transfer acknowledge); a
// behavioural Avalon slave with one-clock read latency holds a small memory
// and counts transfers. Checked: every CPU write lands exactly once with the
// right address and data, every read returns the memory word, each CPU cycle
// makes exactly one Avalon transfer, and no cycle takes longer than the
// handshake bound (12 CPU clocks). Each interrupt request must reach the CPU
// side, inverted, within 4 CPU clocks and leave it again when released.
module coldfire_bridge_tb;
  logic cf_clk = 1'b0, clk = 1'b0;
  logic cf_rst, rst;
  logic cf_cs_n, cf_rw;
  logic [11:0] cf_addr;
  logic [31:0] cf_wdata, cf_rdata;
  logic cf_ta_n;
  p0_pkg::av_req_t av_req;
  p0_pkg::av_rsp_t av_rsp;
  logic [1:0] av_irq, cf_irq_n;

  int checks = 0, failures = 0;
  int av_writes = 0, av_reads = 0, max_cycles = 0;
  logic [31:0] mem [4096];
  logic [31:0] model [4096];

  coldfire_bridge dut (.*);

  always #7.5 cf_clk = ~cf_clk;
  always #5.5 clk = ~clk;

  // Avalon slave model
  always @(posedge clk) begin
    av_rsp.readdatavalid <= av_req.read;
    av_rsp.readdata      <= av_req.read ? mem[av_req.address] : 32'h0;
    if (av_req.write) begin
      mem[av_req.address] <= av_req.writedata;
      av_writes++;
    end
    if (av_req.read) av_reads++;
    if (av_req.read && av_req.write) begin failures++; $display("FAIL read and write together"); end
  end

  task automatic cpu_cycle(bit is_rd, logic [11:0] a, logic [31:0] d, output logic [31:0] q);
    int n = 0;
    @(negedge cf_clk);
    cf_cs_n = 1'b0; cf_rw = is_rd; cf_addr = a; cf_wdata = d;
    do begin
      @(posedge cf_clk);
      n++;
      #1;
    end while (cf_ta_n && n < 100);
    q = cf_rdata;
    @(negedge cf_clk);
    cf_cs_n = 1'b1;
    if (n > max_cycles) max_cycles = n;
    checks++;
    if (n > 12) begin failures++; $display("FAIL cycle took %0d CPU clocks", n); end
  endtask

  initial begin
    logic [31:0] q;
    int w0, r0;
    for (int i = 0; i < 4096; i++) begin mem[i] = 32'(i * 7); model[i] = 32'(i * 7); end
    cf_rst = 1; rst = 1; cf_cs_n = 1; cf_rw = 1; cf_addr = '0; cf_wdata = '0;
    av_rsp = '0; av_irq = '0;
    #100;
    @(negedge clk); rst = 0;
    @(negedge cf_clk); cf_rst = 0;
    for (int n = 0; n < 300; n++) begin
      logic [11:0] a;
      logic [31:0] d;
      bit is_rd;
      a = 12'($urandom_range(63, 0));
      d = $urandom;
      is_rd = $urandom_range(1, 0);
      w0 = av_writes; r0 = av_reads;
      cpu_cycle(is_rd, a, d, q);
      #30;
      checks++;
      if (is_rd) begin
        if (q != model[a] || av_reads - r0 != 1 || av_writes != w0) begin
          failures++; $display("FAIL read %h got %h exp %h (%0d reads)", a, q, model[a], av_reads - r0);
        end
      end else begin
        model[a] = d;
        if (mem[a] != d || av_writes - w0 != 1 || av_reads != r0) begin
          failures++; $display("FAIL write %h = %h, memory %h (%0d writes)", a, d, mem[a], av_writes - w0);
        end
      end
    end
    for (int i = 0; i < 2; i++) begin
      @(negedge clk); av_irq[i] = 1'b1;
      repeat (4) @(posedge cf_clk);
      #1;
      checks++;
      if (cf_irq_n != ~(2'b01 << i)) begin failures++; $display("FAIL irq %0d not passed: %b", i, cf_irq_n); end
      @(negedge clk); av_irq[i] = 1'b0;
      repeat (4) @(posedge cf_clk);
      #1;
      checks++;
      if (cf_irq_n != 2'b11) begin failures++; $display("FAIL irq %0d not released", i); end
    end
    $display("longest cycle %0d CPU clocks", max_cycles);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #200000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
