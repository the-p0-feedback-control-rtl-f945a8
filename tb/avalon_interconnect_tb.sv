// avalon_interconnect_tb: self-checking test of the Avalon fabric.
//
// Four behavioural slaves answer a read one clock later with their own
// number and the address they saw, and log every write. Random reads and
// writes across the whole address space are issued. For each request the
// testbench works out from the address map which slave (if any) owns it and
// checks that only that slave saw it, that the read data came from it, and
// that unmapped reads still complete with the filler word.
module avalon_interconnect_tb;
  localparam int NS = 4;
  localparam logic [11:0] BASE [NS] = '{12'h000, 12'h040, 12'h080, 12'h400};
  localparam int SPAN [NS] = '{32, 16, 8, 1024};

  logic clk = 1'b0;
  logic rst;
  p0_pkg::av_req_t m_req;
  p0_pkg::av_rsp_t m_rsp;
  p0_pkg::av_req_t s_req [NS];
  p0_pkg::av_rsp_t s_rsp [NS];

  int checks = 0, failures = 0;
  int wr_seen [NS];
  int rd_seen [NS];
  int unmapped = 0;

  avalon_interconnect dut (.*);

  always #5 clk = ~clk;

  for (genvar i = 0; i < NS; i++) begin : g_slave
    always @(posedge clk) begin
      s_rsp[i].readdatavalid <= s_req[i].read;
      s_rsp[i].readdata      <= s_req[i].read ? {8'(i), 12'h0, s_req[i].address} : 32'h0;
      if (s_req[i].write) wr_seen[i]++;
      if (s_req[i].read)  rd_seen[i]++;
    end
  end

  function automatic int owner(logic [11:0] a);
    for (int i = 0; i < NS; i++)
      if (a >= BASE[i] && a < BASE[i] + 12'(SPAN[i])) return i;
    return -1;
  endfunction

  initial begin
    int w0 [NS], r0 [NS];
    rst = 1; m_req = '0;
    for (int i = 0; i < NS; i++) begin wr_seen[i] = 0; rd_seen[i] = 0; end
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst = 0;
    for (int n = 0; n < 400; n++) begin
      logic [11:0] a;
      int o;
      bit is_rd;
      a = 12'($urandom);
      if (n % 4 == 0) a = BASE[n / 4 % NS] + 12'($urandom_range(SPAN[n / 4 % NS] - 1, 0));
      o = owner(a);
      is_rd = $urandom_range(1, 0);
      for (int i = 0; i < NS; i++) begin w0[i] = wr_seen[i]; r0[i] = rd_seen[i]; end
      @(negedge clk);
      m_req = '{address: a, read: is_rd, write: !is_rd, writedata: $urandom};
      @(posedge clk);
      #1;
      m_req = '0;
      if (is_rd) begin
        checks++;
        if (!m_rsp.readdatavalid ||
            m_rsp.readdata != (o < 0 ? 32'hDEAD_BEEF : {8'(o), 12'h0, a})) begin
          failures++; $display("FAIL read %h owner %0d got %h", a, o, m_rsp.readdata);
        end
        if (o < 0) unmapped++;
      end
      for (int i = 0; i < NS; i++) begin
        checks++;
        if (wr_seen[i] - w0[i] != ((i == o && !is_rd) ? 1 : 0) ||
            rd_seen[i] - r0[i] != ((i == o &&  is_rd) ? 1 : 0)) begin
          failures++; $display("FAIL slave %0d saw the wrong requests for %h", i, a);
        end
      end
      @(posedge clk);
      #1;
      checks++;
      if (m_rsp.readdatavalid) begin failures++; $display("FAIL readdatavalid held"); end
    end
    checks++;
    if (unmapped == 0) begin failures++; $display("FAIL no unmapped read"); end
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
