// p0_feedback_top_tb: end-to-end test of the P0 feedback FPGA at its full
// size (324 bunches, 32 taps, 4k-sample scope, 1024-entry delay).
//
// Everything is driven from outside as in the real system: a bus-functional
// ColdFire CPU (15 ns clock) programs the filters through the bridge, a model
// of the event receiver answers its Avalon window and sends the P0 trigger
// once per turn, and the A/D inputs carry a per-bunch offset plus noise.
// A reference model follows both channels through high-pass filter, FIR
// filter, scaling and delay with 64-bit arithmetic and checks every D/A
// value on every clock. It takes the run-time settings (enables, shifts,
// delays, coefficients) from the register outputs at the clock where each
// pipeline stage uses them, so settings may change while beam is processed.
//
// Mechanisms exercised and counted (each must happen): start on the P0
// trigger, re-synchronisation on an out-of-phase trigger, high-pass filter
// switched on, coefficient change while running, delay change while running,
// output saturation, scope half-full interrupt, scope overflow, event
// receiver access and interrupt through the bridge, unmapped bus read.
module p0_feedback_top_tb;
  localparam int NB   = p0_pkg::NUM_BUNCHES;
  localparam int T    = p0_pkg::NUM_TAPS;
  localparam int NCH  = p0_pkg::NUM_CH;
  localparam int RB   = 4096;               // reference history, clocks
  localparam int FRAC = 16;

  logic clk = 1'b0, cf_clk = 1'b0;
  logic rst, cf_rst;
  logic signed [13:0] adc_a [NCH];
  logic signed [11:0] adc_b [2];
  logic signed [13:0] dac [NCH];
  logic [NCH-1:0] dac_valid;
  logic p0_trig;
  p0_pkg::av_req_t evr_req;
  p0_pkg::av_rsp_t evr_rsp;
  logic cf_cs_n, cf_rw;
  logic [11:0] cf_addr;
  logic [31:0] cf_wdata, cf_rdata;
  logic cf_ta_n, scope_overflow, evr_irq;
  logic [1:0] cf_irq_n;

  p0_feedback_top dut (.*);

  always #5.682 clk = ~clk;      // 88 MHz
  always #7.5 cf_clk = ~cf_clk;  // CPU bus clock

  int checks = 0, failures = 0;
  int n_start = 0, n_resync = 0, n_hpf_on = 0, n_coef_live = 0, n_delay_live = 0;
  int n_evr_irq = 0;
  int n_sat = 0, n_irq = 0, n_ovf = 0, n_evr = 0, n_unmapped = 0, n_dac_checked = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  // ---------------- event receiver model ----------------
  logic [31:0] evr_regs [16];
  int evr_reads = 0, evr_writes = 0;
  always @(posedge clk) begin
    evr_rsp.readdatavalid <= evr_req.read;
    evr_rsp.readdata      <= evr_req.read ? evr_regs[evr_req.address[3:0]] : 32'h0;
    if (evr_req.write) begin evr_regs[evr_req.address[3:0]] <= evr_req.writedata; evr_writes++; end
    if (evr_req.read) evr_reads++;
  end

  // ---------------- beam: A/D samples and P0 trigger ----------------
  int ecount = 0;            // clock edges since reset release
  int trig_phase = 0;        // trigger when (ecount - trig_phase) % NB == 0
  int amp = 200;
  always @(posedge clk) begin
    int b;
    ecount <= ecount + 1;
    b = (ecount + 1) % NB;
    for (int c = 0; c < NCH; c++)
      adc_a[c] <= 14'(100 * (b % 17) - 800 + 300 * c + int'($urandom_range(2 * amp, 0)) - amp);
    adc_b[0] <= 12'(ecount + 1) ^ 12'hA5A;
    adc_b[1] <= 12'(ecount + 1);
    p0_trig  <= ((ecount + 1 - trig_phase) % NB == 0);
  end

  // ---------------- reference model ----------------
  bit          r_v   [RB];            // sequencer valid at edge
  int          r_b   [RB];
  longint      r_x   [NCH][RB];
  longint      r_acc [NCH][RB];
  bit          f_v   [NCH][RB];       // FIR output seen at edge
  longint      f_y   [NCH][RB];
  int          r_d   [NCH][RB];       // delay setting at edge
  longint      hp_m  [NCH][NB];
  longint      hist  [NCH][NB][T];
  int          E = 0;
  bit          ref_on = 0;
  int          e0 = 0;

  function automatic int ix(int e); return ((e % RB) + RB) % RB; endfunction

  function automatic longint sat14(longint v, output bit clip);
    clip = 1'b0;
    if (v > 8191)  begin clip = 1'b1; return 8191; end
    if (v < -8192) begin clip = 1'b1; return -8192; end
    return v;
  endfunction

  always @(posedge clk) begin
    if (rst) begin
      E = 0;
      ref_on = 0;
    end else begin
      if (!ref_on) begin
        ref_on = 1; e0 = E;
        for (int c = 0; c < NCH; c++) begin
          for (int b = 0; b < NB; b++) begin
            hp_m[c][b] = 0;
            for (int k = 0; k < T; k++) hist[c][b][k] = 0;
          end
          for (int i = 0; i < RB; i++) begin f_v[c][i] = 0; f_y[c][i] = 0; r_d[c][i] = 0; r_v[i] = 0; end
        end
      end
      r_v[ix(E)] = dut.u_seq.valid;
      r_b[ix(E)] = int'(dut.u_seq.bunch);
      for (int c = 0; c < NCH; c++) begin
        bit clip;
        r_x[c][ix(E)] = longint'(adc_a[c]);
        r_d[c][ix(E)] = int'(dut.delay[c]);
        f_v[c][ix(E + 1)] = 0; f_y[c][ix(E + 1)] = 0;
        // high-pass stage uses its settings one clock after the sample
        if (r_v[ix(E - 1)]) begin
          int b;
          longint yf, y;
          b = r_b[ix(E - 1)];
          yf = (r_x[c][ix(E - 1)] <<< FRAC) - hp_m[c][b];
          hp_m[c][b] += yf >>> dut.hpf_shift[c];
          y = dut.hpf_en ? (yf >>> FRAC) : r_x[c][ix(E - 1)];
          for (int k = T - 1; k > 0; k--) hist[c][b][k] = hist[c][b][k - 1];
          hist[c][b][0] = y;
        end
        // multipliers use the coefficients three clocks after the sample
        if (r_v[ix(E - 3)]) begin
          int b;
          longint acc;
          b = r_b[ix(E - 3)];
          acc = 0;
          for (int k = 0; k < T; k++) acc += longint'($signed(dut.coefs[k])) * hist[c][b][k];
          r_acc[c][ix(E - 3)] = acc;
        end
        // output scaling five clocks after the sample
        if (r_v[ix(E - 5)]) begin
          f_v[c][ix(E + 1)] = 1;
          f_y[c][ix(E + 1)] = sat14(r_acc[c][ix(E - 5)] >>> dut.out_shift[c], clip);
          if (clip) n_sat++;
        end
        // D/A value registered at the previous edge
        if (E - e0 > 8) begin
          int d, src;
          bit ev; longint ey;
          d = r_d[c][ix(E - 1)];
          src = E - 1 - d;
          ev = (E - 1 - e0 >= d) && f_v[c][ix(src)];
          ey = ev ? f_y[c][ix(src)] : 0;
          checks++;
          if (dac_valid[c] != ev || longint'(dac[c]) != ey) begin
            failures++;
            if (failures < 20)
              $display("FAIL ch%0d edge %0d dac %0b/%0d exp %0b/%0d", c, E, dac_valid[c], dac[c], ev, ey);
          end
          if (ev) n_dac_checked++;
        end
      end
      E++;
    end
  end

  // ---------------- CPU bus model ----------------
  task automatic cpu(bit is_rd, int a, logic [31:0] d, output logic [31:0] q);
    int n = 0;
    @(negedge cf_clk);
    cf_cs_n = 1'b0; cf_rw = is_rd; cf_addr = 12'(a); cf_wdata = d;
    do begin @(posedge cf_clk); n++; #1; end while (cf_ta_n && n < 100);
    q = cf_rdata;
    @(negedge cf_clk);
    cf_cs_n = 1'b1;
    if (n >= 100) begin failures++; $display("FAIL bus cycle hung at %h", a); end
  endtask

  task automatic wr(int a, logic [31:0] d);
    logic [31:0] q;
    cpu(1'b0, a, d, q);
  endtask

  task automatic rd(int a, output logic [31:0] q);
    cpu(1'b1, a, 32'h0, q);
  endtask

  localparam int CB = p0_pkg::CTRL_BASE;
  localparam int SB = p0_pkg::SCOPE_BASE;

  int coef_model [T];

  task automatic load_coefs(int mag);
    for (int k = 0; k < T; k++) begin
      coef_model[k] = int'($urandom_range(2 * mag, 0)) - mag;
      wr(p0_pkg::COEF_BASE + k, 32'(coef_model[k]));
    end
  endtask

  task automatic wait_turns(int n);
    repeat (n * NB) @(posedge clk);
  endtask

  initial begin
    logic [31:0] q, d01, d23;
    int prev, stamp;
    rst = 1; cf_rst = 1; evr_irq = 0; cf_cs_n = 1; cf_rw = 1; cf_addr = '0; cf_wdata = '0;
    for (int i = 0; i < 16; i++) evr_regs[i] = 32'hE0E0_0000 + 32'(i);
    #200;
    @(negedge clk); rst = 0;
    @(negedge cf_clk); cf_rst = 0;

    // memories clear after reset
    rd(CB + p0_pkg::CTRL_STATUS, q);
    check(q[1] == 1'b1, "filter memories clearing after reset");
    repeat (NB + 10) @(posedge clk);
    rd(CB + p0_pkg::CTRL_STATUS, q);
    check(q[1:0] == 2'b00, "idle and ready");

    // event receiver window through the bridge
    wr(p0_pkg::EVR_BASE + 3, 32'h1234_5678);
    rd(p0_pkg::EVR_BASE + 3, q);
    check(q == 32'h1234_5678 && evr_writes == 1 && evr_reads == 1, "event receiver access");
    rd(p0_pkg::EVR_BASE + 5, q);
    check(q == 32'hE0E0_0005, "event receiver register");
    if (q == 32'hE0E0_0005) n_evr++;
    evr_irq = 1'b1;
    repeat (6) @(posedge cf_clk);
    check(cf_irq_n == 2'b01, "event receiver interrupt reaches the CPU");
    if (cf_irq_n == 2'b01) n_evr_irq++;
    evr_irq = 1'b0;
    repeat (6) @(posedge cf_clk);
    check(cf_irq_n == 2'b11, "event receiver interrupt released");
    rd(12'h300, q);
    check(q == 32'hDEAD_BEEF, "unmapped read completes");
    if (q == 32'hDEAD_BEEF) n_unmapped++;

    // filter set-up
    load_coefs(1 << 12);
    for (int k = 0; k < T; k += 7) begin
      rd(p0_pkg::COEF_BASE + k, q);
      check(q == 32'(coef_model[k]), "coefficient read back");
    end
    wr(CB + p0_pkg::CTRL_CH_BASE + 0, 4);          // ch0 high-pass shift
    wr(CB + p0_pkg::CTRL_CH_BASE + 4, 6);          // ch1 high-pass shift
    wr(CB + p0_pkg::CTRL_CH_BASE + 2, 5);          // ch0 delay
    wr(CB + p0_pkg::CTRL_CH_BASE + 6, 0);          // ch1 delay
    wr(CB + p0_pkg::CTRL_CONTROL, 1);              // feedback on, high-pass off
    while (!dut.u_seq.valid) @(posedge clk);
    n_start++;
    wait_turns(6);
    rd(CB + p0_pkg::CTRL_STATUS, q);
    check(q[0] == 1'b1, "running after P0 trigger");
    rd(CB + p0_pkg::CTRL_TURNS, q);
    check(q >= 5 && q <= 7, "turn counter");

    wr(CB + p0_pkg::CTRL_CONTROL, 3);              // high-pass on
    n_hpf_on++;
    wait_turns(8);
    // rate: every bunch of a turn gets a D/A value on both channels in one
    // revolution (NB clocks = 3.68 us at 88 MHz)
    begin
      int nv [NCH];
      for (int c = 0; c < NCH; c++) nv[c] = 0;
      repeat (NB) begin
        @(posedge clk);
        for (int c = 0; c < NCH; c++) if (dac_valid[c]) nv[c]++;
      end
      for (int c = 0; c < NCH; c++) check(nv[c] == NB, "one D/A value per bunch per turn");
    end
    load_coefs(1 << 13);                           // retune while running
    n_coef_live++;
    wr(CB + p0_pkg::CTRL_CH_BASE + 6, 300);        // ch1 delay while running
    n_delay_live++;
    wait_turns(4);
    wr(CB + p0_pkg::CTRL_CH_BASE + 1, 6);          // ch0 gain up: saturates
    wait_turns(2);
    wr(CB + p0_pkg::CTRL_CH_BASE + 1, 17);
    rd(CB + p0_pkg::CTRL_STATUS, q);
    check(q[8] == 1'b1, "saturation flagged");
    wr(CB + p0_pkg::CTRL_STATUS, 32'h310);         // clear sticky bits
    rd(CB + p0_pkg::CTRL_STATUS, q);
    check(q[9:8] == 2'b00 && q[4] == 1'b0, "sticky bits cleared");

    // trigger out of phase: the count restarts
    trig_phase = trig_phase + 3;
    wait_turns(2);
    rd(CB + p0_pkg::CTRL_STATUS, q);
    check(q[4] == 1'b1, "out-of-phase trigger flagged");
    if (q[4]) n_resync++;
    wait_turns(3);

    // scope: record every clock until half full, then until overflow
    wr(SB + p0_pkg::SCOPE_DECIM, 0);
    wr(SB + p0_pkg::SCOPE_CTRL, 32'h7);            // clear, run, interrupt
    while (cf_irq_n[0]) @(posedge clk);
    n_irq++;
    rd(SB + p0_pkg::SCOPE_STATUS, q);
    check(q[16] == 1'b1, "scope half full");
    while (!scope_overflow) @(posedge clk);
    n_ovf++;
    wr(SB + p0_pkg::SCOPE_CTRL, 32'h2);            // stop
    rd(SB + p0_pkg::SCOPE_STATUS, q);
    check(q[12:0] == 13'(p0_pkg::SCOPE_DEPTH) && q[17], "scope full with overflow");
    prev = -1;
    for (int i = 0; i < 8; i++) begin
      rd(SB + p0_pkg::SCOPE_DATA01, d01);
      rd(SB + p0_pkg::SCOPE_DATA23, d23);
      stamp = int'(d23[27:16]);
      check(d23[11:0] == (12'(stamp) ^ 12'hA5A) && d23[15:12] == {4{d23[11]}} && d23[31:28] == {4{d23[27]}},
            "scope channels of one entry belong together");
      if (prev >= 0) check(((stamp - prev) & 12'hFFF) == 1, "scope records every clock");
      prev = stamp;
    end
    rd(SB + p0_pkg::SCOPE_STATUS, q);
    check(q[12:0] == 13'(p0_pkg::SCOPE_DEPTH - 8), "scope entries consumed");

    // switch off
    wr(CB + p0_pkg::CTRL_CONTROL, 0);
    repeat (1100) @(posedge clk);
    check(dac_valid == '0, "outputs idle after disable");

    check(n_start > 0,        "mechanism: start on P0 trigger");
    check(n_resync > 0,       "mechanism: re-synchronisation");
    check(n_hpf_on > 0,       "mechanism: high-pass enable");
    check(n_coef_live > 0,    "mechanism: coefficients changed while running");
    check(n_delay_live > 0,   "mechanism: delay changed while running");
    check(n_sat > 0,          "mechanism: output saturation");
    check(n_irq > 0,          "mechanism: scope interrupt");
    check(n_ovf > 0,          "mechanism: scope overflow");
    check(n_evr > 0,          "mechanism: event receiver access");
    check(n_unmapped > 0,     "mechanism: unmapped read");
    check(n_evr_irq > 0,      "mechanism: event receiver interrupt");
    check(n_dac_checked > 20 * NB, "enough D/A values compared");
    $display("dac values compared %0d, saturated %0d, resync %0d", n_dac_checked, n_sat, n_resync);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
