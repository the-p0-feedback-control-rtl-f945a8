// fir_bank_tb: self-checking test of the per-bunch FIR filter.
//
// Drives NB bunches in round-robin order for many turns with random 18-bit
// samples, occasional idle clocks, coefficient changes while running and
// several output shifts (including ones that force saturation). A reference
// model keeps its own per-bunch history of the last NUM_TAPS samples and
// computes sum c[k]*x[n-k] with 64-bit integers, then the shift and the
// 14-bit saturation. Every output is compared in order, its bunch number is
// checked, and the latency (output visible 4 clocks after the input edge) is
// checked for each sample.
module fir_bank_tb;
  localparam int NB = 7;
  localparam int T  = 32;
  localparam int SW = 18;
  localparam int CW = 18;
  localparam int OW = 14;
  localparam int BW = $clog2(NB);

  logic clk = 1'b0;
  logic rst;
  logic signed [T-1:0][CW-1:0] coefs;
  logic [5:0] out_shift;
  logic in_valid;
  logic [BW-1:0] in_bunch;
  logic signed [SW-1:0] in_x;
  logic busy, out_valid, sat;
  logic [BW-1:0] out_bunch;
  logic signed [OW-1:0] out_y;

  int checks = 0, failures = 0, cyc = 0, sats = 0, outs = 0;

  fir_bank #(.NUM_BUNCHES(NB), .NUM_TAPS(T)) dut (.*);

  always #5 clk = ~clk;

  // reference model state
  longint hist [NB][T];
  typedef struct { int bunch; longint acc; int t_in; } exp_t;
  logic [5:0] sh_d1;   // out_shift as the DUT's output stage saw it
  exp_t q [$];
  bit pend = 0; int pend_b, pend_t; longint pend_x;

  function automatic longint sat_ref(longint v, output bit clip);
    longint mx = (1 <<< (OW-1)) - 1;
    longint mn = -(1 <<< (OW-1));
    clip = 1'b0;
    if (v > mx) begin clip = 1'b1; return mx; end
    if (v < mn) begin clip = 1'b1; return mn; end
    return v;
  endfunction

  always @(posedge clk) begin
    cyc <= cyc + 1;
    sh_d1 <= out_shift;
    if (!rst) begin
      // outputs registered at the previous edge
      if (out_valid) begin
        exp_t e;
        outs++;
        if (q.size() == 0) begin
          failures++; $display("FAIL unexpected output at cycle %0d", cyc);
        end else begin
          longint y; bit clip;
          e = q.pop_front();
          y = sat_ref(e.acc >>> sh_d1, clip);
          checks++;
          if (out_y != OW'(y) || out_bunch != BW'(e.bunch) || sat != clip) begin
            failures++;
            $display("FAIL cyc %0d bunch %0d/%0d y %0d exp %0d sat %0b/%0b",
                     cyc, out_bunch, e.bunch, out_y, y, sat, clip);
          end
          checks++;
          if (cyc - e.t_in != 4) begin
            failures++; $display("FAIL latency %0d", cyc - e.t_in);
          end
          if (sat) sats++;
        end
      end
      // the sample taken at the previous edge meets the coefficients now
      if (pend) begin
        exp_t e; longint acc;
        acc = 0;
        for (int k = T-1; k > 0; k--) hist[pend_b][k] = hist[pend_b][k-1];
        hist[pend_b][0] = pend_x;
        for (int k = 0; k < T; k++) acc += longint'($signed(coefs[k])) * hist[pend_b][k];
        e.bunch = pend_b; e.t_in = pend_t;
        e.acc = acc;
        q.push_back(e);
      end
      pend <= in_valid && !busy;
      pend_b <= int'(in_bunch); pend_x <= longint'(in_x); pend_t <= cyc;
    end
  end

  task automatic new_coefs(int mag);
    logic signed [T-1:0][CW-1:0] c;
    for (int k = 0; k < T; k++) c[k] = CW'(int'($urandom_range(2*mag, 0)) - mag);
    coefs <= c;
  endtask

  initial begin
    for (int b = 0; b < NB; b++) for (int k = 0; k < T; k++) hist[b][k] = 0;
    rst = 1; in_valid = 0; in_bunch = '0; in_x = '0; out_shift = 6'd17;
    coefs = '0;
    repeat (3) @(posedge clk);
    rst <= 0;
    @(posedge clk);
    while (busy) @(posedge clk);
    new_coefs(1 << 11);
    for (int turn = 0; turn < 200; turn++) begin
      if (turn == 60)  out_shift <= 6'd10;     // forces saturation
      if (turn == 90)  out_shift <= 6'd20;
      if (turn == 150) out_shift <= 6'd0;
      if (turn == 170) out_shift <= 6'd17;
      for (int b = 0; b < NB; b++) begin
        if ($urandom_range(9, 0) == 0) begin   // idle clock
          in_valid <= 1'b0;
          @(posedge clk);
        end
        if (turn % 40 == 20 && b == 3) new_coefs(1 << 12);  // retune while running
        in_valid <= 1'b1;
        in_bunch <= BW'(b);
        in_x     <= (turn % 50 == 7) ? SW'(131071) : SW'($urandom);
        @(posedge clk);
      end
    end
    in_valid <= 1'b0;
    repeat (10) @(posedge clk);
    checks++;
    if (q.size() != 0 || outs != 200*NB) begin
      failures++; $display("FAIL %0d outputs, %0d left", outs, q.size());
    end
    checks++;
    if (sats == 0) begin failures++; $display("FAIL saturation never exercised"); end
    $display("outputs %0d saturated %0d", outs, sats);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

