// hp_filter_tb: self-checking test of the per-bunch high-pass filter.
//
// NB bunches are driven round-robin. Each bunch gets its own DC offset plus
// noise, so each bunch's filter state must stay separate. A reference model
// (64-bit integers) repeats y = x - m, m += y >>> shift per bunch and every
// output, its bunch number and the 2-stage latency are compared. The filter
// is run with the bypass (hpf_en = 0), then enabled, with the shift changed
// on the fly. Finally each bunch gets a constant input for many turns and the
// output must have decayed to near zero (the offset is removed).
module hp_filter_tb;
  localparam int NB = 5;
  localparam int IW = 14;
  localparam int OW = 18;
  localparam int FRAC = 16;
  localparam int BW = $clog2(NB);

  logic clk = 1'b0;
  logic rst;
  logic hpf_en;
  logic [3:0] shift;
  logic in_valid;
  logic [BW-1:0] in_bunch;
  logic signed [IW-1:0] in_x;
  logic busy, out_valid;
  logic [BW-1:0] out_bunch;
  logic signed [OW-1:0] out_y;

  int checks = 0, failures = 0, cyc = 0, outs = 0;

  hp_filter #(.NUM_BUNCHES(NB), .FRAC(FRAC)) dut (.*);

  always #5 clk = ~clk;

  longint m [NB];
  typedef struct { int bunch; longint y; int t_in; } exp_t;
  exp_t q [$];
  bit pend = 0; int pend_b, pend_t; longint pend_x;
  longint last_y [NB];

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (!rst) begin
      if (out_valid) begin
        exp_t e;
        outs++;
        last_y[out_bunch] = longint'(out_y);
        if (q.size() == 0) begin
          failures++; $display("FAIL unexpected output");
        end else begin
          e = q.pop_front();
          checks++;
          if (out_y != OW'(e.y) || out_bunch != BW'(e.bunch) || cyc - e.t_in != 2) begin
            failures++;
            $display("FAIL cyc %0d bunch %0d/%0d y %0d exp %0d lat %0d",
                     cyc, out_bunch, e.bunch, out_y, e.y, cyc - e.t_in);
          end
        end
      end
      if (pend) begin
        exp_t e; longint yf;
        yf = (pend_x <<< FRAC) - m[pend_b];
        m[pend_b] = m[pend_b] + (yf >>> shift);
        e.bunch = pend_b; e.t_in = pend_t;
        e.y = hpf_en ? (yf >>> FRAC) : pend_x;
        q.push_back(e);
      end
      pend <= in_valid && !busy;
      pend_b <= int'(in_bunch); pend_x <= longint'(in_x); pend_t <= cyc;
    end
  end

  task automatic run_turns(int n, bit noisy);
    for (int t = 0; t < n; t++)
      for (int b = 0; b < NB; b++) begin
        if (noisy && $urandom_range(7, 0) == 0) begin
          in_valid <= 1'b0;
          @(posedge clk);
        end
        in_valid <= 1'b1;
        in_bunch <= BW'(b);
        in_x     <= IW'(1000 * b - 2500 + (noisy ? int'($urandom_range(400, 0)) - 200 : 0));
        @(posedge clk);
      end
  endtask

  initial begin
    for (int b = 0; b < NB; b++) m[b] = 0;
    rst = 1; in_valid = 0; in_bunch = '0; in_x = '0; hpf_en = 0; shift = 4'd3;
    repeat (3) @(posedge clk);
    rst <= 0;
    @(posedge clk);
    while (busy) @(posedge clk);
    run_turns(20, 1);            // bypass
    hpf_en <= 1'b1;
    run_turns(60, 1);
    shift <= 4'd5;
    run_turns(60, 1);
    shift <= 4'd2;
    run_turns(80, 0);            // constant input: the offset must be removed
    in_valid <= 1'b0;
    repeat (6) @(posedge clk);
    for (int b = 0; b < NB; b++) begin
      checks++;
      if (last_y[b] > 2 || last_y[b] < -2) begin
        failures++; $display("FAIL bunch %0d offset left %0d", b, last_y[b]);
      end
    end
    checks++;
    if (q.size() != 0) begin failures++; $display("FAIL %0d outputs missing", q.size()); end
    $display("outputs %0d", outs);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
