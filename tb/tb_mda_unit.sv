// tb_mda_unit: self-checking test of the distributed-arithmetic first stage,
// both trees. An impulse is sent first (the outputs must reproduce the
// first-stage filter taps, two per output pair because of the decimation),
// then random 8-bit samples, first one per cycle and then with random
// gaps. Expected outputs are direct 10-tap convolutions with the filter
// table, computed here. The low-pass output must come four cycles and the
// high-pass output five cycles after the sample that completes a pair, and
// with one sample per cycle the first output covering ten samples must be
// written on the 13th clock edge.
module tb_mda_unit;
  import dtcwt_pkg::*;

  localparam int OW = 18;
  logic clk = 1'b0, rst_n = 1'b0;
  logic in_vld; logic signed [IN_W-1:0] in_data;
  logic signed [OW-1:0] lo [2], hi [2];
  logic lo_vld [2], hi_vld [2];
  int checks = 0, failures = 0, cyc = 0;

  for (genvar t = 0; t < 2; t++) begin : g_dut
    mda_unit #(.TREE(t[0])) dut (.clk, .rst_n, .in_vld, .in_data,
      .lo(lo[t]), .lo_vld(lo_vld[t]), .hi(hi[t]), .hi_vld(hi_vld[t]));
  end

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin : watchdog
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s cycle %0d", what, cyc);
    end
  endtask

  typedef struct { int due; int val; } exp_t;
  exp_t qlo [2][$], qhi [2][$];
  int x [$];

  // expected outputs after the sample that completes a pair
  task automatic add_expect(input int s_cyc);
    int m;
    m = x.size() - 1;
    for (int t = 0; t < 2; t++) begin
      int l, h;
      l = 0; h = 0;
      for (int i = 0; i < int'(NTAP); i++) begin
        if (m - i >= 0) begin
          l += LS1[2*t][i]   * x[m-i];
          h += LS1[2*t+1][i] * x[m-i];
        end
      end
      qlo[t].push_back('{s_cyc + 4, l});
      qhi[t].push_back('{s_cyc + 5, h});
    end
  endtask

  always @(negedge clk) if (rst_n) begin
    for (int t = 0; t < 2; t++) begin
      if (lo_vld[t]) begin
        check(qlo[t].size() > 0 && qlo[t][0].due == cyc, "low-pass output cycle");
        if (qlo[t].size() > 0) begin
          check(int'(lo[t]) == qlo[t][0].val, "low-pass value");
          if (int'(lo[t]) != qlo[t][0].val) $display("  tree %0d lo got %0d exp %0d", t, lo[t], qlo[t][0].val);
          void'(qlo[t].pop_front());
        end
      end else if (qlo[t].size() > 0) check(qlo[t][0].due != cyc, "low-pass output missing");
      if (hi_vld[t]) begin
        check(qhi[t].size() > 0 && qhi[t][0].due == cyc, "high-pass output cycle");
        if (qhi[t].size() > 0) begin
          check(int'(hi[t]) == qhi[t][0].val, "high-pass value");
          if (int'(hi[t]) != qhi[t][0].val) $display("  tree %0d hi got %0d exp %0d", t, hi[t], qhi[t][0].val);
          void'(qhi[t].pop_front());
        end
      end else if (qhi[t].size() > 0) check(qhi[t][0].due != cyc, "high-pass output missing");
    end
  end

  task automatic send(input int v);
    in_vld  = 1'b1;
    in_data = IN_W'(v);
    x.push_back(v);
    if (x.size() % 2 == 0) add_expect(cyc);
    @(negedge clk);
    in_vld = 1'b0;
  endtask

  // impulse: outputs reproduce the taps
  int imp_lo [2][$];
  int n_lo = 0, fifth_lo_cyc = -1;
  always @(negedge clk) if (rst_n && lo_vld[0]) begin
    n_lo++;
    if (n_lo == 5) fifth_lo_cyc = cyc;
  end
  always @(negedge clk) for (int t = 0; t < 2; t++) if (lo_vld[t] && x.size() <= 12) imp_lo[t].push_back(int'(lo[t]));

  initial begin
    int first_cyc, t13;
    in_vld = 1'b0; in_data = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    // 13-cycle latency: ten samples, one per cycle
    first_cyc = cyc;
    send(1);
    for (int i = 1; i < 12; i++) send(0);
    repeat (8) @(negedge clk);
    // impulse at sample 0: output pair k (after sample 2k+1) is h[2k+1]
    for (int t = 0; t < 2; t++)
      for (int k = 0; k < 5; k++) begin
        check(imp_lo[t].size() > k, "impulse response length");
        if (imp_lo[t].size() > k) check(imp_lo[t][k] == LS1[2*t][2*k+1], "impulse response tap");
      end
    // full-window latency: the pair completed by the 10th sample (cycle
    // first_cyc+9) must give its low-pass output after the 13th edge
    t13 = fifth_lo_cyc - first_cyc;
    check(t13 == 13, "first full-window output on the 13th clock edge");
    if (t13 != 13) $display("  full-window output after %0d edges", t13);
    // random samples, one per cycle
    for (int i = 0; i < 400; i++) send(int'($urandom_range(0, 255)) - 128);
    // random samples with gaps
    for (int i = 0; i < 400; i++) begin
      send(int'($urandom_range(0, 255)) - 128);
      if ($urandom_range(0, 1) == 0) repeat ($urandom_range(1, 3)) @(negedge clk);
    end
    // extremes
    for (int i = 0; i < 40; i++) send((i % 3 == 0) ? 127 : -128);
    repeat (10) @(negedge clk);
    for (int t = 0; t < 2; t++) check(qlo[t].size() == 0 && qhi[t].size() == 0, "all outputs delivered");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
