// demod_check.svh: checking code shared by the demodulator testbenches.
// Included inside a testbench module that declares the demodulator's
// signals under the port names, the localparam NP (number of processing
// units) and NS_LIST (level count per ns_sel code), and the usual
// checks/failures counters. It compares every output with the reference
// model and counts the mechanisms each run exercised.

  demod_ref_pkg::demod_ref rf;
  int cyc = 0;
  int fcur = 2;                 // current fold factor
  int n_fold2 = 0, n_fold4 = 0, n_apx = 0, n_fwd = 0, n_det0 = 0;
  int n_lut_pairs = 0;
  int n_ns [5] = '{0, 0, 0, 0, 0};
  int cur_ns = 0;

  always @(posedge clk) cyc <= cyc + 1;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s cycle %0d", what, cyc);
    end
  endtask

  task automatic cmp_det(input int g, input int a, input int b, input string src);
    check(rf.qdet.exists(g) && rf.qdet[g].size() > 0, {"expected detail output from ", src});
    if (rf.qdet.exists(g) && rf.qdet[g].size() > 0) begin
      demod_ref_pkg::pair_t e;
      e = rf.qdet[g].pop_front();
      check(a == e.a && b == e.b, {"detail values from ", src});
      if (!(a == e.a && b == e.b) && failures < 20)
        $display("  level %0d got %0d,%0d expected %0d,%0d", g, a, b, e.a, e.b);
    end
  endtask

  always @(negedge clk) if (rst_n && rf != null) begin
    if (det0_vld) begin
      cmp_det(1, int'(det0_a), int'(det0_b), "stage 0");
      n_det0++;
      n_lut_pairs++;
    end
    for (int k = 0; k < NP; k++) begin
      if (det_vld[k]) begin
        int g;
        g = int'(det_lvl[k]);
        check(g >= k * fcur + 2 && g <= (k + 1) * fcur + 1, "level belongs to its unit");
        check(g <= rf.last, "no unit works beyond the configured last level");
        cmp_det(g, int'(det_a[k]), int'(det_b[k]), "processing unit");
        if (fcur == 2) n_fold2++; else n_fold4++;
        if (k > 0) n_fwd++;
      end
    end
    if (apx_vld) begin
      check(rf.qapx.size() > 0, "expected approximation output");
      if (rf.qapx.size() > 0) begin
        demod_ref_pkg::pair_t e;
        e = rf.qapx.pop_front();
        check(int'(apx_a) == e.a && int'(apx_b) == e.b, "approximation values");
      end
      n_apx++;
    end
    check(!overrun, "no overrun");
  end

  // One configuration: reset, set fold and subcarrier tap, send samples.
  task automatic run_cfg(input bit f4, input int sel, input int nsamp, input int gap_lo, input int gap_hi);
    rst_n  = 1'b0;
    fold4  = f4;
    ns_sel = 3'(sel);
    fcur   = f4 ? 4 : 2;
    cur_ns = sel;
    rf = new(NS_LIST[sel], NP * fcur + 1);
    in_vld = 1'b0;
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    for (int s = 0; s < nsamp; s++) begin
      int v;
      // a two-tone signal plus noise, as 8-bit signed samples
      v = (s % 16 < 8 ? 40 : -40) + ((s % 5) * 12 - 24) + int'($urandom_range(0, 30)) - 15;
      in_vld  = 1'b1;
      in_data = 8'(v);
      rf.push(v);
      @(negedge clk);
      in_vld = 1'b0;
      repeat ($urandom_range(gap_lo, gap_hi)) @(negedge clk);
    end
    repeat (80) @(negedge clk);
    check(rf.pending() == 0, "every expected output delivered");
    if (rf.pending() != 0) $display("  %0d outputs missing", rf.pending());
    n_ns[sel]++;
    $display("config fold%0d levels=%0d: samples=%0d fold2 jobs=%0d fold4 jobs=%0d approx=%0d",
             fcur, NS_LIST[sel], nsamp, n_fold2, n_fold4, n_apx);
  endtask
