// tb_fold_stage: self-checking test of one folded processing unit (unit 2
// of a chain) in four configurations: fold by 2 and fold by 4, each with
// the last level beyond the unit (results leave through the data register)
// and inside the unit (results leave on the approximation output).
// Random real/imaginary samples arrive every 8 to 14 cycles. A reference
// model in the testbench runs the same level-by-level decomposition with
// the grouped filters (pair sums, coefficient vectors, scale by 64 with
// saturation) and predicts, per global level, the detail outputs of both
// trees, the samples for the next unit and the approximation outputs. The
// first detail output must come nine clock edges after the edge that takes
// in the sample completing the first pair (issue, five terms, three PE
// stages, output register).
module tb_fold_stage;
  import dtcwt_pkg::*;

  localparam int IDX = 2;
  logic clk = 1'b0, rst_n = 1'b0;
  logic fold4; logic [15:0] last_lvl;
  logic in_vld, out_vld, det_vld, apx_vld, overrun;
  data_t in_a, in_b, out_a, out_b, det_a, det_b, apx_a, apx_b;
  logic [15:0] det_lvl;
  int checks = 0, failures = 0, cyc = 0;

  fold_stage #(.IDX(IDX)) dut (.clk, .rst_n, .fold4, .last_lvl,
    .in_vld, .in_a, .in_b, .out_vld, .out_a, .out_b,
    .det_vld, .det_lvl, .det_a, .det_b, .apx_vld, .apx_a, .apx_b, .overrun);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin : watchdog
    repeat (400000) @(posedge clk);
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

  function automatic int sc(input longint v);
    longint s;
    s = v >>> 6;
    if (s > 32767) s = 32767;
    if (s < -32768) s = -32768;
    return int'(s);
  endfunction

  // ---- reference model ----
  int F, base, last;
  int wa [MAXF][NTAP], wb [MAXF][NTAP];
  bit par [MAXF];
  typedef struct { int a; int b; } pair_t;
  pair_t qdet [MAXF][$];
  pair_t qout [$], qapx [$];
  int n_det, n_out, n_apx;

  function automatic longint dot(input int w [NTAP], input int v [NTERM]);
    longint s;
    s = 0;
    for (int j = 0; j < int'(NTERM); j++) s += longint'(v[j]) * longint'(w[PAIR0[j]] + w[PAIR1[j]]);
    return s;
  endfunction

  function automatic void ref_in(input int l, input int a, input int b);
    for (int i = int'(NTAP) - 1; i > 0; i--) begin
      wa[l][i] = wa[l][i-1];
      wb[l][i] = wb[l][i-1];
    end
    wa[l][0] = a;
    wb[l][0] = b;
    par[l] = !par[l];
    if (!par[l]) begin
      int la, ha, lb, hb;
      la = sc(dot(wa[l], OSA_V0));
      ha = sc(dot(wa[l], OSA_V1));
      lb = sc(dot(wb[l], OSA_V0));
      hb = sc(dot(wb[l], OSA_V2));
      qdet[l].push_back('{ha, hb});
      if (base + l == last)  qapx.push_back('{la, lb});
      else if (l == F - 1)   qout.push_back('{la, lb});
      else                   ref_in(l + 1, la, lb);
    end
  endfunction

  always @(negedge clk) if (rst_n) begin
    if (det_vld) begin
      int l;
      l = int'(det_lvl) - base;
      check(l >= 0 && l < F, "detail level in range");
      if (l >= 0 && l < F) begin
        check(qdet[l].size() > 0, "detail output expected");
        if (qdet[l].size() > 0) begin
          pair_t e;
          e = qdet[l].pop_front();
          check(int'(det_a) == e.a && int'(det_b) == e.b, "detail values");
          if (!(int'(det_a) == e.a && int'(det_b) == e.b)) $display("  lvl %0d got %0d %0d exp %0d %0d", l, det_a, det_b, e.a, e.b);
          n_det++;
        end
      end
    end
    if (out_vld) begin
      check(qout.size() > 0, "next-stage output expected");
      if (qout.size() > 0) begin
        pair_t e;
        e = qout.pop_front();
        check(int'(out_a) == e.a && int'(out_b) == e.b, "next-stage values");
        n_out++;
      end
    end
    if (apx_vld) begin
      check(qapx.size() > 0, "approximation output expected");
      if (qapx.size() > 0) begin
        pair_t e;
        e = qapx.pop_front();
        check(int'(apx_a) == e.a && int'(apx_b) == e.b, "approximation values");
        n_apx++;
      end
    end
  end

  int first_det_cyc;
  always @(negedge clk) if (rst_n && det_vld && first_det_cyc < 0) first_det_cyc = cyc;

  task automatic run_cfg(input bit f4, input int last_rel, input int nsamp);
    int pair2_cyc;
    rst_n = 1'b0;
    fold4 = f4;
    F = f4 ? 4 : 2;
    base = ((IDX - 1) * F) + 2;
    last = base + last_rel;
    last_lvl = 16'(last);
    for (int l = 0; l < int'(MAXF); l++) begin
      par[l] = 0;
      qdet[l].delete();
      for (int i = 0; i < int'(NTAP); i++) begin wa[l][i] = 0; wb[l][i] = 0; end
    end
    qout.delete(); qapx.delete();
    n_det = 0; n_out = 0; n_apx = 0; first_det_cyc = -1;
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    for (int s = 0; s < nsamp; s++) begin
      in_vld = 1'b1;
      in_a = data_t'($urandom);
      in_b = data_t'($urandom);
      if (s == 1) pair2_cyc = cyc;
      ref_in(0, int'(in_a), int'(in_b));
      @(negedge clk);
      in_vld = 1'b0;
      repeat ($urandom_range(7, 13)) @(negedge clk);
    end
    repeat (60) @(negedge clk);
    check(first_det_cyc - pair2_cyc == 10, "first detail output latency");
    if (first_det_cyc - pair2_cyc != 10) $display("  latency %0d", first_det_cyc - pair2_cyc);
    for (int l = 0; l < int'(MAXF); l++) check(qdet[l].size() == 0, "all detail outputs delivered");
    check(qout.size() == 0 && qapx.size() == 0, "all stage outputs delivered");
    check(n_det > 0, "detail outputs seen");
    check(!overrun, "no overrun at this input rate");
    $display("cfg fold%0d last=+%0d: %0d details, %0d next-stage, %0d approximation",
             F, last_rel, n_det, n_out, n_apx);
  endtask

  initial begin
    fold4 = 1'b0; last_lvl = '0; in_vld = 1'b0; in_a = '0; in_b = '0;
    run_cfg(1'b0, 50, 400);   // fold by 2, last level elsewhere
    check(n_out > 0, "fold by 2 forwards to next unit");
    run_cfg(1'b0, 1, 400);    // fold by 2, last level = second folded level
    check(n_apx > 0 && n_out == 0, "fold by 2 approximation output");
    run_cfg(1'b1, 50, 600);   // fold by 4
    check(n_out > 0, "fold by 4 forwards to next unit");
    run_cfg(1'b1, 2, 600);    // fold by 4, last level inside the unit
    check(n_apx > 0 && n_out == 0, "fold by 4 approximation output");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
