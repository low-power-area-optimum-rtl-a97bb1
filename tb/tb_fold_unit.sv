// tb_fold_unit: self-checking test of one fold unit, fold by 2 and by 4.
// Random new samples (array x) and random write-backs for random levels
// (the demultiplexer) are applied while a reference model in the testbench
// keeps its own copy of every register array. The pending flags are
// compared every cycle; issued levels are picked at random among the
// pending ones, and the five streamed terms are compared with the pair
// sums of the reference array taken when the level's pair completed
// (later writes must not change them), with osa_start one
// cycle after the issue. Write-backs of the last folded level must appear
// on the data register one cycle later. A final phase issues nothing so
// that the sticky overrun flag must rise.
module tb_fold_unit;
  import dtcwt_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  logic fold4, in_vld, iss_vld, wb_vld, osa_start, out_vld, overrun;
  data_t in_data, wb_data, out_data;
  logic [1:0] iss_lvl, wb_lvl;
  logic [MAXF-1:0] pend;
  term_t term;
  int checks = 0, failures = 0;

  fold_unit dut (.clk, .rst_n, .fold4, .in_vld, .in_data, .pend,
                 .iss_vld, .iss_lvl, .osa_start, .term,
                 .wb_vld, .wb_lvl, .wb_data, .out_vld, .out_data, .overrun);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  int rwin [MAXF][NTAP];
  bit rpar [MAXF];
  bit rpend [MAXF];
  bit rovr;
  int rsnap [MAXF][NTERM];
  int stream [$];        // expected terms still to be streamed
  int n_start_due;       // osa_start expected this cycle
  bit exp_out; int exp_out_val;

  task automatic ref_reset();
    for (int l = 0; l < int'(MAXF); l++) begin
      for (int i = 0; i < int'(NTAP); i++) rwin[l][i] = 0;
      rpar[l] = 0; rpend[l] = 0;
    end
    rovr = 0; stream.delete(); n_start_due = 0; exp_out = 0;
  endtask

  task automatic ref_push(input int l, input int v, input bit served);
    for (int i = int'(NTAP) - 1; i > 0; i--) rwin[l][i] = rwin[l][i-1];
    rwin[l][0] = v;
    if (rpar[l]) begin
      if (rpend[l] && !served) rovr = 1;
      rpend[l] = 1;
      for (int j = 0; j < int'(NTERM); j++) rsnap[l][j] = rwin[l][PAIR0[j]] + rwin[l][PAIR1[j]];
    end
    rpar[l] = !rpar[l];
  endtask

  task automatic run(input bit f4, input int ncyc, input bit allow_issue);
    int last;
    last = f4 ? 3 : 1;
    for (int c = 0; c < ncyc; c++) begin
      bit served [MAXF];
      bit out_now; int out_val;
      // drive this cycle (at negedge)
      in_vld  = ($urandom_range(0, 3) == 0);
      in_data = data_t'($urandom);
      wb_vld  = ($urandom_range(0, 3) == 0);
      wb_lvl  = 2'($urandom_range(0, last));
      wb_data = data_t'($urandom);
      iss_vld = 1'b0; iss_lvl = '0;
      if (allow_issue && stream.size() == 0) begin
        int cand [$];
        for (int l = 0; l <= last; l++) if (rpend[l]) cand.push_back(l);
        if (cand.size() > 0) begin
          iss_vld = 1'b1;
          iss_lvl = 2'(cand[$urandom_range(0, cand.size() - 1)]);
        end
      end
      // compare outputs visible this cycle
      for (int l = 0; l <= last; l++) check(pend[l] == rpend[l], "pending flag");
      check(osa_start == (n_start_due == 1), "osa_start timing");
      if (stream.size() > 0 && n_start_due == 0) begin
        check(term == term_t'(stream[0]), "streamed term");
        void'(stream.pop_front());
      end else if (n_start_due == 1) begin
        check(term == term_t'(stream[0]), "first streamed term");
        void'(stream.pop_front());
      end
      n_start_due = 0;
      check(out_vld == exp_out, "data register valid");
      if (exp_out) check(out_data == data_t'(exp_out_val), "data register value");
      check(overrun == rovr, "overrun flag");
      // reference update for the coming clock edge
      for (int l = 0; l < int'(MAXF); l++) served[l] = iss_vld && iss_lvl == 2'(l);
      if (iss_vld) begin
        for (int j = 0; j < int'(NTERM); j++)
          stream.push_back(rsnap[iss_lvl][j]);
        n_start_due = 1;
      end
      out_now = wb_vld && (int'(wb_lvl) == last);
      out_val = int'(wb_data);
      if (in_vld) ref_push(0, int'(in_data), served[0]);
      if (wb_vld && int'(wb_lvl) != last) ref_push(int'(wb_lvl) + 1, int'(wb_data), served[int'(wb_lvl) + 1]);
      // a served level stays pending only if a new pair formed in the same cycle
      for (int l = 0; l < int'(MAXF); l++) if (served[l] && !(rpar[l] == 0 && ((l == 0 && in_vld) || (l > 0 && wb_vld && int'(wb_lvl) == l - 1)))) rpend[l] = 0;
      exp_out = out_now; exp_out_val = out_val;
      @(negedge clk);
    end
  endtask

  initial begin
    fold4 = 1'b0; in_vld = 1'b0; in_data = '0; iss_vld = 1'b0; iss_lvl = '0;
    wb_vld = 1'b0; wb_lvl = '0; wb_data = '0;
    for (int f = 0; f < 2; f++) begin
      rst_n = 1'b0;
      fold4 = f[0];
      ref_reset();
      repeat (3) @(posedge clk);
      @(negedge clk);
      rst_n = 1'b1;
      run(f[0], 3000, 1'b1);
      // stop serving: pending levels must overflow
      while (stream.size() > 0) run(f[0], 1, 1'b0);
      run(f[0], 200, 1'b0);
      check(overrun == 1'b1, "overrun raised when levels are not served");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
