// tb_osa_array: self-checking test of the four-PE optimum systolic array.
// Jobs of five random b and c terms are streamed in, back to back or with
// random gaps. Each of the four outputs is compared with a dot product
// computed here from the coefficient vectors, and its cycle is checked
// against the data-flow schedule: with start in cycle 1 the outputs of
// PE0, PE1/PE3 and PE2 appear in cycles 5, 6 and 7.
module tb_osa_array;
  import dtcwt_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  logic start; term_t b_in, c_in;
  acc_t y_a0, y_a1, y_b0, y_b1;
  logic y_a0_vld, y_a1_vld, y_b0_vld, y_b1_vld, busy;
  int checks = 0, failures = 0;
  int cyc = 0;

  osa_array dut (.clk, .rst_n, .start, .b_in, .c_in,
                 .y_a0, .y_a0_vld, .y_a1, .y_a1_vld,
                 .y_b0, .y_b0_vld, .y_b1, .y_b1_vld, .busy);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin : watchdog
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // expected results, queued by the cycle they are due
  typedef struct { int due; longint val; } exp_t;
  exp_t qa0[$], qa1[$], qb0[$], qb1[$];

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s cycle %0d", what, cyc);
    end
  endtask

  task automatic expect_out(ref exp_t q[$], input logic vld, input acc_t y, input string nm);
    if (vld) begin
      check(q.size() > 0, {nm, " unexpected output"});
      if (q.size() > 0) begin
        exp_t e;
        e = q.pop_front();
        check(e.due == cyc, {nm, " output cycle"});
        check(y == acc_t'(e.val), {nm, " output value"});
        if (y != acc_t'(e.val)) $display("  got %0d expected %0d", y, e.val);
      end
    end else if (q.size() > 0) begin
      check(q[0].due != cyc, {nm, " missing output"});
    end
  endtask

  always @(negedge clk) if (rst_n) begin
    expect_out(qa0, y_a0_vld, y_a0, "PE0");
    expect_out(qa1, y_a1_vld, y_a1, "PE1");
    expect_out(qb0, y_b0_vld, y_b0, "PE3");
    expect_out(qb1, y_b1_vld, y_b1, "PE2");
  end

  initial begin
    start = 1'b0; b_in = '0; c_in = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    for (int job = 0; job < 300; job++) begin
      longint sa0, sa1, sb0, sb1;
      int s;
      sa0 = 0; sa1 = 0; sb0 = 0; sb1 = 0;
      if ($urandom_range(0, 2) == 0) repeat ($urandom_range(1, 4)) @(negedge clk);
      s = cyc;   // the cycle ending at the next posedge is "cycle 1"
      for (int j = 0; j < int'(NTERM); j++) begin
        start = (j == 0);
        b_in  = term_t'($urandom);
        c_in  = term_t'($urandom);
        sa0 += longint'(OSA_V0[j]) * longint'(b_in);
        sa1 += longint'(OSA_V1[j]) * longint'(b_in);
        sb0 += longint'(OSA_V0[j]) * longint'(c_in);
        sb1 += longint'(OSA_V2[j]) * longint'(c_in);
        @(negedge clk);
      end
      start = 1'b0; b_in = term_t'($urandom); c_in = term_t'($urandom);
      qa0.push_back('{s + 5, sa0});
      qa1.push_back('{s + 6, sa1});
      qb0.push_back('{s + 6, sb0});
      qb1.push_back('{s + 7, sb1});
    end
    repeat (12) @(negedge clk);
    check(qa0.size() == 0 && qa1.size() == 0 && qb0.size() == 0 && qb1.size() == 0,
          "all outputs delivered");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
