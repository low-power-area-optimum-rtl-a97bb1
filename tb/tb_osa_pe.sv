// tb_osa_pe: self-checking test of the systolic-array processing element.
// Random coefficient/data pairs are accumulated in groups of random length
// (s0 = 1 for all but the last term of a group); idle cycles with vld low
// are mixed in. The expected sum of each group is computed in the
// testbench, and the output is expected exactly one cycle after the last
// term. The delay registers are checked to pass u, v and the control bits
// on after one cycle.
module tb_osa_pe;
  import dtcwt_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  coef_t u_in;  term_t v_in;  logic vld_in, s0_in;
  coef_t u_out; term_t v_out; logic vld_out, s0_out;
  acc_t  y_out; logic y_vld;
  int checks = 0, failures = 0;

  osa_pe dut (.clk, .rst_n, .u_in, .v_in, .vld_in, .s0_in,
              .u_out, .v_out, .vld_out, .s0_out, .y_out, .y_vld);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
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

  initial begin
    longint expect_sum;
    coef_t pu; term_t pv; logic pvld, ps0;
    u_in = '0; v_in = '0; vld_in = 1'b0; s0_in = 1'b1;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    for (int g = 0; g < 400; g++) begin
      int len;
      len = 1 + int'($urandom_range(0, 5));
      expect_sum = 0;
      for (int k = 0; k < len; k++) begin
        // optional idle cycle
        if ($urandom_range(0, 3) == 0) begin
          vld_in = 1'b0; u_in = coef_t'($urandom); v_in = term_t'($urandom); s0_in = 1'b0;
          pu = u_in; pv = v_in; pvld = 1'b0; ps0 = s0_in;
          @(negedge clk);
          check(!y_vld, "no output after idle cycle");
          check(u_out == pu && v_out == pv && vld_out == pvld && s0_out == ps0, "delay registers");
        end
        vld_in = 1'b1;
        u_in   = coef_t'($urandom);
        v_in   = term_t'($urandom);
        s0_in  = (k != len - 1);
        expect_sum += longint'(u_in) * longint'(v_in);
        pu = u_in; pv = v_in; pvld = 1'b1; ps0 = s0_in;
        @(negedge clk);
        check(u_out == pu && v_out == pv && vld_out == pvld && s0_out == ps0, "delay registers");
        if (k != len - 1) check(!y_vld, "no output while accumulating");
      end
      check(y_vld, "output one cycle after last term");
      check(y_out == acc_t'(expect_sum), "accumulated sum");
      if (y_out != acc_t'(expect_sum))
        $display("  group %0d: got %0d expected %0d", g, y_out, expect_sum);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
