// tb_dtcwt_ofdm_demod: end-to-end test of the demodulator at reduced size:
// four processing units and level taps of 3, 5, 6, 9 and 13 instead of
// 160..2560 (the structure is the same; only the depth is smaller so that
// the approximation output of the last level is reached in simulation).
// The run switches between fold by 2 and fold by 4 and between subcarrier
// taps, each under reset, and checks every detail and approximation output
// against the reference model. It counts how often each mechanism was
// used and fails if one never happened: distributed-arithmetic first stage
// (a low/high pair per LUT use), fold by 2 jobs, fold by 4 jobs, data
// forwarded from one unit to the next, approximation output at the tap,
// and each tap setting.
module tb_dtcwt_ofdm_demod;
  import dtcwt_pkg::*;

  localparam int NP = 4;
  localparam int unsigned NS_LIST [5] = '{3, 5, 6, 9, 13};

  logic clk = 1'b0, rst_n = 1'b0;
  logic fold4; logic [2:0] ns_sel;
  logic in_vld; logic signed [IN_W-1:0] in_data;
  logic det0_vld; data_t det0_a, det0_b;
  logic [NP-1:0] det_vld; logic [15:0] det_lvl [NP];
  data_t det_a [NP], det_b [NP];
  logic apx_vld; data_t apx_a, apx_b; logic overrun;
  int checks = 0, failures = 0;

  dtcwt_ofdm_demod #(.N_PU(NP), .NS_TAB(NS_LIST)) dut (
    .clk, .rst_n, .fold4, .ns_sel, .in_vld, .in_data,
    .det0_vld, .det0_a, .det0_b, .det_vld, .det_lvl, .det_a, .det_b,
    .apx_vld, .apx_a, .apx_b, .overrun);

  always #5 clk = ~clk;

  `include "demod_check.svh"

  initial begin : watchdog
    repeat (2000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    fold4 = 1'b0; ns_sel = '0; in_vld = 1'b0; in_data = '0;
    run_cfg(1'b0, 0, 64, 3, 8);
    run_cfg(1'b0, 1, 200, 3, 8);
    run_cfg(1'b0, 2, 300, 3, 8);
    run_cfg(1'b0, 3, 1100, 3, 8);
    run_cfg(1'b1, 1, 200, 3, 8);
    run_cfg(1'b1, 4, 8400, 3, 3);   // highest allowed input rate
    check(n_lut_pairs > 0, "stage-0 LUT shared by low and high pass");
    check(n_fold2 > 0, "fold by 2 used");
    check(n_fold4 > 0, "fold by 4 used");
    check(n_fwd > 0, "data forwarded between units");
    check(n_apx > 0, "approximation output reached");
    for (int i = 0; i < 5; i++) check(n_ns[i] > 0, "every subcarrier tap used");
    $display("mechanisms: lut_pairs=%0d fold2=%0d fold4=%0d forwarded=%0d approx=%0d",
             n_lut_pairs, n_fold2, n_fold4, n_fwd, n_apx);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
