// tb_dtcwt_ofdm_modem: end-to-end test of the modulator-demodulator.
//
// Receive side, at reduced size: four processing units and level taps of
// 3, 5, 6, 9 and 13 instead of 160..2560. The structure is the same; only
// the depth is smaller, so that the approximation output of the last level
// is reached in simulation. The run switches between fold by 2 and fold by
// 4 and between subcarrier taps, each under reset. It checks every detail
// and approximation output against the reference model.
// Transmit side, at its default seven levels: a full-rate frame and a frame
// with random gaps on the symbol streams and on output-ready, checked
// sample by sample.
// The test counts how often each mechanism was used and fails if one never
// happened:
//   - distributed-arithmetic first stage (a low/high pair per LUT use);
//   - fold by 2 jobs and fold by 4 jobs;
//   - data forwarded from one unit to the next;
//   - approximation output at the tap, and each tap setting;
//   - modulator back-pressure and symbol gaps.
// It also checks that the modulator emits one sample per cycle at full rate.
module tb_dtcwt_ofdm_modem;
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

  localparam int NLVL = 7;
  logic [1:0][NLVL:0] sym_vld, sym_rdy;
  logic signed [IN_W-1:0] sym [2][NLVL+1];
  logic out_vld, out_rdy;
  logic signed [DW:0] xr, xi;

  dtcwt_ofdm_modem #(.N_PU(NP), .NS_TAB(NS_LIST)) dut (
    .clk, .rst_n,
    .mod_sym_vld(sym_vld), .mod_sym_rdy(sym_rdy), .mod_sym(sym),
    .mod_out_vld(out_vld), .mod_out_rdy(out_rdy), .mod_xr(xr), .mod_xi(xi),
    .fold4, .ns_sel, .in_vld, .in_data,
    .det0_vld, .det0_a, .det0_b, .det_vld, .det_lvl, .det_a, .det_b,
    .apx_vld, .apx_a, .apx_b, .overrun);

  always #5 clk = ~clk;

  `include "demod_check.svh"
  `include "mod_check.svh"

  initial begin : watchdog
    repeat (2000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    fold4 = 1'b0; ns_sel = '0; in_vld = 1'b0; in_data = '0;
    sym_vld = '0; out_rdy = 1'b0;
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
    // Transmit side: both phases of the modulator test, the demodulator idle.
    mod_test();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
