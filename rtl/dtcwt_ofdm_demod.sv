// dtcwt_ofdm_demod: configurable 160 to 2560 subcarrier OFDM demodulator
// based on the dual-tree complex wavelet transform (DTCWT).
//
// The received real signal is decomposed level by level by two filter trees
// (real tree a and imaginary tree b). At each level a low-pass/high-pass
// filter pair per tree splits the signal and halves the rate; the high-pass
// outputs of every level are demodulated subcarriers (detail coefficients)
// and the low-pass outputs feed the next level. After the last level the
// low-pass output is the approximation coefficient.
//
// Structure:
//   stage 0      two mda_units (tree a, tree b): the first level, computed
//                with distributed arithmetic and exact first-stage filters;
//   stages 1..N  N_PU fold_stage processing units in a chain. Each reuses
//                one systolic array for two (fold by 2) or four (fold by 4)
//                levels, so N_PU = 1280 units cover 2560 levels by 2.
// Configuration (static while data flows; change it under reset):
//   fold4   S1 select: 0 = fold by 2, 1 = fold by 4
//   ns_sel  number of levels, tapped from the chain: 0..4 select
//           NS_TAB[ns_sel] = 160, 320, 640, 1280, 2560. Units beyond the
//           tap receive no data and stay idle.
// Outputs: det0_* level-1 details from stage 0; det_*[k] details of unit
// k+1 with their global level number; apx_* the approximation output of
// the last level; overrun if the input rate was too high for some unit.
// Rate: in_vld at most once every four cycles. Stage 0 halves the rate, so
// unit 1 gets a sample at most every eight cycles, and every pair of
// samples at any of its levels costs a five-cycle job of the array.
// Levels, folding and subcarrier taps follow the design; the level
// numbering, the data scaling between levels and the handshake-free
// constant-rate interface are this design's own choices.
module dtcwt_ofdm_demod
  import dtcwt_pkg::*;
#(
  parameter int unsigned N_PU   = 1280,
  parameter int unsigned LW     = 16,
  parameter int unsigned NS_TAB [5] = '{160, 320, 640, 1280, 2560}
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 fold4,
  input  logic [2:0]           ns_sel,
  input  logic                 in_vld,
  input  logic signed [IN_W-1:0] in_data,
  output logic                 det0_vld,
  output data_t                det0_a,
  output data_t                det0_b,
  output logic  [N_PU-1:0]     det_vld,
  output logic  [LW-1:0]       det_lvl [N_PU],
  output data_t                det_a   [N_PU],
  output data_t                det_b   [N_PU],
  output logic                 apx_vld,
  output data_t                apx_a,
  output data_t                apx_b,
  output logic                 overrun
);

  localparam int unsigned OW0 = 18;

  // ---- configuration ----
  logic [LW-1:0] last_lvl;
  always_comb begin
    last_lvl = LW'(NS_TAB[0]);
    for (int i = 0; i < 5; i++)
      if (ns_sel == 3'(i)) last_lvl = LW'(NS_TAB[i]);
  end

  // ---- stage 0: MDA first level ----
  logic signed [OW0-1:0] lo_a, hi_a, lo_b, hi_b;
  logic lo_a_vld, hi_a_vld, lo_b_vld, hi_b_vld;

  mda_unit #(.TREE(1'b0)) u_mda_a (
    .clk, .rst_n, .in_vld, .in_data,
    .lo(lo_a), .lo_vld(lo_a_vld), .hi(hi_a), .hi_vld(hi_a_vld)
  );

  mda_unit #(.TREE(1'b1)) u_mda_b (
    .clk, .rst_n, .in_vld, .in_data,
    .lo(lo_b), .lo_vld(lo_b_vld), .hi(hi_b), .hi_vld(hi_b_vld)
  );

  assign det0_vld = hi_a_vld;
  assign det0_a   = scale_sat(acc_t'(hi_a));
  assign det0_b   = scale_sat(acc_t'(hi_b));

  // ---- folded processing units ----
  logic  [N_PU:0] c_vld;
  data_t          c_a [N_PU+1];
  data_t          c_b [N_PU+1];
  logic  [N_PU-1:0] pu_apx_vld, pu_ovr;
  data_t          pu_apx_a [N_PU];
  data_t          pu_apx_b [N_PU];

  assign c_vld[0] = lo_a_vld;
  assign c_a[0]   = scale_sat(acc_t'(lo_a));
  assign c_b[0]   = scale_sat(acc_t'(lo_b));

  for (genvar k = 0; k < int'(N_PU); k++) begin : g_pu
    fold_stage #(.IDX(k + 1), .LW(LW)) u_pu (
      .clk, .rst_n, .fold4, .last_lvl,
      .in_vld(c_vld[k]), .in_a(c_a[k]), .in_b(c_b[k]),
      .out_vld(c_vld[k+1]), .out_a(c_a[k+1]), .out_b(c_b[k+1]),
      .det_vld(det_vld[k]), .det_lvl(det_lvl[k]), .det_a(det_a[k]), .det_b(det_b[k]),
      .apx_vld(pu_apx_vld[k]), .apx_a(pu_apx_a[k]), .apx_b(pu_apx_b[k]),
      .overrun(pu_ovr[k])
    );
  end

  // ---- approximation output: only the unit holding the last level fires ----
  always_comb begin
    apx_vld = |pu_apx_vld;
    apx_a   = '0;
    apx_b   = '0;
    for (int k = 0; k < int'(N_PU); k++) begin
      if (pu_apx_vld[k]) begin
        apx_a = apx_a | pu_apx_a[k];
        apx_b = apx_b | pu_apx_b[k];
      end
    end
  end

  assign overrun = |pu_ovr;

  logic unused_ok;
  assign unused_ok = ^{c_vld[N_PU], c_a[N_PU], c_b[N_PU], lo_b_vld, hi_b_vld};

endmodule
