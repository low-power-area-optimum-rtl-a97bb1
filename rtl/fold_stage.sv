// fold_stage: one processing unit of the folded pipelined DTCWT demodulator.
//
// A processing unit holds two fold units (real tree a and imaginary tree b)
// and one optimum systolic array. The systolic array computes, for one
// decomposition level at a time, the low-pass and high-pass outputs of both
// trees from the level's register arrays. Reusing it for two successive
// levels (fold by 2) or four (fold by 4) lets one unit stand for two or four
// stages of the unfolded decomposition chain.
//
// Control: when a level is pending in both trees and the array can take a
// job, the lowest pending level is issued (it receives data fastest). A job
// streams five terms, so a new job may be issued every five cycles; its
// results leave the array six to eight cycles after the issue, tagged with
// the job's level. The results are
//   - low-pass, tree a and b: scaled (>>6, saturated) and written back into
//     the next level's register array, or, for the last folded level, sent
//     through the data register to the next unit, or, when the level is the
//     configured last level (last_lvl), sent to the approximation output;
//   - high-pass, tree a and b: scaled and sent to the detail output together
//     with the global level number: these are demodulated subcarriers.
// Global level numbering: level 1 is the MDA first stage; unit IDX covers
// levels (IDX-1)*F+2 .. IDX*F+1 for fold factor F.
//
// Interface: in_vld/in_a/in_b from the previous unit (at most one sample
// every eight cycles); out_* to the next unit; det_* detail
// outputs; apx_* approximation output; overrun if a level was overwritten
// before it was served (the input rate was too high).
// The division into fold units and compute unit follows the block diagram
// of the folded demodulator; the scheduling and scaling are this design's
// own choices.
module fold_stage
  import dtcwt_pkg::*;
#(
  parameter int unsigned IDX = 1,   // position in the chain, 1-based
  parameter int unsigned LW  = 16   // width of level numbers
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          fold4,      // S1: 0 = fold by 2, 1 = fold by 4
  input  logic [LW-1:0] last_lvl,   // deepest level (number of subcarrier levels)
  input  logic          in_vld,
  input  data_t         in_a,
  input  data_t         in_b,
  output logic          out_vld,
  output data_t         out_a,
  output data_t         out_b,
  output logic          det_vld,
  output logic [LW-1:0] det_lvl,
  output data_t         det_a,
  output data_t         det_b,
  output logic          apx_vld,
  output data_t         apx_a,
  output data_t         apx_b,
  output logic          overrun
);

  logic [MAXF-1:0] pend_a, pend_b, pend_both;
  logic        iss_vld;
  logic [1:0]  iss_lvl;
  logic        start_a, start_b;
  term_t       term_a, term_b;
  logic        wb_a_vld, wb_b_vld;
  data_t       wb_a, wb_b;
  logic        out_a_vld, out_b_vld;
  logic        ovr_a, ovr_b;

  acc_t y_a0, y_a1, y_b0, y_b1;
  logic y_a0_vld, y_a1_vld, y_b0_vld, y_b1_vld;
  logic osa_busy;

  // ---- controller ----
  // A job streams its five terms in the five cycles after the issue, so a
  // new level can be issued every five cycles. The level of each job in
  // flight travels down lvl_sr to tag its results: lvl_sr[k-1] holds, in
  // cycle t+k, the level issued in cycle t.
  logic [2:0]    gap_q;
  logic [1:0]    lvl_sr [8];
  logic [LW-1:0] base_lvl;
  logic [1:0]    lvl_a0, lvl_b0, lvl_b1;

  assign base_lvl  = LW'((IDX - 1) << (fold4 ? 2 : 1)) + LW'(2);
  assign pend_both = pend_a & pend_b;
  assign lvl_a0    = lvl_sr[5];   // PE0 output, cycle t+6
  assign lvl_b0    = lvl_sr[6];   // PE1/PE3 outputs, cycle t+7
  assign lvl_b1    = lvl_sr[7];   // PE2 output, cycle t+8

  always_comb begin
    iss_vld = 1'b0;
    iss_lvl = '0;
    if (gap_q == '0) begin
      for (int l = int'(MAXF) - 1; l >= 0; l--) begin
        if (pend_both[l]) begin
          iss_vld = 1'b1;
          iss_lvl = 2'(l);
        end
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      gap_q <= '0;
      for (int i = 0; i < 8; i++) lvl_sr[i] <= '0;
    end else begin
      if (iss_vld)         gap_q <= 3'(NTERM - 1);
      else if (gap_q != 0) gap_q <= gap_q - 3'd1;
      lvl_sr[0] <= iss_lvl;
      for (int i = 1; i < 8; i++) lvl_sr[i] <= lvl_sr[i-1];
    end
  end

  // ---- fold units ----
  fold_unit u_flu_a (
    .clk, .rst_n, .fold4,
    .in_vld, .in_data(in_a), .pend(pend_a),
    .iss_vld, .iss_lvl, .osa_start(start_a), .term(term_a),
    .wb_vld(wb_a_vld), .wb_lvl(lvl_a0), .wb_data(wb_a),
    .out_vld(out_a_vld), .out_data(out_a), .overrun(ovr_a)
  );

  fold_unit u_flu_b (
    .clk, .rst_n, .fold4,
    .in_vld, .in_data(in_b), .pend(pend_b),
    .iss_vld, .iss_lvl, .osa_start(start_b), .term(term_b),
    .wb_vld(wb_b_vld), .wb_lvl(lvl_b0), .wb_data(wb_b),
    .out_vld(out_b_vld), .out_data(out_b), .overrun(ovr_b)
  );

  // ---- compute unit ----
  osa_array u_osa (
    .clk, .rst_n,
    .start(start_a), .b_in(term_a), .c_in(term_b),
    .y_a0, .y_a0_vld, .y_a1, .y_a1_vld,
    .y_b0, .y_b0_vld, .y_b1, .y_b1_vld,
    .busy(osa_busy)
  );

  // ---- result routing ----
  logic last_a0, last_b0;
  assign last_a0 = (base_lvl + LW'(lvl_a0)) == last_lvl;
  assign last_b0 = (base_lvl + LW'(lvl_b0)) == last_lvl;

  always_comb begin
    wb_a     = scale_sat(y_a0);
    wb_b     = scale_sat(y_b0);
    wb_a_vld = y_a0_vld && !last_a0;
    wb_b_vld = y_b0_vld && !last_b0;
  end

  // tree b lags tree a by one cycle; the tree a results wait for it
  data_t det_a_q, apx_a_q;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      det_a_q <= '0;
      apx_a_q <= '0;
      det_vld <= 1'b0;
      det_lvl <= '0;
      det_a   <= '0;
      det_b   <= '0;
      apx_vld <= 1'b0;
      apx_a   <= '0;
      apx_b   <= '0;
      out_vld <= 1'b0;
    end else begin
      if (y_a1_vld) det_a_q <= scale_sat(y_a1);
      if (y_a0_vld) apx_a_q <= scale_sat(y_a0);
      det_vld <= y_b1_vld;
      if (y_b1_vld) begin
        det_lvl <= base_lvl + LW'(lvl_b1);
        det_a   <= det_a_q;
        det_b   <= scale_sat(y_b1);
      end
      apx_vld <= y_b0_vld && last_b0;
      if (y_b0_vld && last_b0) begin
        apx_a <= apx_a_q;
        apx_b <= scale_sat(y_b0);
      end
      out_vld <= out_b_vld;
    end
  end

  assign overrun = ovr_a | ovr_b;

  logic unused_ok;
  assign unused_ok = ^{start_b, out_a_vld, osa_busy};

endmodule
