// fold_unit: fold unit (FLU) of one tree in a folded processing unit.
//
// One compute unit is reused for two (fold by 2) or four (fold by 4)
// successive decomposition levels. The fold unit keeps one 10-sample
// register array per folded level (x for the first, then y, z and w), fed
// as follows:
//   - array x takes the samples arriving from the previous stage;
//   - array y (z, w) takes the low-pass outputs that the compute unit
//     produced for the level before it (the write-back demultiplexer Q);
//   - the low-pass output of the last folded level goes to the data
//     register, which forwards it to the next processing unit.
// Every second sample written into an array makes that level pending and
// captures the five pre-added terms w[p]+w[q] of the grouped filter in the
// level's intermediate register. When the controller issues a level, the
// multiplexer array picks that level's terms and streams them into the
// systolic array over the five following cycles. A level must be served
// before its next pair is complete.
//
// Interface and timing:
//   in_vld/in_data   new sample for array x
//   fold4            S1 select: 0 = fold by 2 (arrays x, y), 1 = fold by 4
//   pend[l]          level l has a new pair of samples
//   iss_vld/iss_lvl  issue level l in cycle t: osa_start is high in t+1
//                    and term carries terms 0..4 in cycles t+1..t+5
//   wb_vld/wb_lvl/wb_data  low-pass result of level wb_lvl
//   out_vld/out_data data register towards the next stage (one cycle after
//                    a write-back of the last folded level)
//   overrun          sticky: a level got a third sample before it was served
// The arrays, multiplexer array, demultiplexer and data register follow
// the fold-unit figures. The array depth of ten (one filter length per
// level), the pending flags and the term register are this design's own.
module fold_unit
  import dtcwt_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        fold4,
  input  logic        in_vld,
  input  data_t       in_data,
  output logic [MAXF-1:0] pend,
  input  logic        iss_vld,
  input  logic [1:0]  iss_lvl,
  output logic        osa_start,
  output term_t       term,
  input  logic        wb_vld,
  input  logic [1:0]  wb_lvl,
  input  data_t       wb_data,
  output logic        out_vld,
  output data_t       out_data,
  output logic        overrun
);

  data_t win [MAXF][NTAP];
  logic [MAXF-1:0] par_q;
  logic [1:0]  last_lvl;
  logic [MAXF-1:0] wr;
  data_t       wr_data [MAXF];

  assign last_lvl = fold4 ? 2'd3 : 2'd1;

  // ---- write-back demultiplexer (Q0..Q3) ----
  always_comb begin
    wr   = '0;
    wr[0] = in_vld;
    wr_data[0] = in_data;
    for (int l = 1; l < int'(MAXF); l++) wr_data[l] = wb_data;
    if (wb_vld && wb_lvl != last_lvl) wr[wb_lvl + 2'd1] = 1'b1;
  end

  // ---- register arrays, term snapshots and pending flags ----
  // When a write completes a pair, the five pre-added terms of the window
  // as it will be after the write are captured in the level's term register
  // (the intermediate register), so the array may keep shifting while the
  // level waits for the compute unit.
  term_t tsnap [MAXF][NTERM];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int l = 0; l < int'(MAXF); l++) begin
        for (int i = 0; i < int'(NTAP); i++) win[l][i] <= '0;
        for (int j = 0; j < int'(NTERM); j++) tsnap[l][j] <= '0;
      end
      par_q   <= '0;
      pend    <= '0;
      overrun <= 1'b0;
    end else begin
      for (int l = 0; l < int'(MAXF); l++) begin
        logic served, pair;
        data_t nw [NTAP];
        served = iss_vld && (iss_lvl == 2'(l));
        pair   = wr[l] && par_q[l];
        nw[0]  = wr_data[l];
        for (int i = 1; i < int'(NTAP); i++) nw[i] = win[l][i-1];
        if (wr[l]) begin
          for (int i = 0; i < int'(NTAP); i++) win[l][i] <= nw[i];
          par_q[l] <= ~par_q[l];
        end
        if (pair) begin
          for (int j = 0; j < int'(NTERM); j++)
            tsnap[l][j] <= TW'(nw[PAIR0[j]]) + TW'(nw[PAIR1[j]]);
        end
        if (pair && pend[l] && !served) overrun <= 1'b1;
        pend[l] <= (pend[l] && !served) || pair;
      end
    end
  end

  // ---- multiplexer array: stream the issued level's terms ----
  term_t tr [NTERM];
  logic [2:0] k_q;
  logic       act_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int j = 0; j < int'(NTERM); j++) tr[j] <= '0;
      k_q   <= '0;
      act_q <= 1'b0;
    end else begin
      if (iss_vld) begin
        for (int j = 0; j < int'(NTERM); j++) tr[j] <= tsnap[iss_lvl][j];
        k_q   <= '0;
        act_q <= 1'b1;
      end else if (act_q) begin
        k_q   <= k_q + 3'd1;
        act_q <= (k_q != 3'(NTERM - 1));
      end
    end
  end

  assign osa_start = act_q && (k_q == 3'd0);
  assign term      = act_q ? tr[k_q] : '0;

  // ---- data register towards the next stage ----
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_vld  <= 1'b0;
      out_data <= '0;
    end else begin
      out_vld <= wb_vld && (wb_lvl == last_lvl);
      if (wb_vld && (wb_lvl == last_lvl)) out_data <= wb_data;
    end
  end

  // A level may be issued only while it is pending, and at the earliest in
  // the cycle that streams the previous job's last term.
  a_issue_pending: assert property (@(posedge clk) disable iff (!rst_n)
                                    iss_vld |-> pend[iss_lvl] && (!act_q || k_q == 3'(NTERM - 1)));

endmodule
