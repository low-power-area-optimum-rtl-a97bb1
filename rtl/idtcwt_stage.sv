// idtcwt_stage: one synthesis (inverse DTCWT) level of one tree.
//
// The stage merges an approximation stream a and a detail stream d, both
// at rate r, into one stream y at rate 2r:
//   y[2n+p] = sum_k g0[2k+p]*a[n-k] + g1[2k+p]*d[n-k],  p = 0, 1, k = 0..4
// This is upsampling by two followed by the low-pass (g0) and high-pass
// (g1) synthesis filters and an adder. Every accepted (a, d) pair is
// shifted into a five-deep history of each stream. The even output is
// written in the cycle the pair is accepted. The odd output follows once
// the even one has been taken. Each sum is divided by 64 (the filter gain)
// and saturated to DW bits.
//
// Filters: an inner stage uses the later-stage inverse Q-shift filters with
// their approximated values (2, -6, 15, 44: the same integers as the
// forward later-stage filters). The output stage (LAST = 1) uses the inverse
// first-stage filters, which are the forward first-stage filters reversed
// in time. TREE selects the real (0) or imaginary (1) tree.
//
// Interface and timing (valid/ready, a transfer happens when both are high):
//   a_vld/a_rdy/a_in, d_vld/d_rdy/d_in  inputs, taken together as one pair
//   y_vld/y_rdy/y_out                  output register
// At most one pair every two cycles, and up to one output per cycle. With
// the output always ready, the stage takes a pair every second cycle and
// the even output appears one cycle after the pair is taken.
// The filter values come from the coefficient table of the design. The
// valid/ready handshake, the polyphase form and the rounding by shifting
// are this design's own.
module idtcwt_stage
  import dtcwt_pkg::*;
#(
  parameter int unsigned TREE = 0,
  parameter bit          LAST = 1'b0
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  a_vld,
  output logic  a_rdy,
  input  data_t a_in,
  input  logic  d_vld,
  output logic  d_rdy,
  input  data_t d_in,
  output logic  y_vld,
  input  logic  y_rdy,
  output data_t y_out
);

  // Inverse first-stage filters, index [filter][n]: low a, high a, low b,
  // high b.
  localparam int INS1 [4][NTAP] = '{
    '{ 0,  1,  1, -6,   6, 45, 45,  6, -6, 0},
    '{ 0, -6, -6, 45, -45,  6,  6,  1, -1, 0},
    '{ 0,  0, -6,  6,  45, 45,  6, -6,  1, 1},
    '{-1,  1,  6,  6, -45, 45, -6, -6,  0, 0}
  };
  // Inverse later-stage filters with the approximated values.
  localparam int INS2 [4][NTAP] = '{
    '{ 2, 0, -6, 15,  44,  44,  0, -6, 0,  0},
    '{ 0, 0, -6,  0,  44, -44, 15,  6, 0, -2},
    '{ 0, 0, -6,  0,  44,  44, 15, -6, 0,  2},
    '{-2, 0,  6, 15, -44,  44,  0, -6, 0,  0}
  };

  localparam int NH = NTAP / 2;

  function automatic int coef(input logic f, input logic [3:0] n);
    return LAST ? INS1[2*TREE+int'(f)][n] : INS2[2*TREE+int'(f)][n];
  endfunction

  data_t ha [NH];
  data_t hd [NH];
  data_t na [NH];
  data_t nd [NH];
  logic  odd_pend;
  logic  in_rdy, fire;
  acc_t  even_sum, odd_sum;

  assign in_rdy = !odd_pend && (!y_vld || y_rdy);
  assign fire   = a_vld && d_vld && in_rdy;
  assign a_rdy  = in_rdy && d_vld;
  assign d_rdy  = in_rdy && a_vld;

  // History after shifting in the offered pair.
  always_comb begin
    na[0] = a_in;
    nd[0] = d_in;
    for (int k = 1; k < NH; k++) begin
      na[k] = ha[k-1];
      nd[k] = hd[k-1];
    end
  end

  // Even phase on the new history, odd phase on the stored one.
  always_comb begin
    even_sum = '0;
    odd_sum  = '0;
    for (int k = 0; k < NH; k++) begin
      even_sum += acc_t'(coef(1'b0, 4'(2*k))) * acc_t'(na[k])
                + acc_t'(coef(1'b1, 4'(2*k))) * acc_t'(nd[k]);
      odd_sum  += acc_t'(coef(1'b0, 4'(2*k+1))) * acc_t'(ha[k])
                + acc_t'(coef(1'b1, 4'(2*k+1))) * acc_t'(hd[k]);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < NH; k++) begin
        ha[k] <= '0;
        hd[k] <= '0;
      end
      y_vld    <= 1'b0;
      y_out    <= '0;
      odd_pend <= 1'b0;
    end else if (fire) begin
      ha       <= na;
      hd       <= nd;
      y_out    <= scale_sat(even_sum);
      y_vld    <= 1'b1;
      odd_pend <= 1'b1;
    end else if (y_vld && y_rdy) begin
      if (odd_pend) begin
        y_out    <= scale_sat(odd_sum);
        odd_pend <= 1'b0;
      end else begin
        y_vld    <= 1'b0;
      end
    end
  end

  // A pair is never taken while the odd output is still owed.
  a_no_drop: assert property (@(posedge clk) disable iff (!rst_n)
                              fire |-> !odd_pend);

endmodule
