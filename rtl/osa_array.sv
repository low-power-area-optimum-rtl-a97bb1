// osa_array: optimum systolic array (OSA) of four processing elements.
//
// Computes four 10-tap filter outputs, two for the real tree and two for the
// imaginary tree, from five pre-added data terms per tree:
//   PE0: y0 = sum_j V0[j] * b[j]    (real tree, first filter)
//   PE1: y1 = sum_j V1[j] * b[j]    (real tree, second filter)
//   PE3: y3 = sum_j V0[j] * c[j]    (imaginary tree, first filter)
//   PE2: y2 = sum_j V2[j] * c[j]    (imaginary tree, second filter)
// Data and coefficients move systolically, as in the array figure: the
// b terms enter PE0 and reach PE1 through PE0's delay register; the a^0
// coefficient stream enters PE0 and reaches PE3 through the same PE; the c
// terms enter PE3 one cycle late (a leading zero) and reach PE2 through
// PE3. The a^1 stream is fed to PE1 one cycle late and the a^2 stream to
// PE2 two cycles late, so each PE sees its coefficient and its data term
// together. During idle cycles the coefficient inputs are zero.
//
// Interface: pulse start in the cycle the first terms b[0]/c[0] are on
// b_in/c_in, then present b[1..4]/c[1..4] in the four following cycles.
// A new job may start in the cycle after the last term.
// Timing (start in cycle 1): y_a0 in cycle 5, y_a1 and y_b0 in cycle 6,
// y_b1 in cycle 7, i.e. a latency of five cycles as in the array's data
// flow table. Each output is a full-precision sum, not yet scaled.
module osa_array
  import dtcwt_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  start,       // first term of a job on b_in/c_in
  input  term_t b_in,        // real-tree pre-added term
  input  term_t c_in,        // imaginary-tree pre-added term
  output acc_t  y_a0,        // PE0 output: real tree, first filter
  output logic  y_a0_vld,
  output acc_t  y_a1,        // PE1 output: real tree, second filter
  output logic  y_a1_vld,
  output acc_t  y_b0,        // PE3 output: imaginary tree, first filter
  output logic  y_b0_vld,
  output acc_t  y_b1,        // PE2 output: imaginary tree, second filter
  output logic  y_b1_vld,
  output logic  busy         // a job is being streamed in
);

  // ---- term sequencer (drives the S0 control and coefficient streams) ----
  logic       act_q;
  logic [2:0] k_q;
  logic       cur_vld;
  logic [2:0] cur_k;
  logic       cur_s0;

  always_comb begin
    cur_vld = start | act_q;
    cur_k   = start ? 3'd0 : k_q;
    cur_s0  = (cur_k != 3'(NTERM - 1));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      act_q <= 1'b0;
      k_q   <= '0;
    end else if (cur_vld) begin
      act_q <= cur_s0;
      k_q   <= cur_k + 3'd1;
    end
  end

  assign busy = act_q;

  // ---- coefficient streams ----
  coef_t a0_cur, a1_cur, a2_cur;
  coef_t a1_d1, a2_d1, a2_d2;
  term_t c_d1;

  always_comb begin
    a0_cur = '0;
    a1_cur = '0;
    a2_cur = '0;
    if (cur_vld) begin
      a0_cur = coef_t'(OSA_V0[cur_k]);
      a1_cur = coef_t'(OSA_V1[cur_k]);
      a2_cur = coef_t'(OSA_V2[cur_k]);
    end
  end

  // a^1 gets one appended zero, a^2 two, c one (alignment with the data flow)
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      a1_d1 <= '0;
      a2_d1 <= '0;
      a2_d2 <= '0;
      c_d1  <= '0;
    end else begin
      a1_d1 <= a1_cur;
      a2_d1 <= a2_cur;
      a2_d2 <= a2_d1;
      c_d1  <= c_in;
    end
  end

  // ---- the four PEs ----
  coef_t u0_o, u1_o, u2_o, u3_o;
  term_t v0_o, v1_o, v2_o, v3_o;
  logic  vld0_o, vld1_o, vld2_o, vld3_o;
  logic  s00_o, s01_o, s02_o, s03_o;

  osa_pe u_pe0 (
    .clk, .rst_n,
    .u_in(a0_cur), .v_in(b_in), .vld_in(cur_vld), .s0_in(cur_s0),
    .u_out(u0_o), .v_out(v0_o), .vld_out(vld0_o), .s0_out(s00_o),
    .y_out(y_a0), .y_vld(y_a0_vld)
  );

  osa_pe u_pe1 (
    .clk, .rst_n,
    .u_in(a1_d1), .v_in(v0_o), .vld_in(vld0_o), .s0_in(s00_o),
    .u_out(u1_o), .v_out(v1_o), .vld_out(vld1_o), .s0_out(s01_o),
    .y_out(y_a1), .y_vld(y_a1_vld)
  );

  osa_pe u_pe3 (
    .clk, .rst_n,
    .u_in(u0_o), .v_in(c_d1), .vld_in(vld0_o), .s0_in(s00_o),
    .u_out(u3_o), .v_out(v3_o), .vld_out(vld3_o), .s0_out(s03_o),
    .y_out(y_b0), .y_vld(y_b0_vld)
  );

  osa_pe u_pe2 (
    .clk, .rst_n,
    .u_in(a2_d2), .v_in(v3_o), .vld_in(vld3_o), .s0_in(s03_o),
    .u_out(u2_o), .v_out(v2_o), .vld_out(vld2_o), .s0_out(s02_o),
    .y_out(y_b1), .y_vld(y_b1_vld)
  );

  // The last PE of each column has no right-hand neighbour.
  logic unused_ok;
  assign unused_ok = ^{u1_o, v1_o, vld1_o, s01_o, u2_o, v2_o, vld2_o, s02_o, u3_o};

  // A job must not start while the previous one is still being streamed.
  a_no_overlap: assert property (@(posedge clk) disable iff (!rst_n) start |-> !act_q);

endmodule
