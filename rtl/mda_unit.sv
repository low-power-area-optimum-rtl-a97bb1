// mda_unit: first DTCWT decomposition level of one tree, built with modified
// distributed arithmetic (MDA): no multipliers, one 8-entry look-up table.
//
// Every first-level filter has only three distinct coefficient magnitudes
// (45, 6 and 1, after scaling by 64). Grouping the window samples that share
// a magnitude turns each 10-tap filter into three pre-added terms:
//   tree a low  :  45(w3+w4) - 6((w1-w2)-(w5-w6)) + (w7+w8)
//   tree a high : -[45(w5-w6) - 6((w3+w4)-(w7+w8)) + (w1-w2)]
//   tree b low  :  45(w4+w5) - 6((w2-w3)-(w6-w7)) + (w0+w1)
//   tree b high :  45(w4-w5) - 6((w2+w3)-(w6+w7)) + (w8-w9)
// (w[0] newest sample). A two-stage adder array forms the three terms of
// both filters into intermediate registers. Each bit position of the three
// terms forms a 3-bit LUT address; the LUT holds the subset sums of
// {45, -6, 1}, so LUT(addr) = 45*addr[2] - 6*addr[1] + addr[0]. The output
// is the shift-and-add of the LUT words over all bit planes, with the sign
// plane subtracted (two's complement). The same LUT serves the low-pass
// filter in one cycle and the high-pass filter in the next: a multiplexer
// in front of the LUT switches between the two address sets.
//
// Interface: one signed sample per cycle at most (in_vld). Every second
// sample triggers one low-pass and one high-pass output (decimation by 2).
// Timing: for the sample that completes a pair in cycle t, lo is valid in
// cycle t+4 and hi in cycle t+5. With a sample every cycle the output that
// first covers ten samples is written on the 13th clock edge.
// The filters and the LUT scheme follow the design; the bit-parallel LUT
// read (one LUT copy per bit plane) and the alternate-cycle sharing of the
// LUT in place of use on both clock edges are this design's own choices.
module mda_unit
  import dtcwt_pkg::*;
#(
  parameter bit          TREE = 1'b0,   // 0: tree a (real), 1: tree b (imaginary)
  parameter int unsigned IW   = IN_W,   // input sample width
  parameter int unsigned OW   = 18      // output width (full precision)
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_vld,
  input  logic signed [IW-1:0] in_data,
  output logic signed [OW-1:0] lo,       // low-pass output
  output logic                 lo_vld,
  output logic signed [OW-1:0] hi,       // high-pass output
  output logic                 hi_vld
);

  localparam int unsigned W1 = IW + 1;   // two-sample sums
  localparam int unsigned W2 = IW + 2;   // four-sample sums (DA bit planes)

  typedef logic signed [W2-1:0] dterm_t;

  // ---- register array (10 samples) ----
  logic signed [IW-1:0] w [NTAP];
  logic                 par_q;   // one sample of the current pair held
  logic                 fire1;   // window complete, load stage 1

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < NTAP; i++) w[i] <= '0;
      par_q <= 1'b0;
      fire1 <= 1'b0;
    end else begin
      fire1 <= in_vld & par_q;
      if (in_vld) begin
        w[0] <= in_data;
        for (int i = 1; i < NTAP; i++) w[i] <= w[i-1];
        par_q <= ~par_q;
      end
    end
  end

  // ---- adder stage 1: sums and differences of sample pairs ----
  // Six pair results per tree: index meaning differs per tree (see below).
  logic signed [W1-1:0] p [6];
  logic                 fire2;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < 6; i++) p[i] <= '0;
      fire2 <= 1'b0;
    end else begin
      fire2 <= fire1;
      if (fire1) begin
        if (!TREE) begin
          p[0] <= W1'(w[3]) + W1'(w[4]);   // P  (low)
          p[1] <= W1'(w[1]) - W1'(w[2]);   // R' (high), part of Q (low)
          p[2] <= W1'(w[5]) - W1'(w[6]);   // P' (high), part of Q (low)
          p[3] <= W1'(w[7]) + W1'(w[8]);   // R  (low), part of Q' (high)
          p[4] <= '0;
          p[5] <= '0;
        end else begin
          p[0] <= W1'(w[4]) + W1'(w[5]);   // P  (low)
          p[1] <= W1'(w[2]) - W1'(w[3]);   // part of Q (low)
          p[2] <= W1'(w[6]) - W1'(w[7]);   // part of Q (low)
          p[3] <= W1'(w[0]) + W1'(w[1]);   // R  (low)
          p[4] <= W1'(w[4]) - W1'(w[5]);   // P' (high)
          p[5] <= W1'(w[8]) - W1'(w[9]);   // R' (high)
        end
      end
    end
  end

  // Tree b high needs (w2+w3)-(w6+w7): built from stage-1 pairs of tree b
  // in a separate register because its pair sums differ from the low set.
  logic signed [W1-1:0] s23, s67;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s23 <= '0;
      s67 <= '0;
    end else if (fire1) begin
      s23 <= TREE ? W1'(w[2]) + W1'(w[3]) : '0;
      s67 <= TREE ? W1'(w[6]) + W1'(w[7]) : '0;
    end
  end

  // ---- adder stage 2: the three LUT terms of each filter ----
  dterm_t tl [3];   // low-pass terms  {P, Q, R}
  dterm_t th [3];   // high-pass terms {P', Q', R'}
  logic   fire3;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < 3; i++) begin
        tl[i] <= '0;
        th[i] <= '0;
      end
      fire3 <= 1'b0;
    end else begin
      fire3 <= fire2;
      if (fire2) begin
        if (!TREE) begin
          tl[0] <= W2'(p[0]);
          tl[1] <= W2'(p[1]) - W2'(p[2]);
          tl[2] <= W2'(p[3]);
          th[0] <= W2'(p[2]);
          th[1] <= W2'(p[0]) - W2'(p[3]);
          th[2] <= W2'(p[1]);
        end else begin
          tl[0] <= W2'(p[0]);
          tl[1] <= W2'(p[1]) - W2'(p[2]);
          tl[2] <= W2'(p[3]);
          th[0] <= W2'(p[4]);
          th[1] <= W2'(s23) - W2'(s67);
          th[2] <= W2'(p[5]);
        end
      end
    end
  end

  // ---- LUT of depth 8 ----
  function automatic logic signed [8:0] lut(input logic [2:0] ad);
    logic signed [8:0] v;
    v = (ad[2] ? 9'(C_P) : 9'sd0) + (ad[1] ? 9'(C_Q) : 9'sd0) + (ad[0] ? 9'(C_R) : 9'sd0);
    return v;
  endfunction

  // ---- multiplexer, LUT read of every bit plane, shift-and-add ----
  logic   ph_hi;      // 0: low-pass address set, 1: high-pass address set
  dterm_t sel [3];
  logic signed [OW-1:0] da_sum;

  always_comb begin
    for (int i = 0; i < 3; i++) sel[i] = ph_hi ? th[i] : tl[i];
    da_sum = '0;
    for (int b = 0; b < int'(W2); b++) begin
      if (b == int'(W2) - 1)
        da_sum = da_sum - (OW'(lut({sel[0][b], sel[1][b], sel[2][b]})) <<< b);
      else
        da_sum = da_sum + (OW'(lut({sel[0][b], sel[1][b], sel[2][b]})) <<< b);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ph_hi  <= 1'b0;
      lo     <= '0;
      hi     <= '0;
      lo_vld <= 1'b0;
      hi_vld <= 1'b0;
    end else begin
      lo_vld <= 1'b0;
      hi_vld <= 1'b0;
      ph_hi  <= 1'b0;
      if (fire3 && !ph_hi) begin
        lo     <= da_sum;
        lo_vld <= 1'b1;
        ph_hi  <= 1'b1;
      end else if (ph_hi) begin
        hi     <= TREE ? da_sum : -da_sum;
        hi_vld <= 1'b1;
      end
    end
  end

endmodule
