// idtcwt_modulator: inverse DTCWT OFDM modulator for 2*(NLVL+1) symbol
// streams (16 streams for the seven-level structure).
//
// Each tree (real a, imaginary b) is a chain of NLVL synthesis stages. The
// first stage combines symbol streams 0 and 1 of its tree. Stage k (k >= 2)
// combines the output of stage k-1 with symbol stream k. The last stage uses
// the inverse first-stage filters; all others use the later-stage filters.
// Every stage doubles the sample rate. Symbol stream k of a tree therefore
// runs at 2^(k-1) times the rate of streams 0 and 1. The final outputs of
// the two trees are added and subtracted:
//   xr = ya + yb,   xi = ya - yb
//
// Interface and timing:
//   sym_vld/sym_rdy/sym[t][k]  symbol stream k of tree t (t = 0 real,
//                              t = 1 imaginary); 8-bit signed symbols with
//                              a valid/ready handshake
//   out_vld/out_rdy/xr/xi      modulated sample pair, DW+1 bits each
// The trees run independently and meet at the output, which fires when
// both have a sample. At full rate, one output per cycle is produced, and
// streams 0 and 1 are taken once every 2^NLVL cycles.
// The chain of stages, the symbol numbering, the filter sets and the
// crossed add/subtract at the output follow the seven-stage modulator
// figure. Which output carries the sum and which the difference is this
// design's own choice, as are the handshakes.
module idtcwt_modulator
  import dtcwt_pkg::*;
#(
  parameter int unsigned NLVL = 7
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic [1:0][NLVL:0]         sym_vld,
  output logic [1:0][NLVL:0]         sym_rdy,
  input  logic signed [IN_W-1:0]     sym [2][NLVL+1],
  output logic                       out_vld,
  input  logic                       out_rdy,
  output logic signed [DW:0]         xr,
  output logic signed [DW:0]         xi
);

  logic  y_vld [2];
  logic  y_rdy [2];
  data_t y     [2];

  // Each level keeps its own handshake signals, so the ready path that runs
  // backwards through the chain is a plain combinational chain.
  for (genvar t = 0; t < 2; t++) begin : g_tree
    for (genvar k = 0; k < NLVL; k++) begin : g_lvl
      logic  a_vld, a_rdy, s_vld, s_rdy;
      data_t a_in, s_out;
      if (k == 0) begin : g_first
        assign a_vld         = sym_vld[t][0];
        assign a_in          = data_t'(sym[t][0]);
        assign sym_rdy[t][0] = a_rdy;
      end else begin : g_chain
        assign a_vld = g_lvl[k-1].s_vld;
        assign a_in  = g_lvl[k-1].s_out;
      end
      if (k == NLVL - 1) begin : g_out
        assign s_rdy = y_rdy[t];
        assign y_vld[t] = s_vld;
        assign y[t]     = s_out;
      end else begin : g_next
        assign s_rdy = g_lvl[k+1].a_rdy;
      end

      idtcwt_stage #(.TREE(t), .LAST(k == NLVL - 1)) u_stage (
        .clk   (clk),
        .rst_n (rst_n),
        .a_vld (a_vld),
        .a_rdy (a_rdy),
        .a_in  (a_in),
        .d_vld (sym_vld[t][k+1]),
        .d_rdy (sym_rdy[t][k+1]),
        .d_in  (data_t'(sym[t][k+1])),
        .y_vld (s_vld),
        .y_rdy (s_rdy),
        .y_out (s_out)
      );
    end
  end

  // Output join of the two trees.
  assign out_vld  = y_vld[0] && y_vld[1];
  assign y_rdy[0] = out_rdy && y_vld[1];
  assign y_rdy[1] = out_rdy && y_vld[0];
  assign xr = (DW+1)'(y[0]) + (DW+1)'(y[1]);
  assign xi = (DW+1)'(y[0]) - (DW+1)'(y[1]);

endmodule
