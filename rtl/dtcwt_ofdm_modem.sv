// dtcwt_ofdm_modem: DTCWT OFDM modulator-demodulator.
//
// The transmit side is the inverse DTCWT modulator (idtcwt_modulator). Its
// two trees of synthesis stages merge 2*(NLVL+1) symbol streams into the
// real and imaginary modulated outputs. The receive side is the
// configurable 160 to 2560 subcarrier demodulator (dtcwt_ofdm_demod). An
// MDA first stage is followed by a chain of N_PU folded processing units.
// It splits the received signal back into the subcarrier (detail) streams
// of every level and the approximation stream of the last level.
//
// The two halves share only clock and reset. Each keeps its own ports:
//   mod_*   symbol streams in, modulated sample pair out, valid/ready;
//   the remaining ports are those of dtcwt_ofdm_demod (received samples in
//   at most once every four cycles, detail and approximation outputs out,
//   fold mode and subcarrier tap as static configuration).
// Timing is that of the two submodules. The modulated output is wider
// than the demodulator's sample input (17 against 8 bits). Closing the
// loop therefore needs a scaling step, which belongs to the channel model
// outside this module.
// Placing both transforms in one device follows the modem architecture;
// keeping the halves unconnected is this design's own choice.
module dtcwt_ofdm_modem
  import dtcwt_pkg::*;
#(
  parameter int unsigned N_PU   = 1280,
  parameter int unsigned LW     = 16,
  parameter int unsigned NS_TAB [5] = '{160, 320, 640, 1280, 2560},
  parameter int unsigned NLVL   = 7
) (
  input  logic                       clk,
  input  logic                       rst_n,
  // modulator
  input  logic [1:0][NLVL:0]         mod_sym_vld,
  output logic [1:0][NLVL:0]         mod_sym_rdy,
  input  logic signed [IN_W-1:0]     mod_sym [2][NLVL+1],
  output logic                       mod_out_vld,
  input  logic                       mod_out_rdy,
  output logic signed [DW:0]         mod_xr,
  output logic signed [DW:0]         mod_xi,
  // demodulator
  input  logic                       fold4,
  input  logic [2:0]                 ns_sel,
  input  logic                       in_vld,
  input  logic signed [IN_W-1:0]     in_data,
  output logic                       det0_vld,
  output data_t                      det0_a,
  output data_t                      det0_b,
  output logic [N_PU-1:0]            det_vld,
  output logic [LW-1:0]              det_lvl [N_PU],
  output data_t                      det_a [N_PU],
  output data_t                      det_b [N_PU],
  output logic                       apx_vld,
  output data_t                      apx_a,
  output data_t                      apx_b,
  output logic                       overrun
);

  idtcwt_modulator #(.NLVL(NLVL)) u_mod (
    .clk     (clk),
    .rst_n   (rst_n),
    .sym_vld (mod_sym_vld),
    .sym_rdy (mod_sym_rdy),
    .sym     (mod_sym),
    .out_vld (mod_out_vld),
    .out_rdy (mod_out_rdy),
    .xr      (mod_xr),
    .xi      (mod_xi)
  );

  dtcwt_ofdm_demod #(.N_PU(N_PU), .LW(LW), .NS_TAB(NS_TAB)) u_demod (
    .clk      (clk),
    .rst_n    (rst_n),
    .fold4    (fold4),
    .ns_sel   (ns_sel),
    .in_vld   (in_vld),
    .in_data  (in_data),
    .det0_vld (det0_vld),
    .det0_a   (det0_a),
    .det0_b   (det0_b),
    .det_vld  (det_vld),
    .det_lvl  (det_lvl),
    .det_a    (det_a),
    .det_b    (det_b),
    .apx_vld  (apx_vld),
    .apx_a    (apx_a),
    .apx_b    (apx_b),
    .overrun  (overrun)
  );

endmodule
