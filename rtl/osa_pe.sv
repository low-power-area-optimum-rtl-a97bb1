// osa_pe: processing element of the optimum systolic array.
//
// Each cycle the PE multiplies the coefficient arriving from the left (u)
// by the data term arriving from below (v) and adds the product to its
// accumulator register: y(i+1) = y(i) + u*v. The control input s0 steers
// the sum: s0 = 1 writes it back into the accumulator (partial sum), s0 = 0
// sends it to the output register and clears the accumulator for the next
// output. Two delay registers (DR) pass u and v on, one cycle later, to the
// neighbouring PE, and the control bits travel along with them so that a
// chain of PEs runs the same schedule one cycle apart.
//
// Timing: an input presented in cycle t reaches u_out/v_out at t+1; when
// s0 = 0 in cycle t the finished sum is on y_out, with y_vld high, at t+1.
// While vld_in is low the PE neither accumulates nor outputs.
// The multiply-accumulate structure follows the PE figure of the design;
// the valid qualifier and reset behaviour are this design's own choice.
module osa_pe
  import dtcwt_pkg::*;
#(
  parameter int unsigned UW  = CW,   // coefficient width
  parameter int unsigned VW  = TW,   // data term width
  parameter int unsigned ACW = AW    // accumulator width
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic signed [UW-1:0]  u_in,    // coefficient from the left
  input  logic signed [VW-1:0]  v_in,    // data term from below
  input  logic                  vld_in,  // u_in/v_in carry a term this cycle
  input  logic                  s0_in,   // 1: accumulate, 0: output the sum
  output logic signed [UW-1:0]  u_out,   // u delayed one cycle
  output logic signed [VW-1:0]  v_out,   // v delayed one cycle
  output logic                  vld_out, // vld delayed one cycle
  output logic                  s0_out,  // s0 delayed one cycle
  output logic signed [ACW-1:0] y_out,   // finished filter output
  output logic                  y_vld    // y_out valid (one-cycle pulse)
);

  logic signed [ACW-1:0] acc_q;
  logic signed [ACW-1:0] sum;

  always_comb sum = acc_q + (ACW'(u_in) * ACW'(v_in));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc_q   <= '0;
      y_out   <= '0;
      y_vld   <= 1'b0;
      u_out   <= '0;
      v_out   <= '0;
      vld_out <= 1'b0;
      s0_out  <= 1'b1;
    end else begin
      u_out   <= u_in;
      v_out   <= v_in;
      vld_out <= vld_in;
      s0_out  <= s0_in;
      y_vld   <= 1'b0;
      if (vld_in) begin
        if (s0_in) begin
          acc_q <= sum;
        end else begin
          y_out <= sum;
          y_vld <= 1'b1;
          acc_q <= '0;
        end
      end
    end
  end

endmodule
