// tb_idtcwt_modulator: self-checking test of the inverse DTCWT modulator
// with seven synthesis levels per tree (16 symbol streams).
//
// Random 8-bit symbols drive all 16 streams. Streams 0 and 1 of a tree
// carry six symbols. Stream k carries 6 * 2^(k-1). The expected output is
// computed here in direct form: insert a zero after every sample, convolve
// with the ten-tap synthesis filters, add the two branches, divide by 64
// and saturate. The tree outputs are then added and subtracted.
//
// Phase 1 runs at full rate: every stream always offers data and the
// output is always ready. It checks that the outputs come out on
// consecutive cycles once the first has appeared.
// Phase 2 withholds symbols and output-ready at random. It counts the
// stalls it caused and fails if none happened.
// A watchdog ends the run with a failure if it stalls.
module tb_idtcwt_modulator;
  import dtcwt_pkg::*;

  localparam int NLVL = 7;
  logic clk = 1'b0;
  logic rst_n;
  logic [1:0][NLVL:0] sym_vld, sym_rdy;
  logic signed [IN_W-1:0] sym [2][NLVL+1];
  logic out_vld, out_rdy;
  logic signed [DW:0] xr, xi;

  idtcwt_modulator #(.NLVL(NLVL)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  `include "mod_check.svh"

  initial begin
    mod_test();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
