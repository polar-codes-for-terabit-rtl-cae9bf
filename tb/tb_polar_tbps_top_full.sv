// tb_polar_tbps_top_full: the two-lane core at its default parameters, the
// (1024, 854) code with N_MJL = 8, N_LIM = 32, 5-to-1 bit quantisation and
// MERGE = 4, decoding a short stream of frames in both lanes. The test
// itself is in tb_top_body.svh.
module tb_polar_tbps_top_full;
  import polar_ref_pkg::*;
  localparam int unsigned TB_N = 1024, TB_K = 854, TB_NUM_DEC = 2, TB_MERGE = 4;
  localparam int unsigned TB_FRAMES = 60, TB_WATCHDOG = 2000;

  polar_tbps_top dut (
    .clk, .rst_n, .in_valid, .in_llr, .out_valid, .out_info, .out_u
  );

`include "tb_top_body.svh"

endmodule
