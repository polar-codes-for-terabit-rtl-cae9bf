// tb_polar_tbps_top: end-to-end test of the two-lane core on a (256, 200)
// code (a shorter code of about the same rate as the default (1024, 854),
// with every leaf type present) at the default MERGE = 4. The test itself is
// in tb_top_body.svh.
module tb_polar_tbps_top;
  import polar_ref_pkg::*;
  localparam int unsigned TB_N = 256, TB_K = 200, TB_NUM_DEC = 2, TB_MERGE = 4;
  localparam int unsigned TB_FRAMES = 300, TB_WATCHDOG = 5000;

  polar_tbps_top #(.N(TB_N), .K(TB_K)) dut (
    .clk, .rst_n, .in_valid, .in_llr, .out_valid, .out_info, .out_u
  );

`include "tb_top_body.svh"

endmodule
