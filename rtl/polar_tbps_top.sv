// polar_tbps_top: Tb/s polar decoding core made of NUM_DEC identical,
// spatially parallel SC-MJL decoders.
//
// Each lane is an independent, fully pipelined sc_mjl_decoder that accepts
// one frame of N channel LLRs per clock, so the core decodes NUM_DEC frames
// per clock: throughput = NUM_DEC * K * f_clk (two lanes of the (1024, 854)
// code give 1708 information bits per clock, about 1 Tb/s at 585.5 MHz).
// The lanes share the clock and reset and nothing else; each has its own
// valid flag. Latency per lane: LATENCY clocks (see sc_mjl_decoder).
//
// Two parallel decoders and the code parameters follow the scaled
// terabit configuration; everything else is as in sc_mjl_decoder.
module polar_tbps_top
  import polar_pkg::*;
#(
  parameter int unsigned NUM_DEC = 2,
  parameter int unsigned N       = 1024,
  parameter int unsigned K       = 854,
  parameter mask_t       FROZEN  = pw_frozen(log2c(N), K),
  parameter int unsigned N_MJL   = 8,
  parameter int unsigned N_LIM   = 32,
  parameter int unsigned Q_CH    = 5,
  parameter int unsigned Q_MIN   = 1,
  parameter int unsigned MERGE   = 4
) (
  input  logic                                clk,
  input  logic                                rst_n,
  input  logic [NUM_DEC-1:0]                  in_valid,
  input  logic [NUM_DEC-1:0][N-1:0][Q_CH-1:0] in_llr,
  output logic [NUM_DEC-1:0]                  out_valid,
  output logic [NUM_DEC-1:0][K-1:0]           out_info,
  output logic [NUM_DEC-1:0][N-1:0]           out_u
);

  for (genvar d = 0; d < NUM_DEC; d++) begin : g_lane
    sc_mjl_decoder #(
      .N(N), .K(K), .FROZEN(FROZEN), .N_MJL(N_MJL), .N_LIM(N_LIM),
      .Q_CH(Q_CH), .Q_MIN(Q_MIN), .MERGE(MERGE)
    ) u_dec (
      .clk,
      .rst_n,
      .in_valid (in_valid[d]),
      .in_llr   (in_llr[d]),
      .out_valid(out_valid[d]),
      .out_info (out_info[d]),
      .out_u    (out_u[d])
    );
  end

endmodule
