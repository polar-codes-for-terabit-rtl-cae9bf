// sc_mjl_decoder: unrolled, fully pipelined SC-MJL polar decoder.
//
// Successive-cancellation decoding of an (N, K) polar code in which every
// subtree whose frozen pattern is a simple constituent code is cut off and
// decoded in one stage: rate-0 and rate-1 blocks, repetition blocks (MAP
// decoder) and single-parity-check blocks (Wagner decoder) up to N_LIM bits,
// and every remaining block of N_MJL bits (MJL decoder). The whole decoding
// tree is unrolled into a pipeline (sc_node, recursively), so one frame of N
// channel LLRs is accepted on every clock and one frame of K decoded
// information bits leaves on every clock: throughput = K * f_clk.
//
// Quantisation: channel LLRs are Q_CH-bit {mag, sign} words (see polar_pkg);
// the width falls towards the leaves, reaching Q_MIN bits at the N_MJL
// blocks (5-to-1 bit by default).
//
// Register balancing: the tree has T stages (T = 2*(internal nodes) +
// (leaves)); only every MERGE-th carries a register. With an input register
// and an output register added here, the latency is
//   LATENCY = 2 + floor(T / MERGE) clocks.
//
// Interface: in_valid/in_llr are sampled each clock; out_valid/out_info
// (information bits in increasing u index) and out_u (all N decoded u bits,
// frozen ones zero) follow LATENCY clocks later. There is no back-pressure.
// rst_n (active low, synchronous) clears only the valid pipeline. The root
// node's codeword estimate (x_hat) is not needed and stays unconnected;
// the frozen positions of out_u are constant zero.
//
// Defaults follow the (1024, 854) code with N_MJL = 8, N_LIM = 32 and 5-to-1
// bit quantisation. The frozen set (polarisation-weight construction), the
// quantisation schedule and MERGE = 4 are this design's choices.
module sc_mjl_decoder
  import polar_pkg::*;
#(
  parameter int unsigned N     = 1024,
  parameter int unsigned K     = 854,
  parameter mask_t       FROZEN = pw_frozen(log2c(N), K),
  parameter int unsigned N_MJL = 8,
  parameter int unsigned N_LIM = 32,
  parameter int unsigned Q_CH  = 5,
  parameter int unsigned Q_MIN = 1,
  parameter int unsigned MERGE = 4,
  // derived, not meant to be overridden
  localparam int unsigned LG      = log2c(N),
  localparam int unsigned T       = node_stages(FROZEN, 0, N, N_MJL, N_LIM),
  localparam int unsigned LATENCY = 2 + nreg(0, T, MERGE)
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  input  logic [N-1:0][Q_CH-1:0] in_llr,
  output logic                 out_valid,
  output logic [K-1:0]         out_info,
  output logic [N-1:0]         out_u
);

  function automatic int unsigned count_info();
    int unsigned c;
    c = 0;
    for (int unsigned i = 0; i < N; i++) c += int'(!FROZEN[i]);
    return c;
  endfunction

  if (count_info() != K) begin : g_bad_mask
    $error("sc_mjl_decoder: FROZEN leaves %0d information bits, K = %0d", count_info(), K);
  end
  if (N < N_MJL || N > NMAX || N != (32'd1 << LG)) begin : g_bad_n
    $error("sc_mjl_decoder: N = %0d must be a power of two in [N_MJL, NMAX]", N);
  end

  logic [N-1:0][Q_CH-1:0] llr_q;
  logic [N-1:0]           x_hat, u_hat;
  logic [LATENCY-1:0]     vpipe;
  logic [K-1:0]           info_c;

  always_ff @(posedge clk) llr_q <= in_llr;

  always_ff @(posedge clk) begin
    if (!rst_n) vpipe <= '0;
    else        vpipe <= {vpipe[LATENCY-2:0], in_valid};
  end
  assign out_valid = vpipe[LATENCY-1];

  sc_node #(
    .SIZE(N), .OFF(0), .FZ(FROZEN), .START(0), .MERGE(MERGE), .N_MJL(N_MJL), .N_LIM(N_LIM),
    .LG_ROOT(LG), .Q_CH(Q_CH), .Q_MIN(Q_MIN)
  ) u_root (
    .clk, .alpha(llr_q), .x_out(x_hat), .u_out(u_hat)
  );

  // gather the information bits in increasing index order
  always_comb begin
    int unsigned k;
    k      = 0;
    info_c = '0;
    for (int unsigned i = 0; i < N; i++) begin
      if (!FROZEN[i]) begin
        info_c[k] = u_hat[i];
        k++;
      end
    end
  end

  always_ff @(posedge clk) begin
    out_info <= info_c;
    out_u    <= u_hat & ~FROZEN[N-1:0];
  end

endmodule
