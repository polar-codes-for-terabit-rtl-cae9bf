// sc_node: one node of the unrolled, fully pipelined SC-MJL decoding tree,
// instantiated recursively.
//
// A node owns the block u[OFF +: SIZE] of the code. If the block's frozen
// pattern is one of the constituent codes decoded in one step (rate-0,
// rate-1, repetition, single parity check up to N_LIM bits, or any block of
// N_MJL bits) the node is a leaf and decodes it directly. Otherwise it is
// split as in successive cancellation:
//   f stage  -> left child (u[OFF +: SIZE/2])
//   g stage  -> right child (u[OFF+SIZE/2 +: SIZE/2]), using the left
//               child's codeword bits xl
//   output   x = {xr, xl ^ xr}, u = {ur, ul}
// The node's input LLRs wait in a delay line while the left subtree works,
// and the left results wait while the right subtree works, so a new frame
// can enter every clock.
//
// Stage indices and register balancing: the tree is a chain of stages in
// decoding order (f, left subtree, g, right subtree); START is this node's
// first stage index. A stage ends in a register only when its index mod
// MERGE is MERGE-1, so MERGE consecutive stages share one clock cycle
// (MERGE = 1 registers every stage). All delay lines are sized from the
// registered-stage counts, so LAT = nreg(START, T, MERGE) is the node's
// latency in clocks.
//
// Lint notes: a node whose stages all end without a register leaves clk
// unused, and a rate-0 leaf ignores its LLRs; both are intended. When this
// module is linted on its own as the top, Verilator reports xl/ul/xr/ur of a
// split node as undriven: it does not follow the self-instantiation there.
// They are driven by the child nodes, as every simulation of the tree shows.
//
// LLR width: QN = qbits(log2 SIZE) bits at the node input, QC one level
// down (progressive quantisation, see polar_pkg).
module sc_node
  import polar_pkg::*;
#(
  parameter int unsigned SIZE    = 16,
  parameter int unsigned OFF     = 0,
  parameter mask_t       FZ      = mask_t'(16'b0001_0001_0001_1111),
  parameter int unsigned START   = 0,
  parameter int unsigned MERGE   = 1,
  parameter int unsigned N_MJL   = 8,
  parameter int unsigned N_LIM   = 32,
  parameter int unsigned LG_ROOT = 4,
  parameter int unsigned Q_CH    = 5,
  parameter int unsigned Q_MIN   = 1,
  // derived, not meant to be overridden
  localparam int unsigned LG      = log2c(SIZE),
  localparam int unsigned LG_LEAF = log2c(N_MJL),
  localparam int unsigned QN      = qbits(LG, LG_ROOT, LG_LEAF, Q_CH, Q_MIN)
) (
  input  logic                  clk,
  input  logic [SIZE-1:0][QN-1:0] alpha,
  output logic [SIZE-1:0]       x_out,
  output logic [SIZE-1:0]       u_out
);

  localparam node_kind_e  KIND = node_kind(FZ, OFF, SIZE, N_MJL, N_LIM);

  if (KIND != NODE_SPLIT) begin : g_leaf
    logic [SIZE-1:0] x_c, u_c;

    if (KIND == NODE_RATE0) begin : g_rate0
      assign x_c = '0;
    end else if (KIND == NODE_RATE1) begin : g_rate1
      for (genvar i = 0; i < SIZE; i++) begin : g_hd
        assign x_c[i] = alpha[i][0];
      end
    end else if (KIND == NODE_REP) begin : g_rep
      rep_map_decoder #(.M(SIZE), .Q(QN)) u_rep (.llr(alpha), .x(x_c));
    end else if (KIND == NODE_SPC) begin : g_spc
      spc_wagner_decoder #(.M(SIZE), .Q(QN)) u_spc (.llr(alpha), .x(x_c));
    end else begin : g_mjl
      mjl_decoder #(.M(SIZE), .Q(QN), .PAT(FZ[OFF +: SIZE])) u_mjl (.llr(alpha), .x(x_c));
    end

    polar_transform #(.N(SIZE)) u_inv (.u(x_c), .x(u_c));

    if (stage_is_reg(START, MERGE)) begin : g_reg
      always_ff @(posedge clk) begin
        x_out <= x_c;
        u_out <= u_c;
      end
    end else begin : g_wire
      assign x_out = x_c;
      assign u_out = u_c;
    end
  end else begin : g_split
    localparam int unsigned H   = SIZE / 2;
    localparam int unsigned QC  = qbits(LG - 1, LG_ROOT, LG_LEAF, Q_CH, Q_MIN);
    localparam int unsigned TL  = node_stages(FZ, OFF, H, N_MJL, N_LIM);
    localparam int unsigned TR  = node_stages(FZ, OFF + H, H, N_MJL, N_LIM);
    localparam int unsigned D_A = nreg(START, 1 + TL, MERGE);
    localparam int unsigned D_B = nreg(START + 1 + TL, 1 + TR, MERGE);

    logic [H-1:0][QC-1:0]   llr_l, llr_r;
    logic [SIZE-1:0][QN-1:0] alpha_d;
    logic [H-1:0]           xl, ul, xr, ur, xl_d, ul_d;

    f_stage #(.M(H), .QI(QN), .QO(QC), .REG(stage_is_reg(START, MERGE))) u_f (
      .clk, .alpha, .llr_out(llr_l)
    );

    sc_node #(
      .SIZE(H), .OFF(OFF), .FZ(FZ), .START(START + 1), .MERGE(MERGE), .N_MJL(N_MJL),
      .N_LIM(N_LIM), .LG_ROOT(LG_ROOT), .Q_CH(Q_CH), .Q_MIN(Q_MIN)
    ) u_left (
      .clk, .alpha(llr_l), .x_out(xl), .u_out(ul)
    );

    pipe_delay #(.W(SIZE * QN), .D(D_A)) u_alpha_dly (.clk, .din(alpha), .dout(alpha_d));

    g_stage #(.M(H), .QI(QN), .QO(QC), .REG(stage_is_reg(START + 1 + TL, MERGE))) u_g (
      .clk, .alpha(alpha_d), .xl, .llr_out(llr_r)
    );

    sc_node #(
      .SIZE(H), .OFF(OFF + H), .FZ(FZ), .START(START + 2 + TL), .MERGE(MERGE), .N_MJL(N_MJL),
      .N_LIM(N_LIM), .LG_ROOT(LG_ROOT), .Q_CH(Q_CH), .Q_MIN(Q_MIN)
    ) u_right (
      .clk, .alpha(llr_r), .x_out(xr), .u_out(ur)
    );

    pipe_delay #(.W(2 * H), .D(D_B)) u_left_dly (
      .clk, .din({ul, xl}), .dout({ul_d, xl_d})
    );

    assign x_out = {xr, xl_d ^ xr};
    assign u_out = {ur, ul_d};
  end

endmodule
