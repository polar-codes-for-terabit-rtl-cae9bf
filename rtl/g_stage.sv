// g_stage: the SC "g" (variable-node) stage of one decoder node.
//
// For a node of length 2*M, once the left child has produced its codeword
// bits xl, the LLR of the right child's bit i is
//   alpha[M+i] + (-1)^xl[i] * alpha[i].
// The sum is taken on the exact half-step values of the {mag, sign} words
// (see polar_pkg); a zero sum takes the sign of alpha[M+i] and the magnitude
// saturates to the QO-bit output width. Tie rule, rounding and saturation
// are this design's choices.
//
// Timing: combinational when REG = 0, one clock of latency when REG = 1.
// clk is unused in the combinational (REG = 0) variant.
module g_stage
  import polar_pkg::*;
#(
  parameter int unsigned M   = 4,
  parameter int unsigned QI  = 5,
  parameter int unsigned QO  = 4,
  parameter bit          REG = 1'b1
) (
  input  logic                   clk,
  input  logic [2*M-1:0][QI-1:0] alpha,
  input  logic [M-1:0]           xl,
  output logic [M-1:0][QO-1:0]   llr_out
);

  logic [M-1:0][QO-1:0] g_comb;

  always_comb begin
    for (int unsigned i = 0; i < M; i++) begin
      g_comb[i] = QO'(llr_pack(g_op(llr_unpack(16'(alpha[i]), QI),
                                    llr_unpack(16'(alpha[M+i]), QI), xl[i]), QO));
    end
  end

  if (REG) begin : g_reg
    always_ff @(posedge clk) llr_out <= g_comb;
  end else begin : g_wire
    assign llr_out = g_comb;
  end

endmodule
