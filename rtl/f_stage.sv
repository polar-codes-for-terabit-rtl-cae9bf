// f_stage: the SC "f" (check-node, min-sum) stage of one decoder node.
//
// For a node of length 2*M it combines LLR pair (alpha[i], alpha[M+i]) into
// the LLR of the left child's codeword bit i: sign = XOR of the signs,
// magnitude = the smaller magnitude. Inputs are QI-bit words and outputs are
// re-quantised to QO bits by saturating the magnitude (progressive
// quantisation narrows the LLRs towards the leaves); the saturating
// re-quantisation is this design's choice. Word format: {mag, sign}, see
// polar_pkg.
//
// Timing: combinational when REG = 0; with REG = 1 the result is registered
// and appears one clock after the inputs. The pipeline never stalls, so
// there is no enable or reset on the data registers.
// clk is unused in the combinational (REG = 0) variant.
module f_stage
  import polar_pkg::*;
#(
  parameter int unsigned M   = 4,
  parameter int unsigned QI  = 5,
  parameter int unsigned QO  = 4,
  parameter bit          REG = 1'b1
) (
  input  logic                   clk,
  input  logic [2*M-1:0][QI-1:0] alpha,
  output logic [M-1:0][QO-1:0]   llr_out
);

  logic [M-1:0][QO-1:0] f_comb;

  always_comb begin
    for (int unsigned i = 0; i < M; i++) begin
      f_comb[i] = QO'(llr_pack(f_op(llr_unpack(16'(alpha[i]), QI),
                                    llr_unpack(16'(alpha[M+i]), QI)), QO));
    end
  end

  if (REG) begin : g_reg
    always_ff @(posedge clk) llr_out <= f_comb;
  end else begin : g_wire
    assign llr_out = f_comb;
  end

endmodule
