// rep_map_decoder: MAP decoder of a length-M repetition constituent code
// (only the last u bit of the block carries information).
//
// The codeword is all zeros or all ones; the MAP choice is the sign of the
// sum of the M channel LLRs. The sum is taken on the exact half-step values
// of the {mag, sign} words (see polar_pkg), so with 1-bit words it reduces
// to a majority vote of the hard decisions. A zero sum decodes to the
// all-zero word (this design's tie rule).
//
// Purely combinational: x is valid in the same cycle as llr.
module rep_map_decoder
  import polar_pkg::*;
#(
  parameter int unsigned M = 8,
  parameter int unsigned Q = 3
) (
  input  logic [M-1:0][Q-1:0] llr,
  output logic [M-1:0]        x
);

  int  sum;
  logic bit_hat;

  always_comb begin
    sum = 0;
    for (int unsigned i = 0; i < M; i++) sum += llr2x(llr_unpack(16'(llr[i]), Q));
    bit_hat = (sum < 0);
    x       = {M{bit_hat}};
  end

endmodule
