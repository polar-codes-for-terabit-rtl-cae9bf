// spc_wagner_decoder: Wagner (ML) decoder of a length-M single-parity-check
// constituent code (only the first u bit of the block is frozen).
//
// It takes the hard decisions of the M LLRs; if their parity is odd, it
// flips the bit whose LLR magnitude is smallest. Among equal magnitudes the
// lowest index is flipped (this design's tie rule). The search is a plain
// compare chain written as a loop.
//
// Purely combinational: x is valid in the same cycle as llr.
module spc_wagner_decoder
  import polar_pkg::*;
#(
  parameter int unsigned M = 8,
  parameter int unsigned Q = 3
) (
  input  logic [M-1:0][Q-1:0] llr,
  output logic [M-1:0]        x
);

  logic [M-1:0]  hard;
  logic          parity;
  logic [15:0]   min_mag;
  logic [$clog2(M)-1:0] min_idx;
  llr_t          l;

  always_comb begin
    min_mag = 16'hFFFF;
    min_idx = 0;
    for (int unsigned i = 0; i < M; i++) begin
      l       = llr_unpack(16'(llr[i]), Q);
      hard[i] = l.sign;
      if (l.mag < min_mag) begin
        min_mag = l.mag;
        min_idx = $clog2(M)'(i);
      end
    end
    parity = ^hard;
    x      = hard;
    if (parity) x[min_idx] = ~hard[min_idx];
  end

endmodule
