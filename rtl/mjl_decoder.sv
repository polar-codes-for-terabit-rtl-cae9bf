// mjl_decoder: one-stage decoder for a length-M (N_MJL) constituent block
// whose frozen pattern is fixed at elaboration (parameter PAT, bit i set when
// u_i of the block is frozen).
//
// Blocks of length N_MJL that are none of the simple rate-0 / rate-1 /
// repetition / single-parity-check codes are decoded here in one pipeline
// stage instead of by further SC recursion; the example design applies it to
// the pattern v = {1,0,0,0,1,0,0,0}. This implementation is an exhaustive
// maximum-likelihood decoder: the 2^KI codewords of the block (KI = number
// of information bits) are constants, each is scored by the correlation
// sum_i (c_i ? -L_i : +L_i) with the half-step LLR values of polar_pkg, and
// the best-scoring codeword is output; ties go to the lowest candidate
// index. Exhaustive ML scoring is this design's choice of insides.
//
// Purely combinational: x (the block's codeword estimate) is valid in the
// same cycle as llr.
module mjl_decoder
  import polar_pkg::*;
#(
  parameter int unsigned  M   = 8,
  parameter int unsigned  Q   = 1,
  parameter logic [M-1:0] PAT = M'(8'b0001_0001)
) (
  input  logic [M-1:0][Q-1:0] llr,
  output logic [M-1:0]        x
);

  function automatic int unsigned count_info();
    int unsigned c;
    c = 0;
    for (int unsigned i = 0; i < M; i++) c += int'(!PAT[i]);
    return c;
  endfunction

  localparam int unsigned KI = count_info();
  localparam int unsigned NC = 32'd1 << KI;

  // Codeword of candidate j: the KI information bits of u are the bits of j.
  function automatic leaf_vec_t cand_cw(input int unsigned j);
    leaf_vec_t   u;
    int unsigned b;
    u = '0;
    b = 0;
    for (int unsigned i = 0; i < M; i++) begin
      if (!PAT[i]) begin
        u[i] = ((j >> b) & 1) != 0;
        b++;
      end
    end
    return polar_xform(u, M);
  endfunction

  function automatic logic [M-1:0] cand_x(input int unsigned j);
    leaf_vec_t c;
    c = cand_cw(j);
    return c[M-1:0];
  endfunction

  int v [M];
  int score [NC];

  always_comb begin
    for (int unsigned i = 0; i < M; i++) v[i] = llr2x(llr_unpack(16'(llr[i]), Q));
  end

  for (genvar j = 0; j < NC; j++) begin : g_cand
    localparam leaf_vec_t CW = cand_cw(j);
    always_comb begin
      score[j] = 0;
      for (int unsigned i = 0; i < M; i++) score[j] += CW[i] ? -v[i] : v[i];
    end
  end

  int unsigned best;

  always_comb begin
    best = 0;
    for (int unsigned j = 1; j < NC; j++)
      if (score[j] > score[best]) best = j;
    x = cand_x(best);
  end

endmodule
