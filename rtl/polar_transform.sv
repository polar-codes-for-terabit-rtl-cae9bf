// polar_transform: x = u * G_N with G_N = F^{(x)n}, F = [[1,0],[1,1]]
// (natural order), built as log2(N) layers of XOR butterflies: in the layer
// of span s, bit i with (i & s) == 0 becomes bit i XOR bit i+s.
//
// The transform is its own inverse, so the decoder uses it to turn a
// constituent codeword estimate back into its u bits. Purely combinational.
module polar_transform #(
  parameter int unsigned N = 8
) (
  input  logic [N-1:0] u,
  output logic [N-1:0] x
);

  localparam int unsigned LG = $clog2(N);

  logic [N-1:0] layer [LG+1];

  assign layer[0] = u;

  for (genvar l = 0; l < LG; l++) begin : g_layer
    for (genvar i = 0; i < N; i++) begin : g_bit
      if ((i & (1 << l)) == 0) begin : g_xor
        assign layer[l+1][i] = layer[l][i] ^ layer[l][i + (1 << l)];
      end else begin : g_pass
        assign layer[l+1][i] = layer[l][i];
      end
    end
  end

  assign x = layer[LG];

endmodule
