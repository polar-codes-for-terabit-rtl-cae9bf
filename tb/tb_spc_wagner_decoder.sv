// tb_spc_wagner_decoder: random words into length-16 (3-bit) and length-4
// (5-bit) Wagner decoders. The output must have even parity, equal the hard
// decisions when they already do, and otherwise differ from them exactly at
// the lowest-index position of smallest magnitude.
module tb_spc_wagner_decoder;
  import polar_ref_pkg::*;
  logic [15:0][2:0] l16;
  logic [3:0][4:0]  l4;
  logic [15:0]      x16;
  logic [3:0]       x4;
  int unsigned checks = 0, failures = 0, flips = 0;

  spc_wagner_decoder #(.M(16), .Q(3)) dut16 (.llr(l16), .x(x16));
  spc_wagner_decoder #(.M(4), .Q(5)) dut4 (.llr(l4), .x(x4));

  initial begin
    for (int t = 0; t < 2000; t++) begin
      logic [15:0] h16, e16;
      logic [3:0]  h4, e4;
      int          mi;
      for (int i = 0; i < 16; i++) l16[i] = 3'($urandom);
      for (int i = 0; i < 4; i++) l4[i] = 5'($urandom);
      #1;
      for (int i = 0; i < 16; i++) h16[i] = l16[i][0];
      for (int i = 0; i < 4; i++) h4[i] = l4[i][0];
      e16 = h16;
      if (^h16) begin
        mi = 0;
        for (int i = 1; i < 16; i++) if ((l16[i] >> 1) < (l16[mi] >> 1)) mi = i;
        e16[mi] = ~e16[mi];
        flips++;
      end
      e4 = h4;
      if (^h4) begin
        mi = 0;
        for (int i = 1; i < 4; i++) if ((l4[i] >> 1) < (l4[mi] >> 1)) mi = i;
        e4[mi] = ~e4[mi];
      end
      checks += 4;
      if (x16 !== e16) failures++;
      if (x4 !== e4) failures++;
      if (^x16) failures++;
      if (^x4) failures++;
    end
    checks++;
    if (flips == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
