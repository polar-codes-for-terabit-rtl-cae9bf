// tb_rep_map_decoder: random words into a length-8, 3-bit and a length-32,
// 1-bit repetition MAP decoder; the output must be all copies of the sign
// of the summed LLR values (a majority vote for 1-bit words), zero on a tie.
module tb_rep_map_decoder;
  import polar_ref_pkg::*;
  logic [7:0][2:0]  l8;
  logic [31:0][0:0] l32;
  logic [7:0]       x8;
  logic [31:0]      x32;
  int unsigned checks = 0, failures = 0, ties = 0;

  rep_map_decoder #(.M(8), .Q(3)) dut8 (.llr(l8), .x(x8));
  rep_map_decoder #(.M(32), .Q(1)) dut32 (.llr(l32), .x(x32));

  initial begin
    for (int t = 0; t < 2000; t++) begin
      int s8, s32;
      for (int i = 0; i < 8; i++) l8[i] = 3'($urandom);
      l32 = 32'($urandom);
      #1;
      s8 = 0; s32 = 0;
      for (int i = 0; i < 8; i++) s8 += w2d(l8[i]);
      for (int i = 0; i < 32; i++) s32 += l32[i] ? -1 : 1;
      if (s32 == 0) ties++;
      checks += 2;
      if (x8 !== {8{s8 < 0}}) failures++;
      if (x32 !== {32{s32 < 0}}) failures++;
    end
    checks++;
    if (ties == 0) failures++;
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
