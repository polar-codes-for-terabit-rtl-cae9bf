// tb_g_stage: random LLR pairs and partial sums through a registered g_stage
// (5-bit in, 4-bit out, so sums saturate) and a combinational one (3-bit in,
// 1-bit out); outputs are compared with the reference g rule.
module tb_g_stage;
  import polar_ref_pkg::*;
  localparam int unsigned M = 8;
  logic clk = 1'b0;
  logic [2*M-1:0][4:0] a5;
  logic [2*M-1:0][2:0] a3;
  logic [M-1:0]        b5, b3;
  logic [M-1:0][3:0]   o4;
  logic [M-1:0][0:0]   o1;
  int unsigned checks = 0, failures = 0;

  g_stage #(.M(M), .QI(5), .QO(4), .REG(1'b1)) dut_r (.clk, .alpha(a5), .xl(b5), .llr_out(o4));
  g_stage #(.M(M), .QI(3), .QO(1), .REG(1'b0)) dut_c (.clk, .alpha(a3), .xl(b3), .llr_out(o1));

  always #1 clk = ~clk;

  initial begin
    logic [2*M-1:0][4:0] pa;
    logic [M-1:0]        pb;
    for (int t = 0; t < 300; t++) begin
      @(negedge clk);
      for (int i = 0; i < 2 * M; i++) begin a5[i] = 5'($urandom); a3[i] = 3'($urandom); end
      b5 = M'($urandom); b3 = M'($urandom);
      pa = a5; pb = b5;
      #0.1;
      for (int i = 0; i < M; i++) begin
        checks++;
        if (w2d(o1[i]) != gref(w2d(a3[i]), w2d(a3[M+i]), b3[i], 1)) failures++;
      end
      @(posedge clk);
      #0.1;
      for (int i = 0; i < M; i++) begin
        checks++;
        if (w2d(o4[i]) != gref(w2d(pa[i]), w2d(pa[M+i]), pb[i], 4)) failures++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
