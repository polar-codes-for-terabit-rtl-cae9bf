// tb_f_stage: random vectors through a registered f_stage (5-bit in, 3-bit
// out) and a combinational one (4-bit in, 4-bit out); outputs are compared
// with the reference min-sum rule, the registered one a clock later.
module tb_f_stage;
  import polar_ref_pkg::*;
  localparam int unsigned M = 8;
  logic clk = 1'b0;
  logic [2*M-1:0][4:0] a5;
  logic [2*M-1:0][3:0] a4;
  logic [M-1:0][2:0]   o3;
  logic [M-1:0][3:0]   o4;
  int unsigned checks = 0, failures = 0;

  f_stage #(.M(M), .QI(5), .QO(3), .REG(1'b1)) dut_r (.clk, .alpha(a5), .llr_out(o3));
  f_stage #(.M(M), .QI(4), .QO(4), .REG(1'b0)) dut_c (.clk, .alpha(a4), .llr_out(o4));

  always #1 clk = ~clk;

  initial begin
    logic [2*M-1:0][4:0] prev;
    for (int t = 0; t < 300; t++) begin
      @(negedge clk);
      for (int i = 0; i < 2 * M; i++) begin a5[i] = 5'($urandom); a4[i] = 4'($urandom); end
      prev = a5;
      #0.1;
      for (int i = 0; i < M; i++) begin
        checks++;
        if (w2d(o4[i]) != fref(w2d(a4[i]), w2d(a4[M+i]), 4)) failures++;
      end
      @(posedge clk);
      #0.1;
      for (int i = 0; i < M; i++) begin
        checks++;
        if (w2d(o3[i]) != fref(w2d(prev[i]), w2d(prev[M+i]), 3)) failures++;
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
