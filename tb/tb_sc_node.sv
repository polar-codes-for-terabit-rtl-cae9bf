// tb_sc_node: the N = 16, K = 9 example tree (both halves decoded by the
// MJL decoder, the right one with pattern v = {1,0,0,0,1,0,0,0}) with
// every stage registered (MERGE = 1, 4 clocks) and with pairs of stages
// merged (MERGE = 2, 2 clocks). Random 5-bit LLR frames enter every clock;
// x_out and u_out are compared with the reference model after exactly the
// expected latency.
module tb_sc_node;
  import polar_ref_pkg::*;
  import polar_pkg::mask_t;
  localparam mask_t FZ = mask_t'(16'b0001_0001_0001_1111);
  logic clk = 1'b0;
  logic [15:0][4:0] alpha;
  logic [15:0]      x1, u1, x2, u2;
  logic [15:0]      ex_q [$], eu_q [$];
  int unsigned checks = 0, failures = 0;

  sc_node #(.SIZE(16), .FZ(FZ), .MERGE(1)) dut1 (.clk, .alpha, .x_out(x1), .u_out(u1));
  sc_node #(.SIZE(16), .FZ(FZ), .MERGE(2)) dut2 (.clk, .alpha, .x_out(x2), .u_out(u2));

  always #1 clk = ~clk;

  initial begin
    int unsigned w[];
    bit u[], x[];
    r_nmjl = 8; r_nlim = 32; r_qch = 5; r_qmin = 1; r_lgroot = 4;
    r_fz = new[16];
    for (int i = 0; i < 16; i++) r_fz[i] = FZ[i];
    clear_counts();
    checks++;
    if (stages(0, 16) != 4) failures++;
    w = new[16];
    for (int t = 0; t < 400; t++) begin
      logic [15:0] ev_x, ev_u;
      int a[];
      @(negedge clk);
      for (int i = 0; i < 16; i++) begin
        w[i] = $urandom_range(0, 31);
        alpha[i] = 5'(w[i]);
      end
      a = new[16];
      foreach (w[i]) a[i] = w2d(w[i]);
      r_u = new[16];
      ref_node(a, 0, 16, x);
      for (int i = 0; i < 16; i++) begin ev_x[i] = x[i]; ev_u[i] = r_u[i]; end
      ex_q.push_back(ev_x);
      eu_q.push_back(ev_u);
      #0.1;
      if (ex_q.size() > 4) begin
        checks += 2;
        if (x1 !== ex_q[ex_q.size() - 5]) failures++;
        if (u1 !== eu_q[eu_q.size() - 5]) failures++;
      end
      if (ex_q.size() > 2) begin
        checks += 2;
        if (x2 !== ex_q[ex_q.size() - 3]) failures++;
        if (u2 !== eu_q[eu_q.size() - 3]) failures++;
      end
    end
    checks++;
    if (n_mjl != 800 || n_mjl_fix == 0) failures++;
    $display("mjl=%0d corrected=%0d rep=%0d spc=%0d r0=%0d r1=%0d split=%0d", n_mjl, n_mjl_fix, n_rep, n_spc, n_rate0, n_rate1, n_split);
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
