// tb_mjl_decoder: the MJL decoder for the pattern v = {1,0,0,0,1,0,0,0}
// (3-bit words) and for pattern {1,1,0,0,0,0,0,0} (1-bit words) against a
// brute-force ML search over all 256 words of u (frozen bits zero, the
// codeword found by the reference encoder, ties to the smallest u). Also
// checks that every output is a codeword and that noisy inputs get
// corrected.
module tb_mjl_decoder;
  import polar_ref_pkg::*;
  localparam logic [7:0] PA = 8'b0001_0001;
  localparam logic [7:0] PB = 8'b0000_0011;
  logic [7:0][2:0] la;
  logic [7:0][0:0] lb;
  logic [7:0]      xa, xb;
  int unsigned checks = 0, failures = 0, fixes = 0;

  mjl_decoder #(.M(8), .Q(3), .PAT(PA)) dut_a (.llr(la), .x(xa));
  mjl_decoder #(.M(8), .Q(1), .PAT(PB)) dut_b (.llr(lb), .x(xb));

  function automatic logic [7:0] ml(logic [7:0] pat, int d[8]);
    int   best = -(1 << 30);
    logic [7:0] bx = '0;
    bit   u[], x[];
    u = new[8];
    for (int v = 0; v < 256; v++) begin
      int sc = 0;
      if ((v & pat) != 0) continue;
      for (int i = 0; i < 8; i++) u[i] = ((v >> i) & 1) != 0;
      encode(u, x);
      for (int i = 0; i < 8; i++) sc += x[i] ? -d[i] : d[i];
      if (sc > best) begin
        best = sc;
        for (int i = 0; i < 8; i++) bx[i] = x[i];
      end
    end
    return bx;
  endfunction

  function automatic bit is_cw(logic [7:0] pat, logic [7:0] xv);
    bit x[], u[];
    x = new[8];
    for (int i = 0; i < 8; i++) x[i] = xv[i];
    encode(x, u);
    for (int i = 0; i < 8; i++) if (pat[i] && u[i]) return 0;
    return 1;
  endfunction

  initial begin
    for (int t = 0; t < 3000; t++) begin
      int da[8], db[8];
      logic [7:0] ha;
      for (int i = 0; i < 8; i++) la[i] = 3'($urandom);
      lb = 8'($urandom);
      #1;
      for (int i = 0; i < 8; i++) begin
        da[i] = w2d(la[i]);
        db[i] = lb[i] ? -1 : 1;
        ha[i] = la[i][0];
      end
      checks += 4;
      if (xa !== ml(PA, da)) failures++;
      if (xb !== ml(PB, db)) failures++;
      if (!is_cw(PA, xa)) failures++;
      if (!is_cw(PB, xb)) failures++;
      if (xa != ha) fixes++;
    end
    checks++;
    if (fixes == 0) failures++;
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
