// tb_sc_mjl_decoder: self-checking test of one SC-MJL decoder on a (64, 32)
// code with N_LIM = 16 (so the tree has splits, MJL, Wagner, MAP and rate
// leaves) and MERGE = 2.
//
// Frames of random information bits are encoded, sent over BPSK/AWGN,
// quantised to 5-bit words and fed back to back, one per clock, with a few
// idle gaps. Every output frame is compared with the reference model
// (polar_ref_pkg) bit for bit; noiseless frames must also return the
// transmitted bits. The latency must equal 2 + floor(T / MERGE) clocks and
// one frame must leave per clock.
module tb_sc_mjl_decoder;
  import polar_ref_pkg::*;

  localparam int unsigned N = 64, K = 32, MERGE = 2, NLIM = 16, QCH = 5;
  localparam int unsigned NFRAMES = 400;

  logic                   clk = 1'b0;
  logic                   rst_n = 1'b0;
  logic                   in_valid = 1'b0;
  logic [N-1:0][QCH-1:0]  in_llr = '0;
  logic                   out_valid;
  logic [K-1:0]           out_info;
  logic [N-1:0]           out_u;

  sc_mjl_decoder #(.N(N), .K(K), .N_LIM(NLIM), .MERGE(MERGE)) dut (
    .clk, .rst_n, .in_valid, .in_llr, .out_valid, .out_info, .out_u
  );

  always #1 clk = ~clk;

  int unsigned checks = 0, failures = 0, cycle = 0;
  int unsigned exp_lat;
  logic [N-1:0] exp_u_q [$];
  logic [K-1:0] exp_i_q [$];
  logic [K-1:0] tx_i_q [$];
  bit           clean_q [$];
  int unsigned  t_in_q [$];
  int unsigned  n_out = 0, n_clean = 0;

  always @(posedge clk) cycle <= cycle + 1;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s at cycle %0d", what, cycle);
    end
  endtask

  // output side
  always @(posedge clk) begin
    if (rst_n && out_valid) begin
      logic [N-1:0] eu;
      logic [K-1:0] ei, ti;
      bit           cl;
      int unsigned  t0;
      if (exp_u_q.size() == 0) check(0, "unexpected output frame");
      else begin
        eu = exp_u_q.pop_front(); ei = exp_i_q.pop_front(); ti = tx_i_q.pop_front();
        cl = clean_q.pop_front(); t0 = t_in_q.pop_front();
        check(out_u == eu, "u bits vs reference");
        check(out_info == ei, "info bits vs reference");
        check(cycle - t0 == exp_lat, "latency");
        if (n_out == 0) $display("first latency %0d", cycle - t0);
        if (cl) check(out_info == ti, "noiseless frame returns transmitted bits");
        n_out++;
      end
    end
  end

  initial begin
    int unsigned words[];
    bit u[], x[], ur[];
    logic [N-1:0] uv;
    logic [K-1:0] iv, tv;
    r_nlim = NLIM; r_nmjl = 8; r_qch = QCH; r_qmin = 1; r_lgroot = lg2(N);
    make_frozen(lg2(N), K);
    exp_lat = 2 + stages(0, N) / MERGE;
    check(exp_lat == dut.LATENCY, "LATENCY parameter");
    clear_counts();
    words = new[N];
    u = new[N];
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    for (int f = 0; f < NFRAMES; f++) begin
      bit   clean;
      real  sigma;
      int   k;
      clean = (f % 10) == 0;
      sigma = clean ? 0.01 : 0.6 + 0.5 * real'(f % 7) / 6.0;
      k     = 0;
      @(negedge clk);
      for (int i = 0; i < N; i++) u[i] = r_fz[i] ? 1'b0 : 1'($urandom_range(0, 1));
      encode(u, x);
      foreach (x[i]) words[i] = chan_word(x[i], sigma, 1.0, QCH);
      ref_decode(words, ur);
      for (int i = 0; i < N; i++) begin
        in_llr[i] = QCH'(words[i]);
        uv[i] = ur[i];
        if (!r_fz[i]) begin iv[k] = ur[i]; tv[k] = u[i]; k++; end
      end
      in_valid = 1'b1;
      exp_u_q.push_back(uv); exp_i_q.push_back(iv); tx_i_q.push_back(tv);
      clean_q.push_back(clean); t_in_q.push_back(cycle);
      if (clean) n_clean++;
      if (f % 50 == 49) begin
        @(negedge clk);
        in_valid = 1'b0;
      end
    end
    @(negedge clk);
    in_valid = 1'b0;
    repeat (exp_lat + 4) @(posedge clk);
    check(n_out == NFRAMES, "all frames decoded");
    check(n_mjl > 0 && n_spc > 0 && n_rep > 0, "tree uses MJL, Wagner and MAP leaves");
    $display("frames=%0d latency=%0d mjl=%0d mjl_fix=%0d spc=%0d flips=%0d rep=%0d r0=%0d r1=%0d sat=%0d",
             n_out, exp_lat, n_mjl, n_mjl_fix, n_spc, n_spc_flip, n_rep, n_rate0, n_rate1, n_sat);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
