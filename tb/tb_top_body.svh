// Shared body of the polar_tbps_top testbenches. The including module
// declares TB_N, TB_K, TB_NUM_DEC, TB_MERGE, TB_FRAMES, TB_WATCHDOG and
// instantiates the top as 'dut' on the signals below.
//
// Each lane gets its own stream of random frames (BPSK over AWGN at a
// spread of noise levels, 5-bit channel words); lane 0 runs back to back
// with an idle cycle now and then, lane 1 leaves random gaps. Every decoded
// frame is compared bit for bit with the reference model, noiseless frames
// also with the transmitted bits, and the latency of every frame with
// 2 + floor(T / MERGE). At the end, every mechanism of the design must have
// happened at least once.

  logic                                      clk = 1'b0;
  logic                                      rst_n = 1'b0;
  logic [TB_NUM_DEC-1:0]                     in_valid = '0;
  logic [TB_NUM_DEC-1:0][TB_N-1:0][4:0]      in_llr = '0;
  logic [TB_NUM_DEC-1:0]                     out_valid;
  logic [TB_NUM_DEC-1:0][TB_K-1:0]           out_info;
  logic [TB_NUM_DEC-1:0][TB_N-1:0]           out_u;

  always #1 clk = ~clk;

  typedef struct {
    logic [TB_N-1:0] u_ref;
    logic [TB_K-1:0] i_ref;
    logic [TB_K-1:0] i_tx;
    bit              clean;
    int unsigned     t_in;
  } frame_t;

  frame_t      exp_q [TB_NUM_DEC][$];
  int unsigned checks = 0, failures = 0, cycle = 0, exp_lat = 0;
  int unsigned n_out [TB_NUM_DEC];
  int unsigned n_both = 0, n_idle = 0, n_b2b = 0, n_clean = 0, n_noisy_ok = 0, n_noisy = 0;

  always @(posedge clk) cycle <= cycle + 1;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s at cycle %0d", what, cycle);
    end
  endtask

  always @(posedge clk) begin
    if (rst_n) begin
      if (&out_valid) n_both++;
      for (int d = 0; d < TB_NUM_DEC; d++) begin
        if (out_valid[d]) begin
          frame_t e;
          if (exp_q[d].size() == 0) check(0, "unexpected output frame");
          else begin
            e = exp_q[d].pop_front();
            check(out_u[d] == e.u_ref, "u bits vs reference");
            check(out_info[d] == e.i_ref, "info bits vs reference");
            check(cycle - e.t_in == exp_lat, "latency");
            if (e.clean) check(out_info[d] == e.i_tx, "noiseless frame returns transmitted bits");
            else begin
              n_noisy++;
              if (out_info[d] == e.i_tx) n_noisy_ok++;
            end
            n_out[d]++;
          end
        end
      end
    end
  end

  initial begin
    int unsigned words[];
    bit          u[], x[], ur[];
    bit          prev_v [TB_NUM_DEC];
    r_nlim = 32; r_nmjl = 8; r_qch = 5; r_qmin = 1; r_lgroot = lg2(TB_N);
    make_frozen(lg2(TB_N), TB_K);
    exp_lat = 2 + stages(0, TB_N) / TB_MERGE;
    check(exp_lat == dut.g_lane[0].u_dec.LATENCY, "LATENCY parameter");
    clear_counts();
    foreach (n_out[d]) n_out[d] = 0;
    foreach (prev_v[d]) prev_v[d] = 0;
    words = new[TB_N];
    u = new[TB_N];
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    for (int f = 0; f < TB_FRAMES; f++) begin
      @(negedge clk);
      for (int d = 0; d < TB_NUM_DEC; d++) begin
        bit go;
        go = (d == 0) ? (f % 17 != 16) : ($urandom_range(0, 3) != 0);
        in_valid[d] = go;
        if (go && prev_v[d]) n_b2b++;
        if (!go && prev_v[d]) n_idle++;
        prev_v[d] = go;
        if (go) begin
          frame_t e;
          real    sigma;
          int     k;
          e.clean = (f % 8) == 0;
          sigma   = e.clean ? 0.01 : 0.45 + 0.35 * real'(f % 5) / 4.0;
          for (int i = 0; i < TB_N; i++) u[i] = r_fz[i] ? 1'b0 : 1'($urandom_range(0, 1));
          encode(u, x);
          foreach (x[i]) words[i] = chan_word(x[i], sigma, 1.0, 5);
          ref_decode(words, ur);
          k = 0;
          for (int i = 0; i < TB_N; i++) begin
            in_llr[d][i] = 5'(words[i]);
            e.u_ref[i] = ur[i];
            if (!r_fz[i]) begin e.i_ref[k] = ur[i]; e.i_tx[k] = u[i]; k++; end
          end
          e.t_in = cycle;
          if (e.clean) n_clean++;
          exp_q[d].push_back(e);
        end
      end
    end
    @(negedge clk);
    in_valid = '0;
    repeat (exp_lat + 4) @(posedge clk);
    for (int d = 0; d < TB_NUM_DEC; d++) check(exp_q[d].size() == 0 && n_out[d] > 0, "lane drained");
    // every mechanism must have occurred
    check(n_split > 0, "SC split (f and g stages)");
    check(n_rate0 > 0, "rate-0 leaf");
    check(n_rate1 > 0, "rate-1 leaf");
    check(n_rep > 0, "repetition MAP leaf");
    check(n_spc_flip > 0, "Wagner decoder flipped a bit");
    check(n_mjl_fix > 0, "MJL decoder corrected a block");
    check(n_sat > 0, "progressive quantisation saturated an LLR");
    check(exp_lat < stages(0, TB_N) + 2 || TB_MERGE == 1, "register balancing merged stages");
    check(n_both > 0, "parallel lanes produced frames in the same cycle");
    check(n_b2b > 0, "back-to-back frames");
    check(n_idle > 0, "idle cycles between frames");
    $display("frames=%0d/%0d latency=%0d stages=%0d split=%0d r0=%0d r1=%0d rep=%0d spc=%0d flips=%0d mjl=%0d mjl_fix=%0d sat=%0d both=%0d b2b=%0d idle=%0d noisy_ok=%0d/%0d",
             n_out[0], n_out[TB_NUM_DEC-1], exp_lat, stages(0, TB_N), n_split, n_rate0, n_rate1,
             n_rep, n_spc, n_spc_flip, n_mjl, n_mjl_fix, n_sat, n_both, n_b2b, n_idle,
             n_noisy_ok, n_noisy);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (TB_WATCHDOG) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
