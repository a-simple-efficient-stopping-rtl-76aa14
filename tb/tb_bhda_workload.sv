// tb_bhda_workload: the BHDA stopping unit controlling a simulated turbo
// decoder on the evaluated operating points.
//
// The testbench holds a behavioural rate-1/3 turbo code and decoder:
// two 8-state recursive systematic encoders with feedback 1+D^2+D^3 and
// feedforward 1+D+D^3 (the constituent code of the 3GPP turbo code), a
// random interleaver of N = 640 bits (not the 3GPP permutation), BPSK,
// and two max-log-MAP decoders exchanging extrinsic information scaled by
// 0.75. Trellises are not terminated; the backward recursion starts from
// equal state metrics. None of this is RTL: it only supplies realistic
// decoder outputs.
//
// Each iteration, the deinterleaved a-posteriori LLRs of the second decoder
// are quantised to 8 bits (4 steps per unit LLR) and streamed into
// bhda_stop_unit, which decides whether to go on. Two channels are run:
// AWGN at Eb/No = 1 dB and flat Rayleigh fading (independent per symbol,
// known amplitude) at 3 dB.
//
// Checked: at each pass end the unit's BIP equals the BIP computed here
// from the quantised LLRs, and the unit stops exactly at the first pass
// i >= 2 whose BIP repeats, else at 10. Reported and checked loosely: the
// average number of iterations (must lie below the limit and not below
// the genie count, the first iteration whose decisions are all correct),
// and the bit error rate after stopping (must stay under 1e-2).
module tb_bhda_workload;
  import bhda_pkg::*;

  localparam int    N      = DEF_N;
  localparam int    NB     = DEF_BIP_N;
  localparam int    MAX    = DEF_MAX_ITER;
  localparam int    W      = DEF_LLR_W;
  localparam int    BLOCKS = 500;       // code blocks per channel
  localparam real   NEG    = -1.0e30;
  localparam real   PI     = 3.14159265358979;

  int checks = 0, failures = 0;

  logic                clk = 1'b0, rst_n = 1'b0;
  logic                frame_start = 1'b0, llr_valid = 1'b0;
  logic signed [W-1:0] llr = '0;
  logic                llr_accept, pass_end, stop;
  logic [3:0]          iter;
  stop_reason_e        stop_reason;
  logic [NB-1:0]       bip, bip_prev;

  bhda_stop_unit dut (
    .clk, .rst_n, .frame_start, .llr_valid, .llr, .llr_accept, .pass_end,
    .iter, .stop, .stop_reason, .bip, .bip_prev
  );

  always #5 clk = ~clk;

  // ---- behavioural code and channel --------------------------------------
  int  perm [N];
  bit  msg  [N];
  bit  par1 [N], par2 [N];
  real ls [N], lp1 [N], lp2 [N];       // channel LLRs
  real le1 [N], le2 [N], lapp [N];     // extrinsic (natural order), output

  function automatic bit next_state_par(input int s, input bit u, output int ns);
    bit s1, s2, s3, a;
    s1 = s[2]; s2 = s[1]; s3 = s[0];
    a  = u ^ s2 ^ s3;
    ns = {a, s1, s2};
    return a ^ s1 ^ s3;
  endfunction

  function automatic void encode(input bit in [N], output bit p [N]);
    int s, ns;
    s = 0;
    for (int k = 0; k < N; k++) begin
      p[k] = next_state_par(s, in[k], ns);
      s = ns;
    end
  endfunction

  function automatic real gauss();
    real u1, u2;
    u1 = (real'($urandom) + 1.0) / 4294967297.0;
    u2 = real'($urandom) / 4294967296.0;
    return $sqrt(-2.0 * $ln(u1)) * $cos(2.0 * PI * u2);
  endfunction

  // Transmit bit c as +1/-1; return its channel LLR.
  function automatic real channel(input bit c, input real sigma2, input bit fading);
    real a, y;
    a = 1.0;
    if (fading) a = $sqrt((gauss() ** 2 + gauss() ** 2) / 2.0);
    y = a * (c ? 1.0 : -1.0) + $sqrt(sigma2) * gauss();
    return 2.0 * a * y / sigma2;
  endfunction

  // Max-log-MAP over an unterminated 8-state trellis.
  function automatic void maxlog(input real sys [N], input real par [N], input real apr [N],
                                 output real app [N]);
    real alpha [N+1][8];
    real beta  [N+1][8];
    for (int s = 0; s < 8; s++) begin
      alpha[0][s] = (s == 0) ? 0.0 : NEG;
      beta[N][s]  = 0.0;
    end
    for (int k = 0; k < N; k++) begin
      real mx;
      for (int s = 0; s < 8; s++) alpha[k+1][s] = NEG;
      for (int s = 0; s < 8; s++)
        for (int u = 0; u < 2; u++) begin
          int ns; bit p; real g;
          p = next_state_par(s, u[0], ns);
          g = 0.5 * ((u ? 1.0 : -1.0) * (sys[k] + apr[k]) + (p ? 1.0 : -1.0) * par[k]);
          if (alpha[k][s] + g > alpha[k+1][ns]) alpha[k+1][ns] = alpha[k][s] + g;
        end
      mx = alpha[k+1][0];
      for (int s = 1; s < 8; s++) if (alpha[k+1][s] > mx) mx = alpha[k+1][s];
      for (int s = 0; s < 8; s++) alpha[k+1][s] -= mx;
    end
    for (int k = N - 1; k >= 0; k--) begin
      real mx, m1, m0;
      for (int s = 0; s < 8; s++) beta[k][s] = NEG;
      m1 = NEG; m0 = NEG;
      for (int s = 0; s < 8; s++)
        for (int u = 0; u < 2; u++) begin
          int ns; bit p; real g, t;
          p = next_state_par(s, u[0], ns);
          g = 0.5 * ((u ? 1.0 : -1.0) * (sys[k] + apr[k]) + (p ? 1.0 : -1.0) * par[k]);
          if (beta[k+1][ns] + g > beta[k][s]) beta[k][s] = beta[k+1][ns] + g;
          t = alpha[k][s] + g + beta[k+1][ns];
          if (u == 1) begin if (t > m1) m1 = t; end
          else        begin if (t > m0) m0 = t; end
        end
      app[k] = m1 - m0;
      mx = beta[k][0];
      for (int s = 1; s < 8; s++) if (beta[k][s] > mx) mx = beta[k][s];
      for (int s = 0; s < 8; s++) beta[k][s] -= mx;
    end
  endfunction

  // One full iteration: decoder 1, interleave, decoder 2, deinterleave.
  function automatic void iterate();
    real app [N], sys_i [N], apr_i [N], app_i [N];
    maxlog(ls, lp1, le2, app);
    for (int k = 0; k < N; k++) le1[k] = 0.75 * (app[k] - ls[k] - le2[k]);
    for (int k = 0; k < N; k++) begin
      sys_i[k] = ls[perm[k]];
      apr_i[k] = le1[perm[k]];
    end
    maxlog(sys_i, lp2, apr_i, app_i);
    for (int k = 0; k < N; k++) begin
      lapp[perm[k]] = app_i[k];
      le2[perm[k]]  = 0.75 * (app_i[k] - sys_i[k] - apr_i[k]);
    end
  endfunction

  function automatic logic signed [W-1:0] quant(input real l);
    real q;
    q = l * 4.0;
    if (q > 127.0)  return 8'sd127;
    if (q < -128.0) return -8'sd128;
    return W'($rtoi(q >= 0.0 ? q + 0.5 : q - 0.5));
  endfunction

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s: iter=%0d stop=%0b bip=%h", what, iter, stop, bip);
    end
  endtask

  // ---- one operating point -----------------------------------------------
  task automatic run_channel(input string name, input real ebno_db, input bit fading);
    real sigma2;
    int  sum_iter = 0, sum_genie = 0, bit_err = 0, n_match = 0, n_limit = 0;
    sigma2 = 1.0 / (2.0 * (1.0 / 3.0) * (10.0 ** (ebno_db / 10.0)));
    for (int blk = 0; blk < BLOCKS; blk++) begin
      bit [NB-1:0] ref_prev;
      int          genie, exp_pass, errs;
      bit          done;
      for (int k = 0; k < N; k++) msg[k] = 1'($urandom);
      begin
        bit msg_i [N];
        for (int k = 0; k < N; k++) msg_i[k] = msg[perm[k]];
        encode(msg, par1);
        encode(msg_i, par2);
      end
      for (int k = 0; k < N; k++) begin
        ls[k]  = channel(msg[k], sigma2, fading);
        lp1[k] = channel(par1[k], sigma2, fading);
        lp2[k] = channel(par2[k], sigma2, fading);
        le2[k] = 0.0;
      end
      @(negedge clk); frame_start = 1'b1;
      @(negedge clk); frame_start = 1'b0;
      genie = MAX; exp_pass = MAX; done = 0; ref_prev = '0; errs = 0;
      for (int it = 1; it <= MAX && !done; it++) begin
        bit [NB-1:0] ref_bip;
        iterate();
        ref_bip = '0; errs = 0;
        for (int k = 0; k < N; k++) begin
          logic signed [W-1:0] q;
          q = quant(lapp[k]);
          ref_bip[k % NB] ^= (q > 0);
          if ((q > 0) != msg[k]) errs++;
          llr_valid = 1'b1;
          llr       = q;
          @(negedge clk);
          if (!llr_accept) check(0, "LLR refused while decoding");
        end
        llr_valid = 1'b0;
        check(pass_end === 1'b1 && bip === ref_bip, $sformatf("%s pass %0d BIP", name, it));
        if (it >= 2) check(bip_prev === ref_prev, "previous BIP");
        if (errs == 0 && genie == MAX) genie = it;
        if ((it >= 2 && ref_bip == ref_prev) || it == MAX) begin
          exp_pass = it;
          done = 1;
        end
        ref_prev = ref_bip;
        @(negedge clk);
        check(stop === done, $sformatf("%s stop after pass %0d", name, it));
      end
      check(int'(iter) == exp_pass, "stop pass");
      if (stop_reason == STOP_BIP_MATCH) n_match++; else n_limit++;
      sum_iter  += exp_pass;
      sum_genie += genie;
      bit_err   += errs;
    end
    $display("%s: blocks=%0d avg_iterations=%0.2f genie=%0.2f BER=%0.2e (stops: match=%0d limit=%0d)",
             name, BLOCKS, real'(sum_iter) / BLOCKS, real'(sum_genie) / BLOCKS,
             real'(bit_err) / (BLOCKS * N), n_match, n_limit);
    check(n_match > 0, {name, ": early stops happen"});
    check(sum_iter < MAX * BLOCKS, {name, ": iterations saved"});
    check(sum_iter >= sum_genie, {name, ": not below genie"});
    check(real'(bit_err) / (BLOCKS * N) < 1.0e-2, {name, ": bit error rate"});
  endtask

  initial begin
    repeat (20000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // Random interleaver (Fisher-Yates).
    for (int k = 0; k < N; k++) perm[k] = k;
    for (int k = N - 1; k > 0; k--) begin
      int j, t;
      j = $urandom_range(0, k);
      t = perm[k]; perm[k] = perm[j]; perm[j] = t;
    end
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    run_channel("AWGN 1 dB", 1.0, 1'b0);
    run_channel("Rayleigh 3 dB", 3.0, 1'b1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
