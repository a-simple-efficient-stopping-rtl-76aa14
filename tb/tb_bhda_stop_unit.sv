// tb_bhda_stop_unit: end-to-end test of the BHDA stopping unit at its
// default sizes (N = 640 decisions per pass, n = 16, limit 10 passes).
//
// A behavioural stand-in for the turbo decoder produces, for each code
// block, the soft outputs of successive passes: the message with a set of
// wrong decisions that depends on the scenario, converted to LLRs (positive
// for 1, zero or negative for 0). The testbench computes each pass's BIP
// itself from the decisions, BIP_m = XOR over k mod 16 = m, and from those
// the pass at which decoding must stop: the first pass i >= 2 whose BIP
// equals that of pass i-1, else pass 10.
//
// Scenarios, each counted and required at least once:
//   converge   the errors die out after a few passes; stop on a BIP match
//   no_conv    fresh errors every pass; stop at the iteration limit
//   alias      pass 2 differs from pass 1 in two decisions of one residue
//              class; the signatures agree and the unit stops anyway
//   abort      a new block starts in the middle of pass 2
// and mechanisms: LLR gaps, passes back to back, zero LLRs, LLRs refused
// after stop. At every pass end bip and bip_prev are compared with the
// reference, and stop must be high exactly two cycles after the cycle that
// offered the last LLR of the deciding pass.
module tb_bhda_stop_unit;
  import bhda_pkg::*;

  localparam int N   = DEF_N;
  localparam int NB  = DEF_BIP_N;
  localparam int MAX = DEF_MAX_ITER;
  localparam int W   = DEF_LLR_W;

  int checks = 0, failures = 0;
  int n_converge = 0, n_no_conv = 0, n_alias = 0, n_abort = 0;
  int n_stop_match = 0, n_stop_limit = 0, n_gaps = 0, n_tight = 0;
  int n_zero = 0, n_refused = 0, n_pass_checked = 0;

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

  bit          msg [N];
  bit          dec [MAX+1][N];
  bit [NB-1:0] ref_bip [MAX+1];

  int edge_no = 0, last_edge = 0, passes = 0;
  bit end_due = 0, exp_stop = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL @%0d %s: passes=%0d iter=%0d stop=%0b bip=%h ref=%h prev=%h",
               edge_no, what, passes, iter, stop, bip, ref_bip[passes+1], bip_prev);
    end
  endtask

  // LLR for a decision: 1 -> 1..127, 0 -> -128..0 (sometimes exactly 0).
  function automatic logic signed [W-1:0] to_llr(bit u);
    int mag;
    if (u) return W'($urandom_range(1, 127));
    if ($urandom_range(0, 15) == 0) return '0;
    mag = $urandom_range(0, 128);
    return W'(-mag);
  endfunction

  // One clock cycle. Returns whether an offered LLR was taken.
  task automatic cycle(input bit fs, input bit v, input bit u, output bit taken);
    frame_start = fs;
    llr_valid   = v;
    llr         = v ? to_llr(u) : W'($urandom);
    if (v && !u && llr == 0) n_zero++;
    #1;
    taken = v && llr_accept;
    check(llr_accept === (v && !exp_stop && !fs), "llr_accept");
    @(posedge clk);
    edge_no++;
    #1;
    if (fs) begin
      passes = 0; end_due = 0; exp_stop = 0;
    end else if (end_due) begin
      passes++;
      end_due = 0;
      check(int'(iter) == passes, "iter after pass end");
      if ((passes >= 2 && ref_bip[passes] == ref_bip[passes-1]) || passes == MAX) begin
        exp_stop = 1;
        check(edge_no - last_edge == 1, "stop latency");
      end
    end
    check(stop === exp_stop, "stop");
  endtask

  task automatic idle(input int n);
    bit t;
    repeat (n) cycle(1'b0, 1'b0, 1'b0, t);
  endtask

  // Feed pass p; returns early if the unit refuses an LLR (stopped).
  task automatic feed_pass(input int p, input bit gaps, input int abort_at);
    bit t;
    for (int k = 0; k < N; k++) begin
      if (k == abort_at) return;
      while (gaps && $urandom_range(0, 7) == 0) begin
        cycle(1'b0, 1'b0, 1'b0, t);
        n_gaps++;
      end
      cycle(1'b0, 1'b1, dec[p][k], t);
      if (!t) begin
        n_refused++;
        return;
      end
      if (k == N - 1) begin
        end_due = 1;
        last_edge = edge_no;
        // The BIP register now holds the whole pass.
        check(pass_end === 1'b1, "pass_end");
        check(bip === ref_bip[p], "bip at pass end");
        if (p >= 2) check(bip_prev === ref_bip[p-1], "bip_prev at pass end");
        n_pass_checked++;
      end else begin
        check(pass_end === 1'b0 || k == 0, "no pass_end inside a pass");
      end
    end
  endtask

  function automatic void make_bip(int p);
    ref_bip[p] = '0;
    for (int k = 0; k < N; k++) ref_bip[p][k % NB] ^= dec[p][k];
  endfunction

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit t;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int blk = 0; blk < 24; blk++) begin
      int  scen, conv, exp_pass, abort_at;
      bit  gaps, tight, by_match;
      scen  = blk % 4;                      // 0 converge, 1 no_conv, 2 alias, 3 abort
      gaps  = (blk % 3 == 1);
      tight = (blk % 2 == 0);
      conv  = 2 + int'($urandom_range(0, 6));
      for (int k = 0; k < N; k++) msg[k] = 1'($urandom);
      for (int p = 1; p <= MAX; p++) begin
        int nerr;
        for (int k = 0; k < N; k++) dec[p][k] = msg[k];
        case (scen)
          0:       nerr = (p < conv) ? 4 * (conv - p) + 1 : 0;
          1:       nerr = 3;
          default: nerr = (p == 1) ? 5 : 0;
        endcase
        for (int e = 0; e < nerr; e++) begin
          int pos;
          pos = $urandom_range(0, N - 1);
          dec[p][pos] = ~dec[p][pos];
        end
        if (scen == 2 && p == 2) begin
          // Two differences in one residue class: equal signatures.
          int pos;
          for (int k = 0; k < N; k++) dec[2][k] = dec[1][k];
          pos = NB * $urandom_range(0, N / NB - 2) + $urandom_range(0, NB - 1);
          dec[2][pos]      = ~dec[2][pos];
          dec[2][pos + NB] = ~dec[2][pos + NB];
        end
        make_bip(p);
      end
      exp_pass = MAX; by_match = 0;
      for (int p = MAX; p >= 2; p--)
        if (ref_bip[p] == ref_bip[p-1]) begin exp_pass = p; by_match = 1; end

      cycle(1'b1, 1'b0, 1'b0, t);           // frame_start
      abort_at = (scen == 3) ? int'($urandom_range(1, N - 2)) : N;
      for (int p = 1; p <= MAX && !exp_stop; p++) begin
        feed_pass(p, gaps, (p == 2) ? abort_at : N);
        if (scen == 3 && p == 2) break;
        if (tight) n_tight++;
        else idle(3);
      end
      if (scen == 3) begin
        // Restart in the middle of pass 2; the LLR offered with
        // frame_start is dropped.
        cycle(1'b1, 1'b1, 1'b1, t);
        check(!t && iter == 0 && !stop && stop_reason == STOP_NONE, "restart");
        n_abort++;
        continue;
      end
      idle(3);
      check(stop === 1'b1, "stopped");
      check(int'(iter) == exp_pass, "stop pass");
      check(stop_reason == (by_match ? STOP_BIP_MATCH : STOP_MAX_ITER), "stop reason");
      if (by_match) n_stop_match++; else n_stop_limit++;
      case (scen)
        0: begin
             n_converge++;
             check(by_match && exp_pass <= conv + 1, "converged block stops on a match");
           end
        1: n_no_conv++;
        2: begin
             n_alias++;
             check(by_match && exp_pass == 2, "aliased pass stops at 2");
           end
        default: ;
      endcase
      // A decoder that keeps going is refused.
      cycle(1'b0, 1'b1, 1'b1, t);
      check(!t, "refused after stop");
      n_refused++;
    end
    $display("blocks: converge=%0d no_conv=%0d alias=%0d abort=%0d", n_converge, n_no_conv, n_alias, n_abort);
    $display("stops: match=%0d limit=%0d; passes checked=%0d gaps=%0d tight=%0d zero_llr=%0d refused=%0d",
             n_stop_match, n_stop_limit, n_pass_checked, n_gaps, n_tight, n_zero, n_refused);
    check(n_converge > 0, "converge exercised");
    check(n_no_conv > 0 && n_stop_limit > 0, "iteration limit exercised");
    check(n_alias > 0, "aliasing exercised");
    check(n_abort > 0, "abort exercised");
    check(n_stop_match > 0, "BIP match stop exercised");
    check(n_gaps > 0 && n_tight > 0 && n_zero > 0 && n_refused > 0, "stream mechanisms exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
