// tb_stop_controller: pass counting and the stopping rule, with a small
// pass length (N = 8) and iteration limit (MAX_ITER = 4).
//
// The comparator result is modelled by a per-block schedule: match is the
// scheduled value for the pass about to end. For each code block the
// expected outcome is worked out from the schedule alone: the first pass
// i >= 2 whose entry is set stops with STOP_BIP_MATCH, otherwise pass
// MAX_ITER stops with STOP_MAX_ITER. Every cycle checks first_bit,
// bit_accept and pass_end against the count of accepted decisions; stop
// be high exactly two cycles after the cycle that offered the last decision
// of the deciding pass. Blocks include a set first entry (ignored, i = 1), passes
// back to back, random gaps, decisions offered after stop (refused) and a
// frame_start in the middle of a pass, together with a decision.
module tb_stop_controller;
  import bhda_pkg::*;

  localparam int N   = 8;
  localparam int MAX = 4;

  int checks = 0, failures = 0;
  int n_match = 0, n_limit = 0, n_abort = 0, n_refused = 0, n_first_ignored = 0;

  logic         clk = 1'b0, rst_n = 1'b0;
  logic         frame_start = 1'b0, bit_valid = 1'b0;
  logic         bit_accept, first_bit, match, pass_end, hist_load, stop;
  logic [2:0]   iter;
  stop_reason_e stop_reason;
  bit   [MAX+1:0] sched;

  stop_controller #(.N(N), .MAX_ITER(MAX)) dut (
    .clk, .rst_n, .frame_start, .bit_valid, .bit_accept, .first_bit, .match,
    .pass_end, .hist_load, .iter, .stop, .stop_reason
  );

  always #5 clk = ~clk;

  always_comb match = sched[int'(iter) + 1];

  // Reference state.
  int  cnt;          // decisions accepted in the current pass
  int  passes;       // passes ended in the current block
  bit  end_due;      // the previous edge took the N-th decision
  bit  exp_stop;
  int  last_edge, edge_no = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL @%0d %s: cnt=%0d passes=%0d iter=%0d stop=%0b pe=%0b fb=%0b acc=%0b",
               edge_no, what, cnt, passes, iter, stop, pass_end, first_bit, bit_accept);
    end
  endtask

  // Apply inputs for one cycle; check the combinational outputs before the
  // edge and the registered ones after it.
  task automatic cycle(input bit fs, input bit v);
    bit acc;
    frame_start = fs;
    bit_valid   = v;
    #1;
    acc = v && !exp_stop && !fs;
    check(bit_accept === acc, "bit_accept");
    check(first_bit === (cnt == 0), "first_bit");
    check(hist_load === (end_due && !exp_stop), "hist_load");
    @(posedge clk);
    edge_no++;
    #1;
    if (fs) begin
      cnt = 0; passes = 0; end_due = 0; exp_stop = 0;
    end else begin
      if (end_due) begin
        passes++;
        if (passes >= 2 && sched[passes]) exp_stop = 1;
        if (passes == MAX) exp_stop = 1;
        if (exp_stop) check(edge_no - last_edge == 1, "stop latency");
      end
      end_due = 0;
      if (acc) begin
        cnt++;
        if (cnt == N) begin
          cnt = 0; end_due = 1; last_edge = edge_no;
        end
      end
    end
    check(pass_end === end_due, "pass_end");
    check(int'(iter) == passes, "iter");
    check(stop === exp_stop, "stop");
    if (!exp_stop) check(stop_reason == STOP_NONE, "no reason while running");
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    sched = '0;
    cnt = 0; passes = 0; end_due = 0; exp_stop = 0; last_edge = 0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int blk = 0; blk < 60; blk++) begin
      int  exp_pass;
      bit  by_match, abort, tight;
      sched = '0;
      for (int p = 1; p <= MAX; p++) sched[p] = ($urandom_range(0, 2) == 0);
      if (blk % 7 == 0) sched[1] = 1'b1;                 // must be ignored
      exp_pass = MAX; by_match = 0;
      for (int p = MAX; p >= 2; p--) if (sched[p]) begin exp_pass = p; by_match = 1; end
      if (sched[1] && !(by_match && exp_pass == 2) && MAX > 1) n_first_ignored++;
      abort = (blk % 9 == 4);
      tight = (blk % 2 == 0);
      cycle(1'b1, 1'b0);                                  // frame_start
      for (int p = 1; p <= MAX && !exp_stop; p++) begin
        for (int k = 0; k < N; k++) begin
          while (!tight && $urandom_range(0, 3) == 0) cycle(1'b0, 1'b0);
          if (abort && p == 2 && k == 3) break;
          cycle(1'b0, 1'b1);
          if (exp_stop) break;
        end
        if (abort && p == 2) break;
        if (!tight) repeat (2) cycle(1'b0, 1'b0);
      end
      if (abort) begin
        // A new block begins in the middle of pass 2, a decision offered
        // in the same cycle is dropped.
        cycle(1'b1, 1'b1);
        check(iter == 0 && !stop && first_bit, "restart after frame_start");
        n_abort++;
        continue;
      end
      repeat (3) cycle(1'b0, 1'b0);
      check(stop === 1'b1, "stopped");
      check(passes == exp_pass, "stop pass");
      check(stop_reason == (by_match ? STOP_BIP_MATCH : STOP_MAX_ITER), "stop reason");
      if (by_match) n_match++; else n_limit++;
      // The decoder keeps offering decisions: all must be refused.
      repeat (3) begin
        cycle(1'b0, 1'b1);
        n_refused++;
      end
      check(int'(iter) == exp_pass, "iter frozen after stop");
    end
    check(n_match > 0 && n_limit > 0 && n_abort > 0 && n_first_ignored > 0,
          "every case exercised");
    $display("stops by match=%0d by limit=%0d aborts=%0d first-pass matches ignored=%0d",
             n_match, n_limit, n_abort, n_first_ignored);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
