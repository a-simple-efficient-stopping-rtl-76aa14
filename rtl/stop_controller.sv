// stop_controller: pass and iteration bookkeeping of the BHDA criterion.
//
// A pass is the N hard decisions of one decoder output sweep (one iteration
// when a single decoder's output is watched). The controller counts accepted
// decisions, marks the first one of each pass for the BIP generator and,
// once N have been accepted, ends the pass: it loads the BIP into the
// history memory and applies the stopping rule with i = number of the pass
// just ended:
//   - i >= 2 and BIP(i) == BIP(i-1)  -> stop, reason STOP_BIP_MATCH
//   - otherwise, i == MAX_ITER       -> stop, reason STOP_MAX_ITER
// The first rule is the criterion itself. The iteration limit is this
// design's addition, so that a block whose signatures never agree still
// ends.
//
// Timing: if the last decision of a pass is offered in cycle t, the BIP
// register is complete and pass_end is high in cycle t+1, and stop and iter
// show the decision from cycle t+2. Passes may follow back to back.
//
// Interface: frame_start (synchronous) begins a new code block: counters,
// stop and reason clear, and a decision offered in the same cycle is
// dropped. Once stop is set, decisions are no longer accepted (bit_accept
// low) until the next frame_start. Reset is active low and asynchronous.
module stop_controller
  import bhda_pkg::*;
#(
  parameter int unsigned N        = DEF_N,
  parameter int unsigned MAX_ITER = DEF_MAX_ITER,
  localparam int unsigned CNT_W   = (N > 1) ? $clog2(N) : 1,
  localparam int unsigned ITER_W  = $clog2(MAX_ITER + 1)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              frame_start,
  input  logic              bit_valid,
  output logic              bit_accept,
  output logic              first_bit,
  input  logic              match,
  output logic              pass_end,
  output logic              hist_load,
  output logic [ITER_W-1:0] iter,
  output logic              stop,
  output stop_reason_e      stop_reason
);

  logic [CNT_W-1:0]  bit_cnt;
  logic              last_bit;
  logic [ITER_W-1:0] iter_next;
  logic              stop_match, stop_limit;

  always_comb begin
    bit_accept = bit_valid && !stop && !frame_start;
    first_bit  = (bit_cnt == '0);
    last_bit   = (bit_cnt == CNT_W'(N - 1));
    hist_load  = pass_end && !stop;
    iter_next  = iter + 1'b1;
    stop_match = (iter_next >= ITER_W'(2)) && match;
    stop_limit = (iter_next >= ITER_W'(MAX_ITER));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      bit_cnt     <= '0;
      pass_end    <= 1'b0;
      iter        <= '0;
      stop        <= 1'b0;
      stop_reason <= STOP_NONE;
    end else if (frame_start) begin
      bit_cnt     <= '0;
      pass_end    <= 1'b0;
      iter        <= '0;
      stop        <= 1'b0;
      stop_reason <= STOP_NONE;
    end else begin
      pass_end <= bit_accept && last_bit;
      if (bit_accept)
        bit_cnt <= last_bit ? '0 : bit_cnt + 1'b1;
      if (hist_load) begin
        iter <= iter_next;
        if (stop_match) begin
          stop        <= 1'b1;
          stop_reason <= STOP_BIP_MATCH;
        end else if (stop_limit) begin
          stop        <= 1'b1;
          stop_reason <= STOP_MAX_ITER;
        end
      end
    end
  end

  // A stopped block always carries its reason, and the iteration count
  // never passes the limit.
  a_reason: assert property (@(posedge clk) disable iff (!rst_n)
                             stop |-> stop_reason != STOP_NONE);
  a_iter_bound: assert property (@(posedge clk) disable iff (!rst_n)
                             iter <= ITER_W'(MAX_ITER));

endmodule
