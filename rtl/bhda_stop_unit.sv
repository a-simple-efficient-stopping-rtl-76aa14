// bhda_stop_unit: BHDA stopping criterion for an iterative turbo decoder.
//
// The unit watches one soft output stream of the turbo decoder, L(u_k) for
// k = 0..N-1 once per pass, and tells the decoder when further iterations
// are useless. Each LLR is sliced to a hard decision u_hat_k; the decisions
// of a pass are folded into an n-bit bit interleaved parity (BIP) signature,
// BIP_m = XOR of u_hat_k over k mod n = m; at the end of pass i the
// signature is compared with that of pass i-1 and, for i >= 2, equality
// stops decoding. Cost: one XOR, n signature registers, n memory bits and an
// n-bit comparator, independent of N.
//
// Blocks: hard_decision (slicer) -> bip_generator (XOR + circular shift
// register) -> bip_history (previous BIP + comparator), sequenced by
// stop_controller. The criterion, the BIP formula and the hardware budget
// follow the design; the iteration limit (MAX_ITER), the LLR format, the
// handshake and the timing are this design's choices.
//
// Interface:
//   frame_start  one-cycle pulse before the first pass of a new code block
//   llr_valid    an LLR is offered this cycle; llr is the signed soft value
//   llr_accept   the LLR was taken (low after stop or during frame_start)
//   pass_end     high for one cycle after the N-th LLR of a pass
//   iter         passes completed in this code block
//   stop         held high from the decision until the next frame_start
//   stop_reason  STOP_BIP_MATCH or STOP_MAX_ITER once stop is high
//   bip, bip_prev  current and previous signature, for observation
// Timing: if the last LLR of a pass is offered in cycle t, pass_end is high
// in cycle t+1 and stop/iter show the decision from cycle t+2. One LLR per cycle at most; gaps in llr_valid are allowed.
module bhda_stop_unit
  import bhda_pkg::*;
#(
  parameter int unsigned LLR_W    = DEF_LLR_W,
  parameter int unsigned N        = DEF_N,
  parameter int unsigned BIP_N    = DEF_BIP_N,
  parameter int unsigned MAX_ITER = DEF_MAX_ITER,
  localparam int unsigned ITER_W  = $clog2(MAX_ITER + 1)
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    frame_start,
  input  logic                    llr_valid,
  input  logic signed [LLR_W-1:0] llr,
  output logic                    llr_accept,
  output logic                    pass_end,
  output logic [ITER_W-1:0]       iter,
  output logic                    stop,
  output stop_reason_e            stop_reason,
  output logic [BIP_N-1:0]        bip,
  output logic [BIP_N-1:0]        bip_prev
);

  logic dec_valid, u_hat;
  logic first_bit, match, hist_load;

  hard_decision #(.LLR_W(LLR_W)) u_slicer (
    .llr_valid (llr_valid),
    .llr       (llr),
    .bit_valid (dec_valid),
    .u_hat     (u_hat)
  );

  stop_controller #(.N(N), .MAX_ITER(MAX_ITER)) u_ctrl (
    .clk         (clk),
    .rst_n       (rst_n),
    .frame_start (frame_start),
    .bit_valid   (dec_valid),
    .bit_accept  (llr_accept),
    .first_bit   (first_bit),
    .match       (match),
    .pass_end    (pass_end),
    .hist_load   (hist_load),
    .iter        (iter),
    .stop        (stop),
    .stop_reason (stop_reason)
  );

  bip_generator #(.BIP_N(BIP_N)) u_bip (
    .clk       (clk),
    .rst_n     (rst_n),
    .bit_valid (llr_accept),
    .first_bit (first_bit),
    .u_hat     (u_hat),
    .bip       (bip)
  );

  bip_history #(.BIP_N(BIP_N)) u_hist (
    .clk      (clk),
    .rst_n    (rst_n),
    .load     (hist_load),
    .bip_in   (bip),
    .bip_prev (bip_prev),
    .match    (match)
  );

endmodule
