// hard_decision: the slicer that turns a soft decoder output L(u_k) into the
// decoded bit u_hat_k.
//
// The LLR is read as ln(P(u=1)/P(u=0)) in two's complement, so a strictly
// positive value decides 1, and zero or a negative value decides 0. The
// slicer itself follows the decoder block diagram; the sign convention and
// the tie rule for L = 0 are this design's choices.
//
// Interface: llr_valid/llr in, bit_valid/u_hat out. Purely combinational,
// zero cycles of latency; bit_valid is llr_valid.
module hard_decision #(
  parameter int unsigned LLR_W = bhda_pkg::DEF_LLR_W
) (
  input  logic                    llr_valid,
  input  logic signed [LLR_W-1:0] llr,
  output logic                    bit_valid,
  output logic                    u_hat
);

  always_comb begin
    bit_valid = llr_valid;
    u_hat     = (llr > 0);
  end

endmodule
