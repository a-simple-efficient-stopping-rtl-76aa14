// bip_generator: bit interleaved parity (BIP) of one pass of hard decisions.
//
// BIP_m is the modulo-2 sum of all u_hat_k with k mod n = m (m = 0..n-1),
// starting from zero at the beginning of each pass. As in the design's
// complexity budget, it takes one modulo-2 adder and n registers: the n
// registers form a circular shift register, the adder sits between its
// output stage (bit 0) and its input stage (bit n-1). Each accepted decision
// is added to the stage leaving bit 0, and that stage re-enters at bit n-1,
// so every stage collects the decisions of one residue class.
//
// Order: stage e collects BIP_e. After L decisions, bip[p] holds
// BIP_((p + L) mod n). When n divides the pass length (640 and n = 16),
// bip is BIP in natural order; otherwise it is rotated by the same amount on
// every pass, which leaves pass-to-pass comparisons unaffected.
//
// Interface: bit_valid qualifies u_hat; first_bit marks the first decision
// of a pass and makes the adder start from zero instead of the register, so
// passes may follow each other with no idle cycle. bip is registered: the
// BIP including a decision is visible the cycle after it is accepted.
// Reset (active low, asynchronous) clears the register. BIP_N must be at
// least 2.
module bip_generator #(
  parameter int unsigned BIP_N = bhda_pkg::DEF_BIP_N
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             bit_valid,
  input  logic             first_bit,
  input  logic             u_hat,
  output logic [BIP_N-1:0] bip
);

  logic [BIP_N-1:0] base;
  logic             sum;

  always_comb begin
    base = first_bit ? '0 : bip;
    sum  = base[0] ^ u_hat;          // the single modulo-2 adder
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)
      bip <= '0;
    else if (bit_valid)
      bip <= {sum, base[BIP_N-1:1]};
  end

endmodule
