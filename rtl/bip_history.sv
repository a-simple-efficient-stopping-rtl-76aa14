// bip_history: memory of the previous pass's BIP and the n-bit comparator.
//
// This is the storage and comparison side of the BHDA criterion: n memory
// bits hold BIP(i-1) and an n-bit equality comparator checks it against
// BIP(i). The comparison is combinational; the memory is written on load,
// at the same clock edge at which the controller takes the decision, so the
// decision always sees the previous pass's value.
//
// Interface: bip_in is the BIP of the pass that has just ended; match is
// (bip_in == bip_prev). load stores bip_in. Whether a stored value exists
// (i >= 2) is judged by the controller from its iteration count. Reset
// (active low, asynchronous) clears the memory.
module bip_history #(
  parameter int unsigned BIP_N = bhda_pkg::DEF_BIP_N
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             load,
  input  logic [BIP_N-1:0] bip_in,
  output logic [BIP_N-1:0] bip_prev,
  output logic             match
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)
      bip_prev <= '0;
    else if (load)
      bip_prev <= bip_in;
  end

  assign match = (bip_in == bip_prev);

endmodule
