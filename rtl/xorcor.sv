// xorcor: XOR correction circuit (XORCOR) of both fault-tolerant adders.
//
// Two XOR sets compute the sum bits. Both their inputs are already corrected,
// so the right sum is known to be A_i xor C_{i-1}; the circuit passes a 1 only
// when that is the right value and at least one XOR agrees:
// correctsum_i = (A_i xor C_{i-1}) . (sum1_i + sum2_i).
// The output is wrong only when the right value is 1 and both XORs read 0.
// (In the full adder, A is the corrected propagate term P.)
//
// Interface: a[W-1:0] per-bit operand term, c[W-1:0] carry into each bit,
// sum1/sum2 from the two XOR sets; correctsum. Combinational.
module xorcor #(
  parameter int unsigned W = 4
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] c,
  input  logic [W-1:0] sum1,
  input  logic [W-1:0] sum2,
  output logic [W-1:0] correctsum
);
  always_comb correctsum = (a ^ c) & (sum1 | sum2);
endmodule
