// sum_xor4: sum unit of both 4-bit adders, four static XOR gates.
//
// Each sum bit is the XOR of a per-bit operand term and the carry into that
// bit: S_i = X_i xor C_{i-1}. In the partial adder X is the operand bit
// itself; in the full adder X is the propagate term P_i = A_i xor B_i.
//
// Interface: x[3:0] per-bit term, c[3:0] carry into each bit (c[0] is the
// adder's carry in), s[3:0] sum. Combinational.
module sum_xor4 (
  input  logic [3:0] x,
  input  logic [3:0] c,
  output logic [3:0] s
);
  always_comb s = x ^ c;
endmodule
