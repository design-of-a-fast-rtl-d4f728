// partial_adder4: 4-bit partial adder, A + cin.
//
// Used for the upper four slices of the accumulator, which only ever add the
// carry of the slice below to their stored nibble. It is built from three
// units as in the original design: the carryb generation chain
// (carryb_gen4), a set of four inverters that turn carryb into carries, and
// the XOR sum unit (sum_xor4) computing S_i = A_i xor C_{i-1}.
//
// Interface: a[3:0] operand, cin carry in, s[3:0] sum, cout carry out.
// Combinational; the result settles within the clock period in which the
// accumulator stores it.
module partial_adder4 (
  input  logic [3:0] a,
  input  logic       cin,
  output logic [3:0] s,
  output logic       cout
);
  logic [3:0] carryb, carry;

  carryb_gen4 u_cgen (.a(a), .cin(cin), .carryb(carryb));

  // Inverter set.
  always_comb carry = ~carryb;

  sum_xor4 u_xor (.x(a), .c({carry[2:0], cin}), .s(s));

  assign cout = carry[3];
endmodule
