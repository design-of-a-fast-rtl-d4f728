// full_adder4: full 4-bit carry-look-ahead adder, A + B + cin.
//
// Used for the two lowest slices of the accumulator, where a pixel nibble is
// added to the stored nibble. It chains the three units of the original
// design: Gen:P&G (pg_gen4), Gen:Car (carry_gen4) and the XOR sum unit
// (sum_xor4), with S_i = P_i xor C_{i-1}.
//
// Interface: a[3:0], b[3:0] operands, cin carry in, s[3:0] sum, cout carry
// out. Combinational.
module full_adder4 (
  input  logic [3:0] a,
  input  logic [3:0] b,
  input  logic       cin,
  output logic [3:0] s,
  output logic       cout
);
  logic [3:0] g, p, c;

  pg_gen4    u_pg  (.a(a), .b(b), .g(g), .p(p));
  carry_gen4 u_car (.g(g), .p(p), .cin(cin), .c(c));
  sum_xor4   u_xor (.x(p), .c({c[2:0], cin}), .s(s));

  assign cout = c[3];
endmodule
