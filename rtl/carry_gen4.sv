// carry_gen4: carry look-ahead unit (Gen:Car) of the full 4-bit adder.
//
// Computes every carry of the 4-bit slice directly from the generate and
// propagate terms and the carry in, C_i = G_i + P_i . C_{i-1}, expanded so no
// carry waits for the one below it (the original builds all four from one
// multiple-output domino tree).
//
// Interface: g[3:0], p[3:0] from Gen:P&G, cin carry in; c[i] is the carry
// out of bit i, c[3] the carry out of the slice. Combinational.
module carry_gen4 (
  input  logic [3:0] g,
  input  logic [3:0] p,
  input  logic       cin,
  output logic [3:0] c
);
  always_comb begin
    c[0] = g[0] | (p[0] & cin);
    c[1] = g[1] | (p[1] & g[0]) | (p[1] & p[0] & cin);
    c[2] = g[2] | (p[2] & g[1]) | (p[2] & p[1] & g[0]) | (p[2] & p[1] & p[0] & cin);
    c[3] = g[3] | (p[3] & g[2]) | (p[3] & p[2] & g[1]) | (p[3] & p[2] & p[1] & g[0])
         | (p[3] & p[2] & p[1] & p[0] & cin);
  end
endmodule
