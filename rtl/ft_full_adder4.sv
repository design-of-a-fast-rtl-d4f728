// ft_full_adder4: fault-tolerant full 4-bit adder, A + B + cin.
//
// Same function as full_adder4. Each of its three units is duplicated and
// each pair is followed by a correction circuit:
//   pg_gen4    x2 -> pgcor   (pick the copy that matches A.B and A xor B)
//   carry_gen4 x2 -> carcor  (trust a 1, or a set corrected G)
//   sum_xor4   x2 -> xorcor  (pick the copy that matches P xor C)
// Both carry trees and both XOR sets are fed with corrected values only, so
// a fault stays inside the copy where it occurs. The result is right as long
// as, per bit, the two copies of a unit do not fail to the same wrong value,
// the carry copies fail only towards 0 and the correction circuits are fault
// free.
//
// Interface: a[3:0], b[3:0], cin; s[3:0], cout. faults injects stuck-at
// values for test (u1 = Gen:P&G with G in [3:0] and P in [7:4], u2 = Gen:Car,
// u3 = XORs); tie it to adder_pkg::NO_FAULTS in use. Combinational.
module ft_full_adder4
  import adder_pkg::*;
(
  input  logic [3:0]  a,
  input  logic [3:0]  b,
  input  logic        cin,
  input  ft_faults_t  faults,
  output logic [3:0]  s,
  output logic        cout
);
  logic [3:0] g1_raw, p1_raw, g2_raw, p2_raw;
  logic [3:0] g1, p1, g2, p2, gc, pc;
  logic [3:0] c1_raw, c2_raw, c1, c2, carry;
  logic [3:0] cvec;
  logic [3:0] s1_raw, s2_raw, s1, s2;
  logic [7:0] f_pg1, f_pg2;

  // Gen:P&G, duplicated.
  pg_gen4 u_pg  (.a(a), .b(b), .g(g1_raw), .p(p1_raw));
  pg_gen4 u_pgd (.a(a), .b(b), .g(g2_raw), .p(p2_raw));

  always_comb begin
    f_pg1 = inject({p1_raw, g1_raw}, faults.u1);
    f_pg2 = inject({p2_raw, g2_raw}, faults.u1d);
    {p1, g1} = f_pg1;
    {p2, g2} = f_pg2;
  end

  pgcor #(.W(4)) u_pgcor (.a(a), .b(b), .p1(p1), .p2(p2), .g1(g1), .g2(g2),
                          .pcorrect(pc), .gcorrect(gc));

  // Gen:Car, duplicated, fed with corrected P and G.
  carry_gen4 u_car  (.g(gc), .p(pc), .cin(cin), .c(c1_raw));
  carry_gen4 u_card (.g(gc), .p(pc), .cin(cin), .c(c2_raw));

  always_comb begin
    c1 = inject4(c1_raw, faults.u2);
    c2 = inject4(c2_raw, faults.u2d);
  end

  carcor #(.W(4)) u_carcor (.carry(c1), .carryd(c2), .gcorrect(gc), .carrycorrect(carry));

  // Sum XORs, duplicated.
  assign cvec = {carry[2:0], cin};

  sum_xor4 u_xor  (.x(pc), .c(cvec), .s(s1_raw));
  sum_xor4 u_xord (.x(pc), .c(cvec), .s(s2_raw));

  always_comb begin
    s1 = inject4(s1_raw, faults.u3);
    s2 = inject4(s2_raw, faults.u3d);
  end

  xorcor #(.W(4)) u_xorcor (.a(pc), .c(cvec), .sum1(s1), .sum2(s2), .correctsum(s));

  assign cout = carry[3];
endmodule
