// ft_partial_adder4: fault-tolerant 4-bit partial adder, A + cin.
//
// Same function as partial_adder4. Each of its three units is duplicated and
// each pair is followed by a correction circuit, so that a fault in one copy
// never reaches the next unit:
//   carryb_gen4 x2 -> carcorb  (trust a 0: most chain faults read 1)
//   inverters   x2 -> invcor   (pick the copy that matches NOT correctcarryb)
//   sum_xor4    x2 -> xorcor   (pick the copy that matches A xor C)
// The adder gives the right sum and carry as long as, per bit, the two
// copies of a unit do not fail to the same wrong value, the carryb copies
// fail only towards 1 and the correction circuits themselves are fault free.
//
// Interface: a[3:0], cin; s[3:0], cout. faults injects stuck-at values into
// the unit copies for test (adder_pkg::ft_faults_t, u1 = carryb chain,
// u2 = inverters, u3 = XORs); tie it to adder_pkg::NO_FAULTS in use.
// Combinational.
module ft_partial_adder4
  import adder_pkg::*;
(
  input  logic [3:0]  a,
  input  logic        cin,
  input  ft_faults_t  faults,
  output logic [3:0]  s,
  output logic        cout
);
  logic [3:0] cb_raw, cbd_raw, cb, cbd, ccb;
  logic [3:0] inv1, inv2, carry;
  logic [3:0] cvec;
  logic [3:0] s1_raw, s2_raw, s1, s2;

  // Carryb generation, duplicated.
  carryb_gen4 u_cgen  (.a(a), .cin(cin), .carryb(cb_raw));
  carryb_gen4 u_cgend (.a(a), .cin(cin), .carryb(cbd_raw));

  always_comb begin
    cb  = inject4(cb_raw,  faults.u1);
    cbd = inject4(cbd_raw, faults.u1d);
  end

  carcorb #(.W(4)) u_carcorb (.carryb(cb), .carrybdup(cbd), .correctcarryb(ccb));

  // Inverter sets, duplicated.
  always_comb begin
    inv1 = inject4(~ccb, faults.u2);
    inv2 = inject4(~ccb, faults.u2d);
  end

  invcor #(.W(4)) u_invcor (.correctcarryb(ccb), .carry1(inv1), .carry2(inv2), .correctcarry(carry));

  // Sum XORs, duplicated, fed with the corrected carries.
  assign cvec = {carry[2:0], cin};

  sum_xor4 u_xor  (.x(a), .c(cvec), .s(s1_raw));
  sum_xor4 u_xord (.x(a), .c(cvec), .s(s2_raw));

  always_comb begin
    s1 = inject4(s1_raw, faults.u3);
    s2 = inject4(s2_raw, faults.u3d);
  end

  xorcor #(.W(4)) u_xorcor (.a(a), .c(cvec), .sum1(s1), .sum2(s2), .correctsum(s));

  assign cout = carry[3];
endmodule
