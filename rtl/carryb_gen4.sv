// carryb_gen4: carry generation unit of the 4-bit partial adder.
//
// The partial adder adds one carry bit to a 4-bit number, so bit i can only
// produce a carry when its operand bit and the carry into it are both 1:
// C_i = A_i . C_{i-1}, with C_0 the carry in. In the original circuit these
// four terms come out of one series transistor chain as active-low nodes
// (carryb), one per intermediate node of the chain, which is why the outputs
// here are active low as well.
//
// Interface: a[3:0] operand, cin carry in; carryb[i] = NOT(carry out of bit i),
// carryb[3] being the inverted carry out of the adder. Purely combinational:
// the precharge/evaluate clocking of the original dynamic gate has no
// counterpart here.
module carryb_gen4 (
  input  logic [3:0] a,
  input  logic       cin,
  output logic [3:0] carryb
);
  // Look-ahead form: each carry is the AND of the carry in and all operand
  // bits up to its position, as in the series chain.
  always_comb begin
    carryb[0] = ~(cin & a[0]);
    carryb[1] = ~(cin & a[0] & a[1]);
    carryb[2] = ~(cin & a[0] & a[1] & a[2]);
    carryb[3] = ~(cin & a[0] & a[1] & a[2] & a[3]);
  end
endmodule
