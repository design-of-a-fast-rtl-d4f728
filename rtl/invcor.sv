// invcor: inverter correction circuit (INVCOR) of the fault-tolerant partial
// adder.
//
// The corrected carryb is inverted by two inverters. Since the correct
// carry is known to be NOT(correctcarryb), the circuit passes a 1 only when
// that is the right value and at least one inverter agrees:
// correctcarry = NOT(correctcarryb) . (carry1 + carry2).
// Any fault in one inverter is masked; the output is wrong only when the
// right value is 1 and both inverters read 0.
//
// Interface: correctcarryb[W-1:0] from carcorb, carry1/carry2 from the two
// inverter sets; correctcarry. Combinational.
module invcor #(
  parameter int unsigned W = 4
) (
  input  logic [W-1:0] correctcarryb,
  input  logic [W-1:0] carry1,
  input  logic [W-1:0] carry2,
  output logic [W-1:0] correctcarry
);
  always_comb correctcarry = ~correctcarryb & (carry1 | carry2);
endmodule
