// pgcor: generate/propagate correction circuit (PGCOR) of the fault-tolerant
// full adder.
//
// Two Gen:P&G copies produce P and G. Since the adder inputs are known, so
// are the right values, and each is passed only when it is 1 and at least one
// copy agrees:
//   Pcorrect = (A xor B) . (P1 + P2),  Gcorrect = (A . B) . (G1 + G2).
// Any fault pattern is masked as long as the two copies do not both read 0
// where the right value is 1.
//
// Interface: a, b[W-1:0] adder operands; p1/p2, g1/g2 from the two copies;
// pcorrect, gcorrect. Combinational.
module pgcor #(
  parameter int unsigned W = 4
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic [W-1:0] p1,
  input  logic [W-1:0] p2,
  input  logic [W-1:0] g1,
  input  logic [W-1:0] g2,
  output logic [W-1:0] pcorrect,
  output logic [W-1:0] gcorrect
);
  always_comb begin
    pcorrect = (a ^ b) & (p1 | p2);
    gcorrect = (a & b) & (g1 | g2);
  end
endmodule
