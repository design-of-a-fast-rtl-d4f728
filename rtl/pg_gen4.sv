// pg_gen4: generate and propagate unit (Gen:P&G) of the full 4-bit adder.
//
// G_i = A_i . B_i marks a bit that creates a carry. The propagate term is an
// XOR, P_i = A_i xor B_i, not the OR often used: with XOR, P and G are never
// 1 together, which the original dynamic carry chain needs to avoid charge
// sharing, and P doubles as the half sum used by the sum unit.
//
// Interface: a[3:0], b[3:0] operands; g[3:0], p[3:0]. Combinational.
module pg_gen4 (
  input  logic [3:0] a,
  input  logic [3:0] b,
  output logic [3:0] g,
  output logic [3:0] p
);
  always_comb begin
    g = a & b;
    p = a ^ b;
  end
endmodule
