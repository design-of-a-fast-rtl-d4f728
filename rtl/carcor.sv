// carcor: carry correction circuit (CARCOR) of the fault-tolerant full
// adder.
//
// Two Gen:Car copies produce the carries. The circuit reads a 1 when either
// copy reads 1 or the corrected generate term of that bit is 1 (a set G
// always means a carry): carrycorrect = carry + carryd + Gcorrect.
// This follows the fault analysis of the carry tree, whose likely faults
// leave a carry stuck at 0 or weak where 1 is right; a copy that wrongly
// reads 1 is not corrected.
//
// Interface: carry/carryd[W-1:0] from the two copies, gcorrect from pgcor;
// carrycorrect. Combinational.
module carcor #(
  parameter int unsigned W = 4
) (
  input  logic [W-1:0] carry,
  input  logic [W-1:0] carryd,
  input  logic [W-1:0] gcorrect,
  output logic [W-1:0] carrycorrect
);
  always_comb carrycorrect = carry | carryd | gcorrect;
endmodule
