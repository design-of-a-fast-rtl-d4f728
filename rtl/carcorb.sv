// carcorb: carryb correction circuit (CARCORb) of the fault-tolerant partial
// adder.
//
// Two copies of the carryb generation chain feed this circuit. It passes a 0
// whenever either copy reads 0 and a 1 only when both read 1, i.e. a bitwise
// AND of the active-low carries. The choice follows the fault analysis of the
// chain: most of its faults leave a carryb stuck at 1 (or at a weak value
// where 0 is correct), so a 0 from either copy is trusted. A copy that
// wrongly reads 0 is not corrected. The original also holds its output at 1
// while the clock is low; that precharge has no counterpart here.
//
// Interface: carryb, carrybdup[W-1:0] from the two copies; correctcarryb.
// Combinational.
module carcorb #(
  parameter int unsigned W = 4
) (
  input  logic [W-1:0] carryb,
  input  logic [W-1:0] carrybdup,
  output logic [W-1:0] correctcarryb
);
  always_comb correctcarryb = carryb & carrybdup;
endmodule
