// adder_pkg: types and helpers shared by the 4-bit adders, their
// fault-tolerant versions and the pipelined adder accumulator.
//
// The fault-tolerant adders duplicate each of their three units and follow
// every pair with a correction circuit. To exercise the correction in
// simulation, every unit copy carries a stuck-at mask: a unit output bit can
// be forced to 0 (sa0) or to 1 (sa1, which wins over sa0). In normal use all
// masks are tied to zero, and synthesis then removes the masking logic. The
// masks are this design's own means of injecting faults; the original circuit
// was checked by injecting transistor shorts and opens in a circuit simulator.
package adder_pkg;

  // Width of one adder slice: the pipeline is built from 4-bit adders.
  localparam int unsigned NIB = 4;

  // Stuck-at mask for one unit copy. Up to 8 output bits: Gen:P&G uses
  // [3:0] for G and [7:4] for P; all other units use [3:0] only.
  typedef struct packed {
    logic [7:0] sa0;
    logic [7:0] sa1;
  } stuck_t;

  // Masks for the six unit copies of one fault-tolerant 4-bit adder.
  // u1: carry(b) generation (partial adder) or Gen:P&G (full adder)
  // u2: inverter set (partial adder) or Gen:Car (full adder)
  // u3: XOR sum set (both adders); a suffix d marks the duplicate copy.
  typedef struct packed {
    stuck_t u1, u1d;
    stuck_t u2, u2d;
    stuck_t u3, u3d;
  } ft_faults_t;

  localparam ft_faults_t NO_FAULTS = '0;

  // Apply a stuck-at mask to an 8-bit unit output.
  function automatic logic [7:0] inject(input logic [7:0] v, input stuck_t f);
    return (v & ~f.sa0) | f.sa1;
  endfunction

  // Apply bits [3:0] of a stuck-at mask to a 4-bit unit output.
  function automatic logic [3:0] inject4(input logic [3:0] v, input stuck_t f);
    return (v & ~f.sa0[3:0]) | f.sa1[3:0];
  endfunction

endpackage
