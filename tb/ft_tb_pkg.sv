// ft_tb_pkg: random stuck-at fault patterns for the fault-tolerant adder
// testbenches, restricted to what the correction circuits are designed to
// mask.
//
// Each unit pair is of one of three kinds:
//   PICK   (Gen:P&G, inverters, XORs): the right value is known, so any
//          fault is masked unless both copies read 0 where 1 is right;
//          allowed per bit: no fault, one copy stuck at 0 or 1, or one copy
//          stuck at 0 and the other stuck at 1.
//   TRUST0 (carryb chain): a 0 is trusted, so only stuck-at-1 is masked,
//          in one copy per bit.
//   TRUST1 (Gen:Car): a 1 is trusted, so only stuck-at-0 is masked, in one
//          copy per bit.
package ft_tb_pkg;
  import adder_pkg::*;

  typedef enum int {PICK, TRUST0, TRUST1} unit_kind_t;

  // Fills f1/f2 (the masks of the two copies of one unit) for nbits bits.
  function automatic void rand_pair(input unit_kind_t kind, input int nbits,
                           output stuck_t f1, output stuck_t f2);
    f1 = '0;
    f2 = '0;
    for (int i = 0; i < nbits; i++) begin
      int unsigned r, t;
      r = $urandom_range(0, 4);
      t = $urandom_range(0, 1);
      case (kind)
        PICK: case (r)
          1: if (t != 0) f1.sa1[i] = 1'b1; else f1.sa0[i] = 1'b1;
          2: if (t != 0) f2.sa1[i] = 1'b1; else f2.sa0[i] = 1'b1;
          3: begin f1.sa0[i] = 1'b1; f2.sa1[i] = 1'b1; end
          4: begin f1.sa1[i] = 1'b1; f2.sa0[i] = 1'b1; end
          default: ;
        endcase
        TRUST0: case (r)
          1, 3: f1.sa1[i] = 1'b1;
          2, 4: f2.sa1[i] = 1'b1;
          default: ;
        endcase
        TRUST1: case (r)
          1, 3: f1.sa0[i] = 1'b1;
          2, 4: f2.sa0[i] = 1'b1;
          default: ;
        endcase
        default: ;
      endcase
    end
  endfunction

  // A complete masked fault set for a fault-tolerant partial adder.
  function automatic ft_faults_t rand_partial_faults();
    ft_faults_t f;
    rand_pair(TRUST0, 4, f.u1, f.u1d);
    rand_pair(PICK,   4, f.u2, f.u2d);
    rand_pair(PICK,   4, f.u3, f.u3d);
    return f;
  endfunction

  // A complete masked fault set for a fault-tolerant full adder.
  function automatic ft_faults_t rand_full_faults();
    ft_faults_t f;
    rand_pair(PICK,   8, f.u1, f.u1d);
    rand_pair(TRUST1, 4, f.u2, f.u2d);
    rand_pair(PICK,   4, f.u3, f.u3d);
    return f;
  endfunction

  // True when a fault set leaves at least one unit output stuck.
  function automatic bit any_fault(input ft_faults_t f);
    return f != '0;
  endfunction
endpackage
