// tb_carry_gen4: exhaustive check of Gen:Car. Operands a, b and cin are
// turned into G and P by the testbench itself; every carry must equal the
// carry out of the low i+1 bits of a + b + cin worked out with integers.
module tb_carry_gen4;
  logic [3:0] g, p, c;
  logic       cin;
  int checks = 0, failures = 0;

  carry_gen4 dut (.g(g), .p(p), .cin(cin), .c(c));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 512; v++) begin
      logic [3:0] a, b;
      {cin, a, b} = 9'(v);
      g = a & b;
      p = a ^ b;
      #1;
      for (int i = 0; i < 4; i++) begin
        int m, lo;
        m  = (1 << (i + 1)) - 1;
        lo = (int'(a) & m) + (int'(b) & m) + int'(cin);
        checks++;
        if (c[i] !== (lo > m)) begin
          failures++;
          $display("FAIL a=%0d b=%0d cin=%0d carry %0d = %b", a, b, cin, i, c[i]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
