// tb_pg_gen4: exhaustive check of Gen:P&G. Per bit, G must be 1 only for
// 1+1 and P only for 0+1 / 1+0, and P and G must never both be 1.
module tb_pg_gen4;
  logic [3:0] a, b, g, p;
  int checks = 0, failures = 0;

  pg_gen4 dut (.a(a), .b(b), .g(g), .p(p));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 256; v++) begin
      {a, b} = 8'(v);
      #1;
      for (int i = 0; i < 4; i++) begin
        int n;
        n = int'(a[i]) + int'(b[i]);
        checks++;
        if (g[i] !== (n == 2) || p[i] !== (n == 1) || (g[i] && p[i])) begin
          failures++;
          $display("FAIL a=%b b=%b bit %0d: g=%b p=%b", a, b, i, g[i], p[i]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
