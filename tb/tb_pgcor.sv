// tb_pgcor: checks the generate/propagate correction circuit. Part 1
// compares every output bit with its truth table for random inputs. Part 2
// models its use: one Gen:P&G copy right, the other stuck at any value; the
// outputs must be the right P and G of the operands.
module tb_pgcor;
  logic [3:0] a, b, p1, p2, g1, g2, pc, gc;
  int checks = 0, failures = 0;

  pgcor #(.W(4)) dut (.a(a), .b(b), .p1(p1), .p2(p2), .g1(g1), .g2(g2),
                      .pcorrect(pc), .gcorrect(gc));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 2000; n++) begin
      {a, b, p1, p2, g1, g2} = 24'($urandom);
      #1;
      for (int i = 0; i < 4; i++) begin
        logic ep, eg;
        ep = (a[i] != b[i]) && (p1[i] || p2[i]);
        eg = (a[i] && b[i]) && (g1[i] || g2[i]);
        checks++;
        if (pc[i] !== ep || gc[i] !== eg) begin
          failures++;
          $display("FAIL a=%b b=%b p=%b/%b g=%b/%b bit %0d", a, b, p1, p2, g1, g2, i);
        end
      end
    end
    for (int n = 0; n < 500; n++) begin
      logic [3:0] rp, rg, badp, badg;
      a = 4'($urandom);
      b = 4'($urandom);
      badp = 4'($urandom);
      badg = 4'($urandom);
      for (int i = 0; i < 4; i++) begin
        rp[i] = (a[i] + b[i]) == 1;
        rg[i] = (a[i] + b[i]) == 2;
      end
      if (n % 2 == 0) begin p1 = rp; g1 = rg; p2 = badp; g2 = badg; end
      else            begin p2 = rp; g2 = rg; p1 = badp; g1 = badg; end
      #1;
      checks++;
      if (pc !== rp || gc !== rg) begin
        failures++;
        $display("FAIL masking: a=%b b=%b got p=%b g=%b", a, b, pc, gc);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
