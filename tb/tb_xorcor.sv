// tb_xorcor: checks the XOR correction circuit. Part 1 walks all per-bit
// input combinations against the truth table of (a XOR c) AND (sum1 OR sum2).
// Part 2 models its use: with one XOR set right and the other stuck at any
// value, the output must be a XOR c.
module tb_xorcor;
  logic [3:0] a, c, s1, s2, s;
  int checks = 0, failures = 0;

  xorcor #(.W(4)) dut (.a(a), .c(c), .sum1(s1), .sum2(s2), .correctsum(s));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 65536; v += 7) begin
      {a, c, s1, s2} = 16'(v);
      #1;
      for (int i = 0; i < 4; i++) begin
        logic e;
        e = (a[i] != c[i]) && (s1[i] || s2[i]);
        checks++;
        if (s[i] !== e) begin
          failures++;
          $display("FAIL a=%b c=%b s1=%b s2=%b bit %0d", a, c, s1, s2, i);
        end
      end
    end
    for (int n = 0; n < 500; n++) begin
      logic [3:0] bad, right;
      a = 4'($urandom);
      c = 4'($urandom);
      bad = 4'($urandom);
      for (int i = 0; i < 4; i++) right[i] = (a[i] != c[i]);
      if (n % 2 == 0) begin s1 = right; s2 = bad; end
      else            begin s1 = bad;   s2 = right; end
      #1;
      checks++;
      if (s !== right) begin
        failures++;
        $display("FAIL masking: a=%b c=%b s1=%b s2=%b got %b", a, c, s1, s2, s);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
