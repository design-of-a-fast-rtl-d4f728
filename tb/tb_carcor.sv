// tb_carcor: checks the carry correction circuit. Part 1 walks all per-bit
// input combinations: the output must be 1 when any of carry, carryd or
// gcorrect is 1. Part 2 models its use on real carries of a + b: one Gen:Car
// copy right and the other stuck at 0 in some bits must give the right
// carries.
module tb_carcor;
  logic [3:0] c1, c2, gc, cc;
  int checks = 0, failures = 0;

  carcor #(.W(4)) dut (.carry(c1), .carryd(c2), .gcorrect(gc), .carrycorrect(cc));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 4096; v++) begin
      {c1, c2, gc} = 12'(v);
      #1;
      for (int i = 0; i < 4; i++) begin
        checks++;
        if (cc[i] !== ({c1[i], c2[i], gc[i]} != 3'b000)) begin
          failures++;
          $display("FAIL c1=%b c2=%b g=%b bit %0d", c1, c2, gc, i);
        end
      end
    end
    for (int n = 0; n < 500; n++) begin
      logic [3:0] a, b, right, drop;
      logic ci;
      int run;
      a = 4'($urandom);
      b = 4'($urandom);
      ci = 1'($urandom);
      drop = 4'($urandom);
      run = int'(ci);
      for (int i = 0; i < 4; i++) begin
        run = (int'(a[i]) + int'(b[i]) + run) / 2;
        right[i] = run[0];
      end
      gc = a & b;
      if (n % 2 == 0) begin c1 = right; c2 = right & ~drop; end
      else            begin c2 = right; c1 = right & ~drop; end
      #1;
      checks++;
      if (cc !== right) begin
        failures++;
        $display("FAIL masking: a=%b b=%b cin=%b got %b want %b", a, b, ci, cc, right);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
