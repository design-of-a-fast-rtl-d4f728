// tb_sum_xor4: exhaustive check of the 4-bit XOR sum unit: each sum bit must
// be 1 exactly when its two inputs differ.
module tb_sum_xor4;
  logic [3:0] x, c, s;
  int checks = 0, failures = 0;

  sum_xor4 dut (.x(x), .c(c), .s(s));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 256; v++) begin
      {x, c} = 8'(v);
      #1;
      for (int i = 0; i < 4; i++) begin
        checks++;
        if (s[i] !== (x[i] != c[i])) begin
          failures++;
          $display("FAIL x=%b c=%b bit %0d", x, c, i);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
