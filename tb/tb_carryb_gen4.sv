// tb_carryb_gen4: exhaustive check of the partial adder's carryb chain.
// For every operand and carry in, each active-low carry is compared with
// NOT(cin AND a[0] AND ... AND a[i]) worked out bit by bit.
module tb_carryb_gen4;
  logic [3:0] a, carryb;
  logic       cin;
  int checks = 0, failures = 0;

  carryb_gen4 dut (.a(a), .cin(cin), .carryb(carryb));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 32; v++) begin
      logic run;
      {cin, a} = 5'(v);
      #1;
      run = cin;
      for (int i = 0; i < 4; i++) begin
        run = run && a[i];
        checks++;
        if (carryb[i] !== !run) begin
          failures++;
          $display("FAIL a=%b cin=%b bit %0d: carryb=%b", a, cin, i, carryb[i]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
