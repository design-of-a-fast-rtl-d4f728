// tb_partial_adder4: exhaustive check of the 4-bit partial adder against
// integer addition, {cout, s} = a + cin.
module tb_partial_adder4;
  logic [3:0] a, s;
  logic       cin, cout;
  int checks = 0, failures = 0;

  partial_adder4 dut (.a(a), .cin(cin), .s(s), .cout(cout));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 32; v++) begin
      int exp;
      {cin, a} = 5'(v);
      #1;
      exp = int'(a) + int'(cin);
      checks++;
      if ({cout, s} !== 5'(exp)) begin
        failures++;
        $display("FAIL a=%0d cin=%0d got %0d", a, cin, {cout, s});
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
