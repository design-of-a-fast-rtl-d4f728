// tb_ft_full_adder4: checks the fault-tolerant full 4-bit adder. Every
// operand pair and carry in is applied fault free, then 20 times each with a
// random set of stuck-at faults of the kinds the correction circuits are
// designed to mask (ft_tb_pkg). The result must equal a + b + cin every time.
// A fault both Gen:Car copies share is applied last, to see that it is not
// masked.
module tb_ft_full_adder4;
  import adder_pkg::*;
  import ft_tb_pkg::*;

  logic [3:0]  a, b, s;
  logic        cin, cout;
  ft_faults_t  faults;
  int checks = 0, failures = 0, faulty_vectors = 0;

  ft_full_adder4 dut (.a(a), .b(b), .cin(cin), .faults(faults), .s(s), .cout(cout));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 512; v++) begin
      for (int n = 0; n < 21; n++) begin
        int exp;
        {cin, a, b} = 9'(v);
        faults = (n == 0) ? NO_FAULTS : rand_full_faults();
        if (any_fault(faults)) faulty_vectors++;
        #1;
        exp = int'(a) + int'(b) + int'(cin);
        checks++;
        if ({cout, s} !== 5'(exp)) begin
          failures++;
          $display("FAIL %0d + %0d + %0d got %0d (faults %h)", a, b, cin, {cout, s}, faults);
        end
      end
    end
    // Identical double fault: both carry trees lose carry 4, which here is
    // propagated (P4 = 1, G4 = 0), so the generate term cannot save it.
    a = 4'b1001; b = 4'b0111; cin = 1'b0;
    faults = NO_FAULTS;
    faults.u2.sa0[3]  = 1'b1;
    faults.u2d.sa0[3] = 1'b1;
    #1;
    checks++;
    if (cout !== 1'b0) begin
      failures++;
      $display("FAIL identical double fault was expected to show on cout");
    end
    checks++;
    if (faulty_vectors < 5000) begin
      failures++;
      $display("FAIL only %0d vectors ran with faults", faulty_vectors);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
