// tb_ft_partial_adder4: checks the fault-tolerant partial adder. Every
// operand and carry in is applied fault free, then 40 times each with a
// random set of stuck-at faults of the kinds the correction circuits are
// designed to mask (ft_tb_pkg). The sum must equal a + cin every time. A
// fault set that leaves both inverter copies stuck at 0 on the carry out is
// applied last, to see that the design does not mask what it does not claim.
module tb_ft_partial_adder4;
  import adder_pkg::*;
  import ft_tb_pkg::*;

  logic [3:0]  a, s;
  logic        cin, cout;
  ft_faults_t  faults;
  int checks = 0, failures = 0, faulty_vectors = 0;

  ft_partial_adder4 dut (.a(a), .cin(cin), .faults(faults), .s(s), .cout(cout));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 32; v++) begin
      for (int n = 0; n < 41; n++) begin
        int exp;
        {cin, a} = 5'(v);
        faults = (n == 0) ? NO_FAULTS : rand_partial_faults();
        if (any_fault(faults)) faulty_vectors++;
        #1;
        exp = int'(a) + int'(cin);
        checks++;
        if ({cout, s} !== 5'(exp)) begin
          failures++;
          $display("FAIL a=%0d cin=%0d got %0d (faults %h)", a, cin, {cout, s}, faults);
        end
      end
    end
    // Double fault beyond the design's claim: both inverters of carry 4 stuck at 0.
    a = 4'hF; cin = 1'b1;
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
    if (faulty_vectors < 1000) begin
      failures++;
      $display("FAIL only %0d vectors ran with faults", faulty_vectors);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
