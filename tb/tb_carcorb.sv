// tb_carcorb: checks the carryb correction circuit. Part 1 walks all 4-bit
// pairs of carryb copies: each output bit must be 0 when either copy is 0.
// Part 2 models its use: a right carryb value, one copy right and the other
// stuck at 1, must give back the right value.
module tb_carcorb;
  logic [3:0] cb, cbd, ccb;
  int checks = 0, failures = 0;

  carcorb #(.W(4)) dut (.carryb(cb), .carrybdup(cbd), .correctcarryb(ccb));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 256; v++) begin
      {cb, cbd} = 8'(v);
      #1;
      for (int i = 0; i < 4; i++) begin
        checks++;
        if (ccb[i] !== ((cb[i] == 1'b0 || cbd[i] == 1'b0) ? 1'b0 : 1'b1)) begin
          failures++;
          $display("FAIL cb=%b cbd=%b bit %0d", cb, cbd, i);
        end
      end
    end
    for (int n = 0; n < 500; n++) begin
      logic [3:0] right, stuck;
      right = 4'($urandom);
      stuck = 4'($urandom);
      if (n % 2 == 0) begin cb = right | stuck; cbd = right; end
      else            begin cb = right; cbd = right | stuck; end
      #1;
      checks++;
      if (ccb !== right) begin
        failures++;
        $display("FAIL masking: right=%b cb=%b cbd=%b got %b", right, cb, cbd, ccb);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
