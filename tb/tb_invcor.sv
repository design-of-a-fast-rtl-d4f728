// tb_invcor: checks the inverter correction circuit. Part 1 walks all
// per-bit input combinations against the truth table of
// NOT(correctcarryb) AND (carry1 OR carry2). Part 2 models its use: with one
// inverter right and the other stuck at any value, the output must be
// NOT(correctcarryb).
module tb_invcor;
  logic [3:0] ccb, c1, c2, cc;
  int checks = 0, failures = 0;

  invcor #(.W(4)) dut (.correctcarryb(ccb), .carry1(c1), .carry2(c2), .correctcarry(cc));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 4096; v++) begin
      {ccb, c1, c2} = 12'(v);
      #1;
      for (int i = 0; i < 4; i++) begin
        logic e;
        case ({ccb[i], c1[i], c2[i]})
          3'b001, 3'b010, 3'b011: e = 1'b1;
          default:                e = 1'b0;
        endcase
        checks++;
        if (cc[i] !== e) begin
          failures++;
          $display("FAIL ccb=%b c1=%b c2=%b bit %0d", ccb, c1, c2, i);
        end
      end
    end
    for (int n = 0; n < 500; n++) begin
      logic [3:0] bad;
      ccb = 4'($urandom);
      bad = 4'($urandom);
      if (n % 2 == 0) begin c1 = ~ccb; c2 = bad; end
      else            begin c1 = bad;  c2 = ~ccb; end
      #1;
      checks++;
      if (cc !== ~ccb) begin
        failures++;
        $display("FAIL masking: ccb=%b c1=%b c2=%b got %b", ccb, c1, c2, cc);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
