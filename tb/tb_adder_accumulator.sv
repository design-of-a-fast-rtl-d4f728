// tb_adder_accumulator: checks the 24-bit pipelined accumulator, in its
// fault-tolerant form (dut_ft, default parameters) and its plain form
// (dut_pl), side by side on the same words.
//
//  1. The worked example of a stream of FF words: slice nibbles and carry
//     flip-flops after each of the first five words.
//     Then four FF words followed by zero words: 3FC after the flush.
//  2. The worked example of a carry crossing all slices: the sum is brought
//     to 7FFFFF, then 0F is added; each of the following steps is compared
//     with the expected slice values and the sum 80000E must appear exactly
//     5 words after the 0F and not one word earlier.
//  3. Random words with random gaps in data_valid and random masked faults
//     in dut_ft, against a slice-by-slice reference model and, after every
//     5-word flush, against the plain integer sum.
//  4. init clears the sum and the carries.
module tb_adder_accumulator;
  import adder_pkg::*;
  import ft_tb_pkg::*;

  localparam int NS = 6;

  logic        clk = 1'b0, rst_n = 1'b0, init = 1'b0, dv = 1'b0;
  logic [7:0]  pixel = '0;
  ft_faults_t  faults [NS];
  ft_faults_t  nofaults [NS];
  logic [23:0] acc_ft, acc_pl;
  logic [4:0]  cff_ft, cff_pl;
  logic        pend_ft, pend_pl;
  int checks = 0, failures = 0;

  // Reference model: slice nibbles and carry flip-flops in integers.
  int rd [NS];
  int rf [NS-1];
  longint unsigned total;

  adder_accumulator dut_ft (.clk(clk), .rst_n(rst_n), .init(init), .data_valid(dv),
    .pixel(pixel), .faults(faults), .acc(acc_ft), .carry_ff(cff_ft), .pending(pend_ft));
  adder_accumulator #(.FAULT_TOLERANT(1'b0)) dut_pl (.clk(clk), .rst_n(rst_n), .init(init),
    .data_valid(dv), .pixel(pixel), .faults(nofaults), .acc(acc_pl), .carry_ff(cff_pl),
    .pending(pend_pl));

  always #5 clk = ~clk;

  initial begin
    #20000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s: acc_ft=%h acc_pl=%h cff_ft=%b cff_pl=%b", what, acc_ft, acc_pl, cff_ft, cff_pl);
    end
  endtask

  function automatic int nib(input logic [23:0] v, input int k);
    return int'(v[k*4 +: 4]);
  endfunction

  // Reference update for one accepted word.
  function automatic void ref_step(input int p);
    int nd [NS];
    int nf [NS-1];
    for (int k = 0; k < NS; k++) begin
      int t;
      t = rd[k] + ((k < 2) ? ((p >> (4*k)) & 15) : 0) + ((k > 0) ? rf[k-1] : 0);
      nd[k] = t & 15;
      if (k < NS-1) nf[k] = t >> 4;
    end
    rd = nd;
    rf = nf;
    total += longint'(p);
  endfunction

  function automatic void ref_clear();
    foreach (rd[k]) rd[k] = 0;
    foreach (rf[k]) rf[k] = 0;
    total = 0;
  endfunction

  // Compare both DUTs with the reference model.
  task automatic check_ref(input string what);
    logic [23:0] racc;
    logic [4:0]  rcff;
    for (int k = 0; k < NS; k++) racc[k*4 +: 4] = 4'(rd[k]);
    for (int k = 0; k < NS-1; k++) rcff[k] = rf[k][0];
    check(acc_ft == racc && cff_ft == rcff && acc_pl == racc && cff_pl == rcff, what);
  endtask

  // Accept one word on the next rising edge.
  task automatic push(input logic [7:0] p);
    @(negedge clk);
    dv = 1'b1;
    pixel = p;
    @(posedge clk);
    ref_step(int'(p));
    #1;
    dv = 1'b0;
  endtask

  task automatic do_init();
    @(negedge clk);
    init = 1'b1;
    dv = 1'b1;
    pixel = 8'hFF;
    @(posedge clk);
    ref_clear();
    #1;
    init = 1'b0;
    dv = 1'b0;
  endtask

  // Expected nibbles {D0, FF1, D1, FF2, D2, FF3, D3, FF4, D4, FF5, D5}.
  task automatic check_row(input int row [11], input string what);
    bit ok;
    ok = 1'b1;
    for (int k = 0; k < NS; k++) begin
      if (nib(acc_ft, k) != row[2*k] || nib(acc_pl, k) != row[2*k]) ok = 1'b0;
      if (k < NS-1 && (int'(cff_ft[k]) != row[2*k+1] || int'(cff_pl[k]) != row[2*k+1])) ok = 1'b0;
    end
    check(ok, what);
  endtask

  int unsigned stalls = 0, fault_words = 0, top_carries = 0;

  initial begin
    foreach (faults[k]) faults[k] = NO_FAULTS;
    foreach (nofaults[k]) nofaults[k] = NO_FAULTS;
    ref_clear();
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    check(acc_ft == 0 && acc_pl == 0 && cff_ft == 0, "after reset");

    // 1. Stream of FF words.
    do_init();
    begin
      int rows [5][11] = '{
        '{15, 0, 15, 0, 0, 0, 0, 0, 0, 0, 0},
        '{14, 1, 14, 1, 0, 0, 0, 0, 0, 0, 0},
        '{13, 1, 14, 1, 1, 0, 0, 0, 0, 0, 0},
        '{12, 1, 14, 1, 2, 0, 0, 0, 0, 0, 0},
        '{11, 1, 14, 1, 3, 0, 0, 0, 0, 0, 0}};
      for (int i = 0; i < 5; i++) begin
        push(8'hFF);
        check_row(rows[i], $sformatf("FF stream step %0d", i + 1));
      end
    end

    // 1b. Four FF words, then zero words until the carries have left the
    //     pipeline: 4 x FF = 3FC must appear after the 5th zero word.
    do_init();
    repeat (4) begin
      push(8'hFF);
      check_ref("four FF words");
    end
    for (int i = 0; i < 5; i++) begin
      push(8'h00);
      check_ref("zero word after four FF words");
    end
    check(acc_ft == 24'h0003FC && acc_pl == 24'h0003FC && !pend_ft && !pend_pl,
          "4 x FF = 3FC after a 5-word flush");

    // 2. Carry through all six slices: 7FFFFF + 0F.
    do_init();
    for (int i = 0; i < 32896; i++) push(8'hFF);
    push(8'h7F);
    for (int i = 0; i < 5; i++) push(8'h00);
    check(acc_ft == 24'h7FFFFF && !pend_ft && !pend_pl, "preload to 7FFFFF");
    begin
      int rows [6][11] = '{
        '{14, 1, 15, 0, 15, 0, 15, 0, 15, 0, 7},
        '{14, 0,  0, 1, 15, 0, 15, 0, 15, 0, 7},
        '{14, 0,  0, 0,  0, 1, 15, 0, 15, 0, 7},
        '{14, 0,  0, 0,  0, 0,  0, 1, 15, 0, 7},
        '{14, 0,  0, 0,  0, 0,  0, 0,  0, 1, 7},
        '{14, 0,  0, 0,  0, 0,  0, 0,  0, 0, 8}};
      push(8'h0F);
      check_row(rows[0], "step 500");
      for (int i = 1; i < 6; i++) begin
        check(acc_ft != 24'h80000E, $sformatf("sum not yet final %0d words after", i - 1));
        push(8'h00);
        check_row(rows[i], $sformatf("step 50%0d", i));
        if (cff_ft[4]) top_carries++;
      end
      check(acc_ft == 24'h80000E && acc_pl == 24'h80000E, "7FFFFF + 0F = 80000E after 5 words");
      check(!pend_ft && !pend_pl, "pipeline empty after flush");
    end

    // 3. Random words, gaps and masked faults.
    do_init();
    for (int n = 0; n < 20000; n++) begin
      if ($urandom_range(0, 7) == 0) begin
        @(posedge clk);       // a cycle without data_valid: nothing may change
        #1;
        stalls++;
        check_ref("hold while data_valid is low");
      end
      if ($urandom_range(0, 3) == 0) begin
        for (int k = 0; k < NS; k++)
          faults[k] = (k < 2) ? rand_full_faults() : rand_partial_faults();
        fault_words++;
      end else begin
        foreach (faults[k]) faults[k] = NO_FAULTS;
      end
      push(8'($urandom));
      if (cff_ft[4]) top_carries++;
      check_ref("random word");
      if (n % 4000 == 3999) begin
        for (int i = 0; i < 5; i++) push(8'h00);
        check(acc_ft == 24'(total) && acc_pl == 24'(total) && !pend_ft,
              $sformatf("flushed sum %h", 24'(total)));
      end
    end
    foreach (faults[k]) faults[k] = NO_FAULTS;

    // 4. init clears everything.
    do_init();
    check(acc_ft == 0 && acc_pl == 0 && cff_ft == 0 && cff_pl == 0, "init clears");

    check(stalls > 0 && fault_words > 0 && top_carries > 0, "every mechanism exercised");
    $display("stalls=%0d words_with_faults=%0d carries_into_top_slice=%0d", stalls, fault_words, top_carries);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
