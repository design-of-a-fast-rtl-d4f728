// tb_threshold_generator_full: the threshold generator at its full size,
// 256 x 256 pixels of 8 bits and a 24-bit sum, with all its parameters at
// their defaults (fault-tolerant adders). Two frames are streamed at one
// pixel per clock: one of random pixels, then one of all-FF pixels, the
// largest possible sum (FF0000, threshold FF, which must fit in 24 bits). For each, the
// sum and the threshold (bits 23:16 of the sum) are compared with integer
// arithmetic, and threshold_valid must rise 5 edges after the last pixel.
module tb_threshold_generator_full;
  import adder_pkg::*;

  localparam int NPIX = 256 * 256;

  logic        clk = 1'b0, rst_n = 1'b0, fs = 1'b0, pv = 1'b0;
  logic [7:0]  pixel = '0;
  ft_faults_t  faults [6];
  logic [7:0]  thr;
  logic        tv, busy;
  logic [23:0] sum;
  int checks = 0, failures = 0;

  threshold_generator dut (.clk(clk), .rst_n(rst_n), .frame_start(fs), .pixel_valid(pv),
    .pixel(pixel), .faults(faults), .threshold(thr), .threshold_valid(tv), .sum(sum), .busy(busy));

  always #5 clk = ~clk;

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s: sum=%h thr=%h tv=%b", what, sum, thr, tv);
    end
  endtask

  task automatic frame(input bit all_ff);
    longint unsigned total;
    int lat;
    @(negedge clk);
    fs = 1'b1;
    @(posedge clk);
    #1;
    fs = 1'b0;
    total = 0;
    for (int i = 0; i < NPIX; i++) begin
      @(negedge clk);
      pv = 1'b1;
      pixel = all_ff ? 8'hFF : 8'($urandom);
      total += longint'(pixel);
    end
    @(posedge clk);
    #1;
    pv = 1'b0;
    lat = 0;
    while (!tv && lat < 20) begin
      @(posedge clk);
      #1;
      lat++;
    end
    check(lat == 5, $sformatf("result 5 edges after last pixel (took %0d)", lat));
    check(sum == 24'(total), $sformatf("frame sum %h", 24'(total)));
    check(thr == 8'(total >> 16), $sformatf("threshold %0d", total >> 16));
  endtask

  initial begin
    foreach (faults[k]) faults[k] = NO_FAULTS;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    frame(1'b0);
    frame(1'b1);
    check(sum == 24'hFF0000 && thr == 8'hFF, "all-FF frame");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
