// tb_threshold_generator: end-to-end test of the threshold generator on a
// reduced 128 x 64 frame (8192 pixels, threshold = sum >> 13), in its
// fault-tolerant form (dut_ft) and its plain form (dut_pl) on the same
// pixel stream.
//
// Frames: all FF (carries run into the top slice), all 00, random pixels,
// random pixels with gaps in pixel_valid, random pixels with random masked
// faults injected into every slice of dut_ft, and a frame restarted half way
// by frame_start. For each completed frame the sum and threshold of both
// designs are compared with the integer sum and mean, threshold_valid must
// rise exactly 5 clock edges after the edge that took the last pixel, and
// pixels sent after the frame must be ignored. Each mechanism is counted and
// one that never happened counts as a failure.
module tb_threshold_generator;
  import adder_pkg::*;
  import ft_tb_pkg::*;

  localparam int ROWS = 128, COLS = 64, NPIX = ROWS * COLS, SHIFT = 13, NS = 6;

  logic        clk = 1'b0, rst_n = 1'b0, fs = 1'b0, pv = 1'b0;
  logic [7:0]  pixel = '0;
  ft_faults_t  faults [NS];
  ft_faults_t  nofaults [NS];
  logic [7:0]  thr_ft, thr_pl;
  logic        tv_ft, tv_pl, busy_ft, busy_pl;
  logic [23:0] sum_ft, sum_pl;
  int checks = 0, failures = 0;

  threshold_generator #(.ROWS(ROWS), .COLS(COLS)) dut_ft (
    .clk(clk), .rst_n(rst_n), .frame_start(fs), .pixel_valid(pv), .pixel(pixel),
    .faults(faults), .threshold(thr_ft), .threshold_valid(tv_ft), .sum(sum_ft), .busy(busy_ft));
  threshold_generator #(.ROWS(ROWS), .COLS(COLS), .FAULT_TOLERANT(1'b0)) dut_pl (
    .clk(clk), .rst_n(rst_n), .frame_start(fs), .pixel_valid(pv), .pixel(pixel),
    .faults(nofaults), .threshold(thr_pl), .threshold_valid(tv_pl), .sum(sum_pl), .busy(busy_pl));

  always #5 clk = ~clk;

  initial begin
    #50000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s: sum_ft=%h sum_pl=%h thr_ft=%h thr_pl=%h tv=%b/%b", what, sum_ft, sum_pl,
               thr_ft, thr_pl, tv_ft, tv_pl);
    end
  endtask

  // Mechanism counters.
  int unsigned n_frames = 0, n_stalls = 0, n_fault_frames = 0, n_restarts = 0;
  int unsigned n_ignored = 0, n_top_carry = 0, n_flush = 0;

  always @(posedge clk) begin
    if (dut_ft.u_acc.carry_ff[NS-2]) n_top_carry++;
  end

  typedef enum int {ALL_FF, ALL_00, RANDOM, GAPS, FAULTS, RESTART} frame_kind_t;

  task automatic start_frame();
    @(negedge clk);
    fs = 1'b1;
    pv = 1'b0;
    @(posedge clk);
    #1;
    fs = 1'b0;
    check(!tv_ft && !tv_pl && busy_ft && busy_pl && sum_ft == 0 && sum_pl == 0, "frame_start clears");
  endtask

  task automatic run_frame(input frame_kind_t kind);
    longint unsigned total;
    int lat;
    start_frame();
    if (kind == RESTART) begin
      // Half a frame, then start again: nothing of it may remain.
      for (int i = 0; i < NPIX / 2; i++) begin
        @(negedge clk);
        pv = 1'b1;
        pixel = 8'($urandom);
      end
      @(negedge clk);
      pv = 1'b0;
      start_frame();
      n_restarts++;
    end
    total = 0;
    for (int i = 0; i < NPIX; i++) begin
      @(negedge clk);
      if (kind == GAPS) begin
        while ($urandom_range(0, 3) == 0) begin
          pv = 1'b0;
          pixel = 8'($urandom);
          n_stalls++;
          @(negedge clk);
        end
      end
      pv = 1'b1;
      case (kind)
        ALL_FF:  pixel = 8'hFF;
        ALL_00:  pixel = 8'h00;
        default: pixel = 8'($urandom);
      endcase
      if (kind == FAULTS) begin
        for (int k = 0; k < NS; k++)
          faults[k] = (k < 2) ? rand_full_faults() : rand_partial_faults();
      end
      total += longint'(pixel);
      check(!tv_ft && busy_ft, "no result while the frame streams in");
    end
    // The edge after this negedge takes the last pixel; keep offering
    // pixels to see that they are ignored.
    @(posedge clk);
    #1;
    lat = 0;
    while (!tv_ft && lat < 20) begin
      @(negedge clk);
      pv = 1'b1;
      pixel = 8'hFF;
      n_ignored++;
      @(posedge clk);
      #1;
      lat++;
    end
    check(lat == 5 && tv_pl, $sformatf("result 5 edges after last pixel (took %0d)", lat));
    if (lat == 5) n_flush++;
    repeat (3) begin
      @(negedge clk);
      n_ignored++;
    end
    pv = 1'b0;
    foreach (faults[k]) faults[k] = NO_FAULTS;
    @(posedge clk);
    #1;
    check(tv_ft && tv_pl && !busy_ft, "result held");
    check(sum_ft == 24'(total) && sum_pl == 24'(total), $sformatf("frame sum %h", 24'(total)));
    check(thr_ft == 8'(total >> SHIFT) && thr_pl == 8'(total >> SHIFT),
          $sformatf("threshold %0d", total >> SHIFT));
    n_frames++;
    if (kind == FAULTS) n_fault_frames++;
  endtask

  initial begin
    foreach (faults[k]) faults[k] = NO_FAULTS;
    foreach (nofaults[k]) nofaults[k] = NO_FAULTS;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    @(posedge clk);
    #1;
    check(!tv_ft && !busy_ft && sum_ft == 0, "idle after reset");

    run_frame(ALL_FF);
    check(thr_ft == 8'hFF, "all-FF frame gives threshold FF");
    run_frame(ALL_00);
    run_frame(RANDOM);
    run_frame(GAPS);
    run_frame(FAULTS);
    run_frame(RESTART);
    run_frame(FAULTS);

    check(n_frames == 7, "frames completed");
    check(n_stalls > 0, "pixel_valid gaps happened");
    check(n_fault_frames > 0, "frames with injected faults happened");
    check(n_restarts > 0, "frame restart happened");
    check(n_ignored > 0, "surplus pixels were offered");
    check(n_top_carry > 0, "a carry reached the top slice");
    check(n_flush == n_frames, "every frame flushed in 5 cycles");
    $display("frames=%0d stalls=%0d fault_frames=%0d restarts=%0d ignored=%0d top_carries=%0d flushes=%0d",
             n_frames, n_stalls, n_fault_frames, n_restarts, n_ignored, n_top_carry, n_flush);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
