// tb_laser_firing: checks the per-scan laser trigger and STOP timing.
//
// Starts two frames with NEXT_FRAME and samples every clock. Checks: NUM_SCANS
// scan starts per frame, SCAN_CYCLES apart, with scan_idx counting 0..N-1; the
// laser trigger is high for LD_PULSE clocks from each scan start; STOP rises
// once per scan, between STOP_DELAY+2 and STOP_DELAY+2+2*LCLK_HALF clocks after
// the scan start (the wait for a falling LCLK edge), stays high STOP_LCLKS LCLK
// periods and changes only at falling LCLK edges; fov_scans_done pulses once,
// NUM_SCANS*SCAN_CYCLES clocks after the first scan start of the frame.
module tb_laser_firing;
  localparam int unsigned N = 5, SC = 100, LD = 4, SD = 30, SL = 4, LH = 2;
  logic clk = 0, rst_n = 0;
  logic next_frame = 0, lclk_fall;
  logic fov_active, scan_start, ld_trigger, stop, fov_scans_done;
  logic [15:0] scan_idx;
  int checks = 0, failures = 0;

  laser_firing #(.NUM_SCANS(N), .SCAN_CYCLES(SC), .LD_PULSE(LD), .STOP_DELAY(SD),
                 .STOP_LCLKS(SL)) dut (.*);
  always #5 clk = !clk;

  // LCLK model: toggles every LH clocks
  int lc = 0;
  logic lclk_m = 0;
  assign lclk_fall = (lc == LH - 1) && lclk_m;
  always @(posedge clk) begin
    if (lc == LH - 1) begin lc <= 0; lclk_m <= !lclk_m; end
    else lc <= lc + 1;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s @%0t", what, $time); end
  endtask

  // monitor, sampled between edges
  longint cyc = 0, nf_cyc = 0, last_start = 0, stop_rise = 0;
  int starts = 0, dones = 0, ld_len = 0, stop_len = 0, stops = 0;
  logic prev_stop = 0, prev_ld = 0, prev_fall = 0;
  always @(negedge clk) if (rst_n) begin
    cyc++;
    if (scan_start) begin
      if (starts % N != 0) check(cyc - last_start == SC, "scan period");
      check(scan_idx == 16'(starts % N), "scan index");
      check(ld_trigger, "trigger with scan start");
      if (scan_idx == 0) nf_cyc = cyc;
      last_start = cyc;
      starts++;
    end
    if (ld_trigger) ld_len++;
    if (prev_ld && !ld_trigger) begin check(ld_len == LD, "trigger length"); ld_len = 0; end
    if (stop != prev_stop) check(prev_fall, "STOP changes only on LCLK fall");
    if (stop && !prev_stop) begin
      stops++;
      stop_rise = cyc;
      check(cyc - last_start >= SD + 2 && cyc - last_start < SD + 2 + 2 * LH, "STOP delay");
    end
    if (!stop && prev_stop) check(cyc - stop_rise == SL * 2 * LH, "STOP length");
    if (fov_scans_done) begin
      dones++;
      check(cyc - nf_cyc == N * SC, "FoV length");
      check(!fov_active, "inactive after done");
    end
    prev_stop = stop; prev_ld = ld_trigger; prev_fall = lclk_fall;
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int f = 0; f < 2; f++) begin
      repeat (17 + f) @(negedge clk);
      next_frame = 1;
      @(negedge clk);
      next_frame = 0;
      wait (fov_scans_done);
      @(negedge clk);
      #1;
    end
    repeat (50) @(negedge clk);
    check(starts == 2 * N, "scan starts");
    check(stops == 2 * N, "one STOP per scan");
    check(dones == 2, "one done per frame");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
