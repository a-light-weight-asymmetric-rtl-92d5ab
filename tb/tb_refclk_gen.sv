// tb_refclk_gen: checks the LCLK and reference-clock dividers.
//
// Counts PL clocks between edges of lclk and refclk and checks the half periods
// against LCLK_HALF and REF_HALF, and checks that lclk_rise / lclk_fall are high
// exactly in the clock cycle at whose end lclk rises / falls.
module tb_refclk_gen;
  localparam int unsigned LH = 3, RH = 4;
  logic clk = 0, rst_n = 0;
  logic lclk, lclk_rise, lclk_fall, refclk;
  int checks = 0, failures = 0;

  refclk_gen #(.LCLK_HALF(LH), .REF_HALF(RH)) dut (.*);
  always #5 clk = !clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  logic prev_l, prev_r, exp_rise, exp_fall;
  int   since_l, since_r, n_l, n_r;
  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    prev_l = lclk; prev_r = refclk; since_l = 0; since_r = 0; n_l = 0; n_r = 0;
    repeat (200) begin
      exp_rise = lclk_rise; exp_fall = lclk_fall;
      @(negedge clk);
      since_l++; since_r++;
      check((lclk && !prev_l) == exp_rise, "lclk_rise marks the rising edge");
      check((!lclk && prev_l) == exp_fall, "lclk_fall marks the falling edge");
      if (lclk != prev_l) begin
        if (n_l > 0) check(since_l == LH, "lclk half period");
        n_l++; since_l = 0;
      end
      if (refclk != prev_r) begin
        if (n_r > 0) check(since_r == RH, "refclk half period");
        n_r++; since_r = 0;
      end
      prev_l = lclk; prev_r = refclk;
    end
    check(n_l > 50 && n_r > 40, "both clocks toggle");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
