// tb_scanner_emulator: checks the scanner board's SPI input and position model.
//
// An SPI master model (mode 0, 5 clocks per SCLK half period) sends target
// positions. Checks: the target register takes the word sent; the word returned
// on MISO is the position at the start of the transfer; the position moves one
// step every STEP_CYCLES clocks towards the target, never passes it, and stays
// there; a transfer cut short (fewer than 16 bits) leaves the target unchanged.
module tb_scanner_emulator;
  localparam int unsigned STEP = 8, HALF = 5;
  logic clk = 0, rst_n = 0;
  logic sclk = 0, mosi = 0, cs_n = 1, miso;
  logic [15:0] pos_gpio, target;
  int checks = 0, failures = 0;

  scanner_emulator #(.STEP_CYCLES(STEP)) dut (.*);
  always #5 clk = !clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s @%0t", what, $time); end
  endtask

  task automatic spi_xfer(input logic [15:0] tx, input int nbits, output logic [15:0] rx);
    @(negedge clk);
    cs_n = 0;
    mosi = tx[15];
    for (int b = 0; b < nbits; b++) begin
      repeat (HALF) @(negedge clk);
      sclk = 1;
      rx = {rx[14:0], miso};
      repeat (HALF) @(negedge clk);
      sclk = 0;
      if (b < 15) mosi = tx[14 - b];
    end
    repeat (HALF) @(negedge clk);
    cs_n = 1;
    repeat (HALF) @(negedge clk);
  endtask

  // position must change by at most one per STEP clocks and move towards target
  logic [15:0] prev_pos = 0;
  int since = 0, bad_step = 0, bad_dir = 0;
  always @(negedge clk) if (rst_n) begin
    since++;
    if (pos_gpio != prev_pos) begin
      if (since < STEP) bad_step++;
      if (!((pos_gpio == prev_pos + 1 && prev_pos < target) ||
            (pos_gpio == prev_pos - 1 && prev_pos > target))) bad_dir++;
      since = 0;
    end
    prev_pos = pos_gpio;
  end

  initial begin
    logic [15:0] rx, pos_at_start, tgt;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 4; n++) begin
      tgt = (n % 2 == 0) ? 16'(40 + n * 7) : 16'(10 + n);
      pos_at_start = pos_gpio;
      spi_xfer(tgt, 16, rx);
      check(target == tgt, "target taken");
      check(rx == pos_at_start || rx == pos_at_start + 1 || rx == pos_at_start - 1,
            $sformatf("MISO position %0d near %0d", rx, pos_at_start));
      repeat (STEP * 80) @(negedge clk);
      check(pos_gpio == tgt, $sformatf("position %0d reached target %0d", pos_gpio, tgt));
    end
    tgt = target;
    spi_xfer(16'd999, 9, rx);
    check(target == tgt, "short transfer ignored");
    check(bad_step == 0, "slew rate");
    check(bad_dir == 0, "moves towards target only");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
