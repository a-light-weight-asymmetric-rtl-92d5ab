// tb_tdc_emulator: checks the ADC simulation board's serial TDC words.
//
// Clocks the board with LCLK, raises STOP several times and reads each group's
// line on the falling LCLK edges after the STOP edge. Every group must send
// CH_PER_GROUP words, channel index in bits 31:20 and position in bits 19:0,
// with position = POS_BASE + scan*SCAN_STEP + channel*CH_STEP (mod 2^20), the
// lines must be low between bursts, and a STOP during a burst starts nothing.
module tb_tdc_emulator;
  localparam int unsigned G = 4, C = 4, PB = 'h00123, SS = 5, CS = 1000;
  logic lclk = 0, rst_n = 0, stop = 0;
  logic [G-1:0] sdo;
  int checks = 0, failures = 0;

  tdc_emulator #(.GROUPS(G), .CH_PER_GROUP(C), .POS_BASE(PB), .SCAN_STEP(SS),
                 .CH_STEP(CS)) dut (.*);
  always #5 lclk = !lclk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s @%0t", what, $time); end
  endtask

  initial begin
    logic [31:0] w [G];
    logic [31:0] exp_w;
    repeat (3) @(negedge lclk);
    rst_n = 1;
    for (int scan = 0; scan < 5; scan++) begin
      repeat (4) @(negedge lclk);
      check(sdo == '0, "lines idle low");
      stop = 1;                       // seen at the next rising edge
      for (int k = 0; k < C; k++) begin
        for (int b = 0; b < 32; b++) begin
          @(negedge lclk);
          if (k == 0 && b == 3) stop = 0;
          if (k == 1 && b == 0 && scan == 2) stop = 1;   // STOP inside a burst
          if (k == 1 && b == 4 && scan == 2) stop = 0;
          for (int g = 0; g < G; g++) w[g][31 - b] = sdo[g];
        end
        for (int g = 0; g < G; g++) begin
          exp_w = {12'(g * C + k), 20'(PB + scan * SS + (g * C + k) * CS)};
          check(w[g] == exp_w, $sformatf("scan %0d group %0d word %0d: got %h want %h",
                                         scan, g, k, w[g], exp_w));
        end
      end
      @(negedge lclk);
      check(sdo == '0, "lines low after burst");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge lclk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
