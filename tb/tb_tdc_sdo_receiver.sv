// tb_tdc_sdo_receiver: checks the SDO deserialiser against random words.
//
// A transmitter model in the testbench plays the ADC board: on the first rising
// LCLK edge that finds STOP high after low it puts out the MSB of the first
// random 32-bit word and one bit per rising edge after that, WORDS words in all.
// The received words, their order (word_num) and their number are compared with
// what was sent, for several bursts, and the burst must be over within
// WORDS*32+2 LCLK periods of the STOP edge.
module tb_tdc_sdo_receiver;
  import lidar_pkg::*;
  localparam int unsigned W = 4;
  logic clk = 0, rst_n = 0;
  logic lclk_rise, stop = 0, sdo = 0;
  logic word_valid, busy;
  tdc_word_t word;
  logic [$clog2(W+1)-1:0] word_num;
  int checks = 0, failures = 0;

  tdc_sdo_receiver #(.WORDS(W)) dut (.*);
  always #5 clk = !clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s @%0t", what, $time); end
  endtask

  // LCLK toggles every clock
  logic lclk_m = 0;
  assign lclk_rise = !lclk_m;
  always @(posedge clk) lclk_m <= !lclk_m;

  // transmitter model
  logic [31:0] sent [$];
  logic [31:0] tx [W];
  logic        tx_busy = 0, tx_stop_q = 0;
  int          tx_bit = 0;
  always @(posedge clk) if (lclk_rise) begin
    tx_stop_q <= stop;
    if (tx_busy) begin
      if (tx_bit == W * 32 - 1) begin tx_busy <= 0; sdo <= 0; end
      else begin
        tx_bit <= tx_bit + 1;
        sdo    <= tx[(tx_bit + 1) / 32][31 - ((tx_bit + 1) % 32)];
      end
    end else if (stop && !tx_stop_q) begin
      for (int i = 0; i < W; i++) begin
        tx[i] = $urandom;
        sent.push_back(tx[i]);
      end
      tx_busy <= 1; tx_bit <= 0; sdo <= tx[0][31];
    end
  end

  int got = 0;
  always @(negedge clk) if (word_valid) begin
    check(sent.size() > 0 && word == sent[0], "word value");
    check(word_num == ($clog2(W+1))'(got % W), "word order");
    if (sent.size() > 0) void'(sent.pop_front());
    got++;
  end

  initial begin
    repeat (4) @(negedge clk);
    rst_n = 1;
    for (int b = 0; b < 6; b++) begin
      repeat (3 + b) @(negedge clk);
      while (lclk_m == 0) @(negedge clk);   // change STOP where LCLK falls
      stop = 1;
      repeat (8) @(negedge clk);
      stop = 0;
      repeat (2 * (W * 32 + 2) - 8) @(negedge clk);
      check(!busy, "burst finished in time");
    end
    repeat (20) @(negedge clk);
    check(got == 6 * W, "number of words");
    check(sent.size() == 0, "nothing left unreceived");
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
