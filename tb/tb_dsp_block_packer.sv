// tb_dsp_block_packer: checks that the DSP stage builds correct scan blocks.
//
// For each scan the testbench sends the 16 channel words from the four groups at
// the same time, four rounds in a shuffled channel order, and records every RAM
// write. At block_valid the bank must hold the header {scan index, scan position}
// in word 0 and channel c's word in word 1+c, and the next block must use the
// other bank. Also checked: a word with an index of 16 or more is dropped and
// counted; a scan cut short is counted as incomplete; a block finished while the
// DMA is busy is dropped and counted as an overrun.
module tb_dsp_block_packer;
  import lidar_pkg::*;
  localparam int unsigned G = 4, CH = 16, BW = 32;
  logic clk = 0, rst_n = 0;
  logic scan_start = 0;
  logic [15:0] scan_idx = 0, scan_pos_gpio = 0;
  logic [G-1:0] word_valid = 0;
  tdc_word_t word [G];
  logic ram_we;
  logic [$clog2(2*BW)-1:0] ram_waddr;
  logic [31:0] ram_wdata;
  logic dma_busy = 0, block_valid, block_bank;
  logic [31:0] index_errors, incomplete_scans, overruns;
  int checks = 0, failures = 0;

  dsp_block_packer #(.GROUPS(G), .CHANNELS(CH), .BANK_WORDS(BW)) dut (.*);
  always #5 clk = !clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s @%0t", what, $time); end
  endtask

  logic [31:0] ram [2*BW];
  always @(posedge clk) if (ram_we) ram[ram_waddr] <= ram_wdata;

  int blocks = 0;
  logic last_bank = 1;
  logic [31:0] exp_words [CH];
  logic [31:0] exp_hdr;
  always @(negedge clk) if (block_valid) begin
    blocks++;
    check(block_bank != last_bank, "banks alternate");
    last_bank = block_bank;
    #6;  // the header is written at the clock edge that ends this cycle
    check(ram[{block_bank, 5'd0}] == exp_hdr, "header word");
    for (int c = 0; c < CH; c++)
      check(ram[{block_bank, 5'(c + 1)}] == exp_words[c], $sformatf("channel %0d word", c));
  end

  task automatic run_scan(input int idx, input int nwords, input bit bad_index);
    int order [CH];
    for (int c = 0; c < CH; c++) order[c] = c;
    order.shuffle();
    @(negedge clk);
    scan_idx = 16'(idx); scan_start = 1;
    @(negedge clk);
    scan_start = 0;
    exp_hdr = {16'(idx), scan_pos_gpio};
    for (int c = 0; c < CH; c++) exp_words[c] = {12'(c), 20'($urandom)};
    for (int r = 0; r < CH / G; r++) begin
      repeat (10) @(negedge clk);
      for (int g = 0; g < G; g++) begin
        word[g] = exp_words[order[r * G + g]];
        word_valid[g] = (r * G + g) < nwords;
      end
      if (bad_index && r == 1) begin
        word[2] = {12'd40, 20'd7};
        word_valid[2] = 1;
      end
      @(negedge clk);
      word_valid = '0;
      if (bad_index && r == 1) begin   // resend the real word
        repeat (3) @(negedge clk);
        word[2] = exp_words[order[r * G + 2]];
        word_valid[2] = 1;
        @(negedge clk);
        word_valid = '0;
      end
    end
    repeat (20) @(negedge clk);
  endtask

  initial begin
    for (int g = 0; g < G; g++) word[g] = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    scan_pos_gpio = 16'h1234;
    repeat (5) @(negedge clk);
    run_scan(0, CH, 0);
    scan_pos_gpio = 16'h2345;
    repeat (5) @(negedge clk);
    run_scan(1, CH, 0);
    run_scan(2, CH, 1);
    check(index_errors == 1, "bad index counted");
    check(blocks == 3, "three blocks");
    run_scan(3, 9, 0);                 // cut short
    run_scan(4, CH, 0);
    check(incomplete_scans == 1, "short scan counted");
    check(blocks == 4, "short scan gives no block");
    dma_busy = 1;
    run_scan(5, CH, 0);
    dma_busy = 0;
    check(overruns == 1 && blocks == 4, "overrun counted, block dropped");
    run_scan(6, CH, 0);
    check(blocks == 5, "blocks resume after overrun");
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
