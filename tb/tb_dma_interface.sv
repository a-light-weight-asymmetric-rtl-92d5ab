// tb_dma_interface: checks the block copy from RAM to DRAM and the interrupt.
//
// A RAM model with one clock of read latency holds two banks of known words. The
// testbench hands blocks over, stalls the DRAM port at random, and checks that
// every block arrives complete at DRAM_BASE + n*BLOCK_WORDS*4 (n restarting at
// frame_start), that one interrupt follows each block after its last write, that
// a stalled write holds still, and that a block of 17 words with no stalls takes
// 3*17+1 clocks from hand-over to interrupt.
module tb_dma_interface;
  localparam int unsigned BW = 32, BLK = 17;
  localparam logic [31:0] BASE = 32'h2000_0000;
  logic clk = 0, rst_n = 0;
  logic frame_start = 0, block_valid = 0, block_bank = 0, busy;
  logic ram_re;
  logic [$clog2(2*BW)-1:0] ram_raddr;
  logic [31:0] ram_rdata;
  logic dram_wvalid, dram_wready;
  logic [31:0] dram_waddr, dram_wdata, blocks_done;
  logic dma_irq;
  int checks = 0, failures = 0;

  dma_interface #(.BANK_WORDS(BW), .BLOCK_WORDS(BLK), .DRAM_BASE(BASE)) dut (.*);
  always #5 clk = !clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s @%0t", what, $time); end
  endtask

  logic [31:0] ram [2*BW];
  always @(posedge clk) if (ram_re) ram_rdata <= ram[ram_raddr];

  bit stall_on = 1;
  always @(negedge clk) dram_wready = stall_on ? ($urandom_range(0, 2) != 0) : 1'b1;

  // DRAM model
  logic [31:0] dram [logic [31:0]];
  int writes = 0, irqs = 0;
  logic        pv = 0;
  logic [31:0] pa, pd;
  always @(posedge clk) begin
    if (pv && rst_n) check(dram_wvalid && dram_waddr == pa && dram_wdata == pd, "stalled write held");
    pv = dram_wvalid && !dram_wready; pa = dram_waddr; pd = dram_wdata;
    if (rst_n && dram_wvalid && dram_wready) begin dram[dram_waddr] = dram_wdata; writes++; end
    if (rst_n && dma_irq) irqs++;
  end

  task automatic send_block(input bit bank, input int n);
    int t0, t1;
    for (int i = 0; i < BLK; i++) ram[{bank, 5'(i)}] = {8'(n), 8'(bank), 16'(i)};
    @(negedge clk);
    block_valid = 1; block_bank = bank;
    t0 = $time;
    @(negedge clk);
    block_valid = 0;
    check(busy, "busy after hand-over");
    wait (dma_irq);
    t1 = $time;
    if (!stall_on) check((t1 - t0 + 5) / 10 == 3 * BLK + 1, $sformatf("latency %0d", (t1 - t0) / 10));
    @(negedge clk);
    check(!busy, "idle after interrupt");
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 6; n++) begin
      if (n == 4) begin
        @(negedge clk); frame_start = 1; @(negedge clk); frame_start = 0;
      end
      send_block(1'(n), n);
      for (int i = 0; i < BLK; i++) begin
        logic [31:0] a;
        a = BASE + ((n % 4) * BLK + i) * 4;
        check(dram.exists(a) && dram[a] == {8'(n), 8'(n % 2), 16'(i)}, $sformatf("block %0d word %0d", n, i));
      end
    end
    stall_on = 0;
    send_block(0, 6);
    repeat (2) @(negedge clk);
    check(writes == 7 * BLK, $sformatf("number of DRAM writes %0d", writes));
    check(irqs == 7 && blocks_done == 7, $sformatf("one interrupt per block %0d %0d", irqs, blocks_done));
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
