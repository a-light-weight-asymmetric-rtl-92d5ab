// tb_pl_sync_writer: checks the PL's writes of the flag and interrupt counter.
//
// A shared-memory model grants requests after random delays and keeps the words
// written. Checks: after NEXT_FRAME the counter word is written 0 before the flag
// word gets 'N'; counter values written never go down within a frame; after the
// writes drain, the counter word equals the number of interrupts since
// NEXT_FRAME, also when interrupts arrive while a write waits for its grant;
// only the flag and counter words are written.
module tb_pl_sync_writer;
  import lidar_pkg::*;
  logic clk = 0, rst_n = 0;
  logic next_frame = 0, dma_irq = 0;
  ocm_req_t ocm_req;
  ocm_rsp_t ocm_rsp;
  logic [31:0] irq_count;
  int checks = 0, failures = 0;

  pl_sync_writer dut (.*);
  always #5 clk = !clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s @%0t", what, $time); end
  endtask

  // memory model: grant with probability 1/3
  logic [31:0] flag_word = 0, cnt_word = 32'hdead;
  bit cnt_zeroed = 0;
  logic [31:0] last_cnt = 0;
  always @(negedge clk) begin
    ocm_rsp = '0;
    ocm_rsp.gnt = ocm_req.req && ($urandom_range(0, 2) == 0);
  end
  always @(posedge clk) if (rst_n && ocm_rsp.gnt) begin
    check(ocm_req.we && !ocm_req.tas, "writes only");
    if (ocm_req.addr == OCM_IRQ_CNT_ADDR) begin
      check(ocm_req.wdata >= last_cnt || ocm_req.wdata == 0, "counter never goes down");
      cnt_zeroed = 1;
      last_cnt = ocm_req.wdata;
      cnt_word = ocm_req.wdata;
    end else if (ocm_req.addr == OCM_FLAG_ADDR) begin
      check(cnt_zeroed, "counter written before 'N'");
      check(ocm_req.wdata == 32'(FLAG_NEXT_FRAME), "flag value 'N'");
      flag_word = ocm_req.wdata;
    end else check(0, "write to another word");
  end

  task automatic frame(input int n_irq, input int gap);
    @(negedge clk);
    cnt_zeroed = 0; flag_word = 0; last_cnt = 0;
    next_frame = 1;
    @(negedge clk);
    next_frame = 0;
    for (int i = 0; i < n_irq; i++) begin
      repeat (gap) @(negedge clk);
      dma_irq = 1;
      @(negedge clk);
      dma_irq = 0;
    end
    repeat (60) @(negedge clk);
    check(flag_word == 32'(FLAG_NEXT_FRAME), "flag written");
    check(cnt_word == 32'(n_irq), $sformatf("counter word %0d want %0d", cnt_word, n_irq));
    check(irq_count == 32'(n_irq), "irq_count output");
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    frame(10, 20);
    frame(25, 0);     // back-to-back interrupts while writes wait
    frame(0, 0);
    frame(7, 3);
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
