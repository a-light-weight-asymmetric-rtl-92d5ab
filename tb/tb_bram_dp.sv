// tb_bram_dp: checks the dual-port block RAM against an array model.
//
// Random writes and reads, some to the same address in the same clock; a read
// must return, one clock later, the value the address held before that clock.
module tb_bram_dp;
  localparam int unsigned D = 64, W = 32;
  logic clk = 0;
  logic we = 0, re = 0;
  logic [$clog2(D)-1:0] waddr = 0, raddr = 0;
  logic [W-1:0] wdata = 0, rdata;
  int checks = 0, failures = 0;

  bram_dp #(.DEPTH(D), .WIDTH(W)) dut (.*);
  always #5 clk = !clk;

  logic [W-1:0] model [D];
  logic [W-1:0] exp_q;
  logic         exp_v = 0;

  initial begin
    // fill every word first so no read sees an unwritten word
    for (int a = 0; a < D; a++) begin
      @(negedge clk);
      we = 1; waddr = a[$clog2(D)-1:0]; wdata = $urandom; model[a] = wdata;
    end
    @(negedge clk);
    we = 0;
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      if (exp_v) begin
        checks++;
        if (rdata !== exp_q) begin failures++; $display("FAIL: read %0d", i); end
      end
      we = $urandom_range(0, 1); re = $urandom_range(0, 1);
      waddr = $urandom; raddr = (i % 7 == 0) ? waddr : $urandom;
      wdata = $urandom;
      exp_v = re; exp_q = model[raddr];
      if (we) model[waddr] = wdata;
    end
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
