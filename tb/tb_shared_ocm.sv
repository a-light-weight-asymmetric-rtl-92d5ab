// tb_shared_ocm: checks the shared on-chip memory and its arbiter.
//
// Three agents (PL, core #1, core #2) issue random reads, writes and
// test-and-sets. A reference array is updated in grant order; every read and
// test-and-set must return the value the word held at its grant. Also checked:
// one grant per clock and only to a requester; with all three requesting, each
// gets a grant within three clocks (round robin); writes to the flag word show
// on flag_wr_valid with their value; and a mutex built from test-and-set is
// never held by two agents at once.
module tb_shared_ocm;
  import lidar_pkg::*;
  localparam int unsigned NP = 3, WORDS = 256;
  logic clk = 0, rst_n = 0;
  ocm_req_t req [NP];
  ocm_rsp_t rsp [NP];
  logic flag_wr_valid;
  state_flag_e flag_wr_data;
  int checks = 0, failures = 0;

  shared_ocm #(.NPORTS(NP), .WORDS(WORDS)) dut (.*);
  always #5 clk = !clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s @%0t", what, $time); end
  endtask

  logic [31:0] model [WORDS];
  logic [31:0] exp_rd [NP];
  bit          exp_v [NP];
  int          wait_cyc [NP];
  bit          holds [NP];        // agent holds the mutex
  int          want_mutex [NP];   // 0 none, 1 acquiring, 2 releasing
  bit          exp_flag;
  logic [7:0]  exp_flag_val;
  int          grants = 0, flag_seen = 0, mutex_takes = 0;

  // checks and model at each clock edge (values before the edge)
  always @(posedge clk) if (rst_n) begin
    int ng;
    ng = 0;
    if (exp_flag) begin
      check(flag_wr_valid && flag_wr_data == state_flag_e'(exp_flag_val), "flag write shown");
      flag_seen++;
    end else check(!flag_wr_valid, "no flag write shown");
    exp_flag = 0;
    for (int p = 0; p < NP; p++) begin
      if (exp_v[p]) check(rsp[p].rvalid && rsp[p].rdata == exp_rd[p], $sformatf("read data port %0d", p));
      else check(!rsp[p].rvalid, "no stray rvalid");
      exp_v[p] = 0;
    end
    for (int p = 0; p < NP; p++) if (rsp[p].gnt) begin
      ng++;
      grants++;
      check(req[p].req, "grant only to a requester");
      if (!req[p].we || req[p].tas) begin exp_v[p] = 1; exp_rd[p] = model[req[p].addr[7:0]]; end
      if (req[p].tas && want_mutex[p] == 1 && model[req[p].addr[7:0]] == 0) begin
        for (int q = 0; q < NP; q++) check(!holds[q], "mutex exclusive");
        holds[p] = 1; mutex_takes++;
      end
      if (req[p].we && want_mutex[p] == 2) holds[p] = 0;
      if (req[p].we || req[p].tas) begin
        model[req[p].addr[7:0]] = req[p].wdata;
        if (req[p].addr == OCM_FLAG_ADDR) begin exp_flag = 1; exp_flag_val = req[p].wdata[7:0]; end
      end
    end
    check(ng <= 1, "one grant per clock");
    for (int p = 0; p < NP; p++) begin
      if (req[p].req && !rsp[p].gnt) wait_cyc[p]++; else wait_cyc[p] = 0;
      check(wait_cyc[p] < NP, "round-robin wait bound");
    end
  end

  // agents: new request after a grant, at the falling edge
  bit granted [NP];
  always @(posedge clk) for (int p = 0; p < NP; p++) granted[p] = rsp[p].gnt;
  bit agents_on = 0;
  always @(negedge clk) if (agents_on) begin
    for (int p = 0; p < NP; p++) begin
      if (granted[p] || !req[p].req) begin
        req[p] = '0;
        want_mutex[p] = 0;
        if ($urandom_range(0, 3) != 0) begin
          int kind;
          kind = $urandom_range(0, 9);
          req[p].req = 1;
          if (holds[p] && kind < 3) begin              // release the mutex
            req[p].we = 1; req[p].addr = OCM_MUTEX_ADDR; req[p].wdata = 0;
            want_mutex[p] = 2;
          end else if (!holds[p] && kind < 3) begin    // try to take it
            req[p].tas = 1; req[p].addr = OCM_MUTEX_ADDR; req[p].wdata = 32'(p + 1);
            want_mutex[p] = 1;
          end else if (kind == 3) begin                // flag write
            req[p].we = 1; req[p].addr = OCM_FLAG_ADDR; req[p].wdata = 32'($urandom_range(65, 90));
          end else begin
            req[p].we = kind[0];
            req[p].addr = 16'($urandom_range(3, WORDS - 1));
            req[p].wdata = $urandom;
          end
        end
      end
    end
  end

  initial begin
    for (int p = 0; p < NP; p++) begin req[p] = '0; exp_v[p] = 0; wait_cyc[p] = 0; holds[p] = 0; end
    exp_flag = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    // initialise every word through port 0 so no read sees an unwritten word
    for (int a = 0; a < WORDS; a++) begin
      req[0] = '0; req[0].req = 1; req[0].we = 1; req[0].addr = 16'(a); req[0].wdata = (a == 2) ? 0 : 32'(a * 3);
      @(negedge clk);
    end
    req[0] = '0;
    agents_on = 1;
    repeat (3000) @(negedge clk);
    check(grants > 2000, "throughput");
    check(flag_seen > 10, "flag writes seen");
    check(mutex_takes > 10, "mutex taken");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
