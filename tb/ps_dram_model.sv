// ps_dram_model: behavioural model of the processing system and the DRAM, for
// testbenches of lidar_amp_top. Not synthesizable.
//
// DRAM: accepts the PL's word writes into an associative array, stalling the
// port at random.
// PS core #1 (thread #1): at start-up clears the mutex and the counter and writes
// INIT_DONE. Each frame it waits for the 'N' flag, polls the DMA interrupt counter
// (under the mutex) in shared memory until
// it reaches NUM_SCANS, writes 'F' (FOV_DONE), runs DRAM control for T_DRAM
// clocks (it checks every block of the frame in DRAM against the ADC board's
// pattern), then Encoding for T_ENC clocks.
// AMP mode: core #1 then takes the mutex, writes 'I' and releases the mutex.
// Core #2 (thread #2), which polls the flag under the same mutex (holding it for
// 20 clocks, so that the cores do contend), sees 'I', runs Packetizing (T_PKT)
// and then writes 'B' (BLIND_DONE) under the mutex; its I/O control (T_IO clocks,
// including an SPI command to the scanner board through the AHB bridge) then
// overlaps the idle time and the next frame's FoV work.
// Sequential mode (SEQUENTIAL=1): core #1 runs all four processes itself,
// sending the scanner command, and then writes 'B'.
// Counters of every mechanism and the checks/failures of the data checks are
// outputs, for the testbench to report.
module ps_dram_model
  import lidar_pkg::*;
#(
  parameter int unsigned NUM_SCANS  = 4650,
  parameter int unsigned SEQUENTIAL = 0,
  parameter int unsigned T_DRAM     = 1_200_000,
  parameter int unsigned T_ENC      = 1_500_000,
  parameter int unsigned T_PKT      = 300_000,
  parameter int unsigned T_IO       = 2_600_000,
  parameter logic [31:0] DRAM_BASE  = 32'h1000_0000,
  parameter int unsigned POS_BASE   = 32'h01000,
  parameter int unsigned SCAN_STEP  = 3,
  parameter int unsigned CH_STEP    = 257
) (
  input  logic        clk,
  input  logic        rst_n,
  output ocm_req_t    ps_req [2],
  input  ocm_rsp_t    ps_rsp [2],
  output logic        hsel,
  output logic [31:0] haddr,
  output logic [1:0]  htrans,
  output logic        hwrite,
  output logic [31:0] hwdata,
  output logic        hready,
  input  logic [31:0] hrdata,
  input  logic        dram_wvalid,
  input  logic [31:0] dram_waddr,
  input  logic [31:0] dram_wdata,
  output logic        dram_wready,
  output int          checks,
  output int          failures,
  output int          n_fov_done,
  output int          n_core_sync,
  output int          n_blind_done,
  output int          n_spi_cmds,
  output int          n_mutex_busy,
  output int          n_dram_stalls,
  output int          frames_checked
);

  localparam int unsigned BLK = 17;

  ocm_req_t req1, req2;
  assign ps_req[0] = req1;
  assign ps_req[1] = req2;

  initial begin
    checks = 0; failures = 0; n_fov_done = 0; n_core_sync = 0; n_blind_done = 0;
    n_spi_cmds = 0; n_mutex_busy = 0; n_dram_stalls = 0; frames_checked = 0;
    req1 = '0; req2 = '0;
    hsel = 0; haddr = 0; htrans = 0; hwrite = 0; hwdata = 0; hready = 1;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s @%0t", what, $time); end
  endtask

  // ----------------------------------------------------------------- DRAM
  logic [31:0] dram [logic [31:0]];
  always @(negedge clk) dram_wready = ($urandom_range(0, 3) != 0);
  always @(posedge clk) if (rst_n && dram_wvalid) begin
    if (dram_wready) dram[dram_waddr] = dram_wdata;
    else n_dram_stalls++;
  end

  // ------------------------------------------------------ shared memory
  task automatic ocm(input int core, input bit we, input bit tas, input logic [15:0] addr,
                     input logic [31:0] wdata, output logic [31:0] rdata);
    ocm_req_t r;
    r = '0; r.req = 1; r.we = we; r.tas = tas; r.addr = addr; r.wdata = wdata;
    @(negedge clk);
    if (core == 1) req1 = r; else req2 = r;
    do @(posedge clk); while (!ps_rsp[core-1].gnt);
    @(negedge clk);
    if (core == 1) req1 = '0; else req2 = '0;
    rdata = 0;
    if (!we || tas) begin
      while (!ps_rsp[core-1].rvalid) @(negedge clk);
      rdata = ps_rsp[core-1].rdata;
    end
  endtask

  task automatic lock(input int core);
    logic [31:0] old;
    forever begin
      ocm(core, 0, 1, OCM_MUTEX_ADDR, 32'(core), old);
      if (old == 0) break;
      n_mutex_busy++;
      repeat (7) @(negedge clk);
    end
  endtask

  task automatic unlock(input int core);
    logic [31:0] d;
    ocm(core, 1, 0, OCM_MUTEX_ADDR, 0, d);
  endtask

  task automatic put_flag(input int core, input state_flag_e f);
    logic [31:0] d;
    ocm(core, 1, 0, OCM_FLAG_ADDR, 32'(f), d);
  endtask

  // -------------------------------------------------- AHB / SPI (I/O control)
  task automatic ahb(input bit wr, input logic [31:0] a, input logic [31:0] d, output logic [31:0] q);
    @(negedge clk);
    hsel = 1; htrans = 2'b10; hwrite = wr; haddr = a;
    @(negedge clk);
    hsel = 0; htrans = 2'b00; hwrite = 0; hwdata = d;
    q = hrdata;
  endtask

  task automatic scanner_command(input logic [15:0] target);
    logic [31:0] q;
    ahb(1, 32'h4, {16'd0, target}, q);
    ahb(1, 32'h0, 32'h0000_0001, q);     // chip select 0: scanner board
    do ahb(0, 32'hC, 0, q); while (!q[1]);
    n_spi_cmds++;
  endtask

  // ------------------------------------------------------ DRAM control check
  int frame_no = 0;
  task automatic check_frame();
    bit ok;
    int bad;
    bad = 0;
    for (int s = 0; s < NUM_SCANS; s++) begin
      logic [31:0] a, hdr;
      a = DRAM_BASE + 32'(s * BLK * 4);
      ok = dram.exists(a);
      hdr = ok ? dram[a] : 0;
      if (!ok || hdr[31:16] != 16'(s)) bad++;
      for (int c = 0; c < 16; c++) begin
        logic [31:0] exp_w;
        exp_w = {12'(c), 20'(POS_BASE + (frame_no * NUM_SCANS + s) * SCAN_STEP + c * CH_STEP)};
        a = DRAM_BASE + 32'((s * BLK + 1 + c) * 4);
        if (!dram.exists(a) || dram[a] != exp_w) begin
          if (bad < 3) $display("FAIL: frame %0d scan %0d ch %0d got %h want %h", frame_no, s, c, dram.exists(a) ? dram[a] : 0, exp_w);
          bad++;
        end
      end
    end
    check(bad == 0, $sformatf("frame %0d in DRAM (%0d bad words)", frame_no, bad));
    dram.delete();
    frame_no++;
    frames_checked++;
  endtask

  // ----------------------------------------------------------- core #1
  initial begin
    logic [31:0] d;
    wait (rst_n);
    repeat (10) @(negedge clk);
    ocm(1, 1, 0, OCM_MUTEX_ADDR, 0, d);
    ocm(1, 1, 0, OCM_IRQ_CNT_ADDR, 0, d);
    put_flag(1, FLAG_INIT_DONE);
    forever begin
      // wait for a new frame, then for the end of its FoV work
      do begin
        repeat (50) @(negedge clk);
        ocm(1, 0, 0, OCM_FLAG_ADDR, 0, d);
      end while (d[7:0] != 8'(FLAG_NEXT_FRAME));
      do begin
        repeat (50) @(negedge clk);
        lock(1);
        ocm(1, 0, 0, OCM_IRQ_CNT_ADDR, 0, d);
        unlock(1);
      end while (d != 32'(NUM_SCANS));
      put_flag(1, FLAG_FOV_DONE);
      n_fov_done++;
      check_frame();                      // DRAM control
      repeat (T_DRAM) @(negedge clk);
      repeat (T_ENC) @(negedge clk);      // Encoding
      if (SEQUENTIAL != 0) begin
        repeat (T_PKT) @(negedge clk);    // Packetizing
        scanner_command(16'(100 + 10 * frame_no));
        repeat (T_IO) @(negedge clk);     // I/O control
        put_flag(1, FLAG_BLIND_DONE);
        n_blind_done++;
      end else begin
        lock(1);
        put_flag(1, FLAG_CORE_SYNC);
        n_core_sync++;
        unlock(1);
      end
    end
  end

  // ----------------------------------------------------------- core #2
  initial begin
    logic [31:0] d;
    if (SEQUENTIAL == 0) begin
      wait (rst_n);
      repeat (40) @(negedge clk);
      forever begin
        do begin
          repeat (30) @(negedge clk);
          lock(2);
          ocm(2, 0, 0, OCM_FLAG_ADDR, 0, d);
          repeat (20) @(negedge clk);
          unlock(2);
        end while (d[7:0] != 8'(FLAG_CORE_SYNC));
        repeat (T_PKT) @(negedge clk);    // Packetizing
        lock(2);
        put_flag(2, FLAG_BLIND_DONE);
        n_blind_done++;
        unlock(2);
        scanner_command(16'(100 + 10 * frame_no));
        repeat (T_IO) @(negedge clk);     // I/O control
      end
    end
  end

endmodule
