// tb_lidar_amp_sweep: the design at three frame sizes, from small to beyond the
// 10 frames/s limit, with two-core scheduling of the Blind work.
//
// Three copies of lidar_amp_top run side by side with 63, 2,250 and 11,250 scans
// per frame (about 1k, 36k and 180k points at 16 points per scan); everything
// else is at its default: 1418-clock scan windows and a 10,000,000-clock frame
// period (0.1 s at 100 MHz). Each copy has a PS model in two-core mode whose
// process times are the ones of the 74,400-point frame (DRAM control 0.012 s,
// Encoding 0.015 s, Packetizing 0.003 s, I/O control 0.026 s) scaled linearly
// with the number of points; that scaling is this testbench's own assumption.
// Checked for every size: every frame in DRAM is complete and correct, one DMA
// interrupt per scan, and FOV_DONE comes inside the last scan window, so the FoV
// work grows linearly with the number of scans (NUM_SCANS * 1418 clocks). The
// two smaller frames fit in the frame period (no frame drop); the largest one
// needs about 0.16 s of FoV work alone and must drop master-clock ticks.
// Runs 3.4 frame periods, about a minute of simulation.
module tb_lidar_amp_sweep;
  import lidar_pkg::*;
  localparam int unsigned SC = 1418, FC = 10_000_000;
  localparam int unsigned NSZ = 3;
  localparam int unsigned NS_OF [NSZ] = '{63, 2250, 11250};

  logic clk = 0, rst_n = 1;
  always #5 clk = !clk;
  initial #1 rst_n = 0;

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s @%0t", what, $time); end
  endtask

  for (genvar m = 0; m < NSZ; m++) begin : g_sys
    localparam int unsigned NS = NS_OF[m];
    ocm_req_t     ps_req [2];
    ocm_rsp_t     ps_rsp [2];
    logic         hsel, hwrite, hready, hreadyout, hresp;
    logic [31:0]  haddr, hwdata, hrdata;
    logic [1:0]   htrans;
    logic         adc_spi_cs_n, spi_sclk, spi_mosi;
    logic         dram_wvalid, dram_wready, dma_irq, ld_trigger, stop, refclk;
    logic [31:0]  dram_waddr, dram_wdata;
    lidar_state_e state;
    logic [31:0]  frame_count, frame_drops, irq_count, index_errors, incomplete_scans, overruns;
    logic [15:0]  scan_pos, scanner_target;
    int pchecks, pfails, n_fov, n_sync, n_blind, n_spi, n_mutex, n_stall, n_frames;

    lidar_amp_top #(.NUM_SCANS(NS)) dut (
      .clk, .rst_n, .ps_req, .ps_rsp, .hsel, .haddr, .htrans, .hwrite, .hwdata,
      .hready, .hrdata, .hreadyout, .hresp, .adc_spi_cs_n, .spi_sclk, .spi_mosi,
      .adc_spi_miso(1'b0), .dram_wvalid, .dram_waddr, .dram_wdata, .dram_wready,
      .dma_irq, .ld_trigger, .stop, .refclk, .state, .frame_count, .frame_drops,
      .irq_count, .index_errors, .incomplete_scans, .overruns, .scan_pos,
      .scanner_target);

    ps_dram_model #(.NUM_SCANS(NS), .SEQUENTIAL(0),
                    .T_DRAM(1_200_000 / 4650 * NS), .T_ENC(1_500_000 / 4650 * NS),
                    .T_PKT(300_000 / 4650 * NS), .T_IO(2_600_000 / 4650 * NS)) ps (
      .clk, .rst_n, .ps_req, .ps_rsp, .hsel, .haddr, .htrans, .hwrite, .hwdata,
      .hready, .hrdata, .dram_wvalid, .dram_waddr, .dram_wdata, .dram_wready,
      .checks(pchecks), .failures(pfails), .n_fov_done(n_fov), .n_core_sync(n_sync),
      .n_blind_done(n_blind), .n_spi_cmds(n_spi), .n_mutex_busy(n_mutex),
      .n_dram_stalls(n_stall), .frames_checked(n_frames));

    // FoV and Blind work lengths of the last complete frame, from the state changes
    longint cyc = 0, t_fov_start = 0, t_blind_start = 0, fov_len = 0, blind_len = 0;
    int n_irq = 0;
    lidar_state_e prev_state = ST_INIT;
    always @(posedge clk) if (rst_n) begin
      cyc++;
      if (dma_irq) n_irq++;
      if (prev_state != ST_FOV && state == ST_FOV) t_fov_start = cyc;
      if (prev_state == ST_FOV && state == ST_BLIND) begin fov_len = cyc - t_fov_start; t_blind_start = cyc; end
      if (prev_state == ST_BLIND && state == ST_IDLE) blind_len = cyc - t_blind_start;
      prev_state = state;
    end

    // per-size report and checks, at the end of the run
    task automatic report();
      $display("%0d scans (%0d points): frames started=%0d dropped=%0d checked=%0d FoV=%0d clocks Blind=%0d clocks FoV+Blind=%0d",
               NS, 16 * NS, frame_count, frame_drops, n_frames, fov_len, blind_len, fov_len + blind_len);
      checks += pchecks; failures += pfails;
      check(n_frames >= 1 && blind_len > 0, $sformatf("%0d scans: a frame completed", NS));
      check(n_irq == int'(frame_count) * int'(NS) || n_irq == (int'(frame_count) - 1) * int'(NS) + int'(irq_count),
            $sformatf("%0d scans: one DMA interrupt per scan", NS));
      check(fov_len >= longint'(NS - 1) * SC && fov_len < longint'(NS) * SC,
            $sformatf("%0d scans: FoV work ends in the last scan window", NS));
      check(index_errors == 0 && incomplete_scans == 0 && overruns == 0,
            $sformatf("%0d scans: no DSP errors", NS));
      if (longint'(NS) * SC < FC / 2) begin
        check(frame_drops == 0 && fov_len + blind_len < FC,
              $sformatf("%0d scans: fits the frame period, no drop", NS));
      end else begin
        check(frame_drops > 0 && fov_len > FC,
              $sformatf("%0d scans: FoV work alone exceeds the frame period, ticks dropped", NS));
      end
    endtask
  end

  initial begin
    repeat (5) @(negedge clk);
    rst_n = 1;
    repeat (3 * FC + 4 * FC / 10) @(negedge clk);
    g_sys[0].report();
    g_sys[1].report();
    g_sys[2].report();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (4 * FC) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
