// tb_lidar_amp_top_full: the whole design at its default size, one frame after
// another, with the Blind-work times of the document's measurements.
//
// Two copies of the design at their defaults (4,650 scans of 1418 clocks, 10
// frames per second at 100 MHz, 16 TDC channels, 256 KB shared memory) run with a
// PS model each. The Blind-work process times are the measured ones converted to
// 100 MHz clocks: DRAM control 0.012 s, Encoding 0.015 s, Packetizing 0.003 s,
// I/O control 0.026 s. One copy spreads them over two cores (AMP), the other
// runs them on one core (sequential). Checked for both: every frame in DRAM is
// complete and correct, 4,650 DMA interrupts per frame, and FOV_DONE comes
// inside the last of the 4,650 scan windows of 1418 clocks (about 0.0659 s). Expected, as measured in the document: FoV plus
// Blind work stays under the 0.1 s frame period with two cores (no frame drop)
// and exceeds it with one (frames are dropped).
module tb_lidar_amp_top_full;
  import lidar_pkg::*;
  localparam int unsigned NS = 4650, SC = 1418, FC = 10_000_000;

  logic clk = 0, rst_n = 1;
  always #5 clk = !clk;
  initial #1 rst_n = 0;

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s @%0t", what, $time); end
  endtask

  for (genvar m = 0; m < 2; m++) begin : g_sys
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

    lidar_amp_top dut (
      .clk, .rst_n, .ps_req, .ps_rsp, .hsel, .haddr, .htrans, .hwrite, .hwdata,
      .hready, .hrdata, .hreadyout, .hresp, .adc_spi_cs_n, .spi_sclk, .spi_mosi,
      .adc_spi_miso(1'b0), .dram_wvalid, .dram_waddr, .dram_wdata, .dram_wready,
      .dma_irq, .ld_trigger, .stop, .refclk, .state, .frame_count, .frame_drops,
      .irq_count, .index_errors, .incomplete_scans, .overruns, .scan_pos,
      .scanner_target);

    ps_dram_model #(.NUM_SCANS(NS), .SEQUENTIAL(m), .T_DRAM(1_200_000),
                    .T_ENC(1_500_000), .T_PKT(300_000), .T_IO(2_600_000)) ps (
      .clk, .rst_n, .ps_req, .ps_rsp, .hsel, .haddr, .htrans, .hwrite, .hwdata,
      .hready, .hrdata, .dram_wvalid, .dram_waddr, .dram_wdata, .dram_wready,
      .checks(pchecks), .failures(pfails), .n_fov_done(n_fov), .n_core_sync(n_sync),
      .n_blind_done(n_blind), .n_spi_cmds(n_spi), .n_mutex_busy(n_mutex),
      .n_dram_stalls(n_stall), .frames_checked(n_frames));

    // FoV and Blind work lengths, from the state changes
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
  end

  initial begin
    repeat (5) @(negedge clk);
    rst_n = 1;
    // the first frame starts at the first master-clock tick; run three ticks
    repeat (3 * FC + 8 * FC / 10) @(negedge clk);
    for (int m = 0; m < 2; m++) begin
      int pc, pf, nfr, nirq;
      longint fl, bl;
      logic [31:0] drops, fcount;
      if (m == 0) begin
        pc = g_sys[0].pchecks; pf = g_sys[0].pfails; nfr = g_sys[0].n_frames; nirq = g_sys[0].n_irq;
        fl = g_sys[0].fov_len; bl = g_sys[0].blind_len; drops = g_sys[0].frame_drops;
        fcount = g_sys[0].frame_count;
      end else begin
        pc = g_sys[1].pchecks; pf = g_sys[1].pfails; nfr = g_sys[1].n_frames; nirq = g_sys[1].n_irq;
        fl = g_sys[1].fov_len; bl = g_sys[1].blind_len; drops = g_sys[1].frame_drops;
        fcount = g_sys[1].frame_count;
      end
      $display("%s: frames started=%0d dropped=%0d checked=%0d FoV=%0d clocks Blind=%0d clocks FoV+Blind=%0d",
               m == 0 ? "AMP" : "SEQ", fcount, drops, nfr, fl, bl, fl + bl);
      checks += pc; failures += pf;
      check(nfr >= 1 && nirq == int'(fcount) * NS, "DMA interrupts per scan");
      check(fl >= (NS - 1) * SC && fl < NS * SC, "FoV work: last interrupt inside the last scan window");
      if (m == 0) begin
        check(fcount == 3 && drops == 0 && nfr == 3, "AMP: three frames, none dropped");
        check(fl + bl < FC, "AMP: FoV + Blind work within the frame period");
      end else begin
        check(drops > 0, "sequential: frames dropped");
        check(fl + bl > FC, "sequential: FoV + Blind work exceeds the frame period");
      end
    end
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
