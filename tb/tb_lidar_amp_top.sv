// tb_lidar_amp_top: end-to-end test of the whole design at reduced size.
//
// Two copies of the design run side by side with NUM_SCANS=12 scans per frame
// and a 30,000-clock frame period; everything else (1418-clock scan window, 16
// TDC channels, 256 KB shared memory) is at its default. Each copy is driven by
// a model of the PS and DRAM: one runs the Blind work on two cores (AMP), the
// other on one core (sequential). Blind-work times are chosen so that FoV plus
// Blind work fits the frame period with two cores but not with one, as in the
// document's measurements, so the sequential copy must drop frames and the AMP
// copy must not.
// Checked: every block of every frame reaches DRAM with the right header and TDC
// words; the DMA interrupt comes once per scan, SCAN_CYCLES clocks apart inside
// a frame give or take the DRAM stalls; frames start FRAME_CYCLES apart when nothing is dropped; the laser
// fires and STOP comes once per scan; the scanner takes the commanded position
// and its position appears in the block headers. Every mechanism (INIT_DONE,
// NEXT_FRAME, WAIT_FRAME, FOV_DONE, the 'I' hand-over, BLIND_DONE, DMA
// interrupt, frame drop, mutex contention, SPI command, DRAM stall) is counted
// and must have happened.
module tb_lidar_amp_top;
  import lidar_pkg::*;
  localparam int unsigned NS = 12, SC = 1418, FC = 30000;
  localparam int unsigned TD = 2000, TE = 2500, TP = 1500, TIO = 8000;

  logic clk = 0, rst_n = 1;
  always #5 clk = !clk;
  initial #1 rst_n = 0;   // a falling edge, so blocks whose clock is off in reset reset too

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s @%0t", what, $time); end
  endtask

  // one design + PS model per mode: 0 = AMP, 1 = sequential
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

    lidar_amp_top #(.FRAME_CYCLES(FC), .NUM_SCANS(NS), .SCAN_CYCLES(SC)) dut (
      .clk, .rst_n, .ps_req, .ps_rsp, .hsel, .haddr, .htrans, .hwrite, .hwdata,
      .hready, .hrdata, .hreadyout, .hresp, .adc_spi_cs_n, .spi_sclk, .spi_mosi,
      .adc_spi_miso(1'b0), .dram_wvalid, .dram_waddr, .dram_wdata, .dram_wready,
      .dma_irq, .ld_trigger, .stop, .refclk, .state, .frame_count, .frame_drops,
      .irq_count, .index_errors, .incomplete_scans, .overruns, .scan_pos,
      .scanner_target);

    ps_dram_model #(.NUM_SCANS(NS), .SEQUENTIAL(m), .T_DRAM(TD), .T_ENC(TE),
                    .T_PKT(TP), .T_IO(TIO)) ps (
      .clk, .rst_n, .ps_req, .ps_rsp, .hsel, .haddr, .htrans, .hwrite, .hwdata,
      .hready, .hrdata, .dram_wvalid, .dram_waddr, .dram_wdata, .dram_wready,
      .checks(pchecks), .failures(pfails), .n_fov_done(n_fov), .n_core_sync(n_sync),
      .n_blind_done(n_blind), .n_spi_cmds(n_spi), .n_mutex_busy(n_mutex),
      .n_dram_stalls(n_stall), .frames_checked(n_frames));

    // PL-side monitors
    longint cyc = 0, last_irq = 0, last_nf = 0;
    int n_irq = 0, n_ld = 0, n_stop = 0, n_wait = 0, n_init = 0, n_nf = 0;
    int irq_gap_bad = 0, nf_gap_bad = 0, hdr_pos_bad = 0;
    logic prev_ld = 0, prev_stop = 0;
    lidar_state_e prev_state = ST_INIT;
    always @(posedge clk) if (rst_n) begin
      cyc++;
      if (dma_irq) begin
        if (irq_count != 0 && (cyc - last_irq > SC + 60 || cyc - last_irq + 60 < SC)) irq_gap_bad++;
        last_irq = cyc; n_irq++;
      end
      if (ld_trigger && !prev_ld) n_ld++;
      if (stop && !prev_stop) n_stop++;
      if (state == ST_IDLE) n_wait++;
      if (prev_state == ST_INIT && state == ST_IDLE) n_init++;
      if (prev_state == ST_IDLE && state == ST_FOV) begin
        if (n_nf > 0 && frame_drops == 0 && cyc - last_nf != FC) nf_gap_bad++;
        last_nf = cyc; n_nf++;
      end
      // block headers carry the scanner position at scan start
      if (dram_wvalid && dram_wready && ((dram_waddr - 32'h1000_0000) % 68) == 0)
        if (dram_wdata[15:0] > 16'd200) hdr_pos_bad++;
      prev_ld = ld_trigger; prev_stop = stop; prev_state = state;
    end
  end

  initial begin
    repeat (5) @(negedge clk);
    rst_n = 1;
    wait (g_sys[0].n_frames >= 4 && g_sys[1].n_frames >= 3);
    repeat (FC) @(negedge clk);
    for (int m = 0; m < 2; m++) begin
      int pc, pf, nfov, nsync, nblind, nspi, nmutex, nstall, nfr, nirq, nld, nstop, nwait,
          ninit, nnf, igb, ngb, hpb;
      logic [31:0] drops, fcount, ierr, inc, ovr;
      logic [15:0] tgt, pos;
      case (m)
        0: begin
          pc = g_sys[0].pchecks; pf = g_sys[0].pfails; nfov = g_sys[0].n_fov; nsync = g_sys[0].n_sync;
          nblind = g_sys[0].n_blind; nspi = g_sys[0].n_spi; nmutex = g_sys[0].n_mutex;
          nstall = g_sys[0].n_stall; nfr = g_sys[0].n_frames; nirq = g_sys[0].n_irq;
          nld = g_sys[0].n_ld; nstop = g_sys[0].n_stop; nwait = g_sys[0].n_wait;
          ninit = g_sys[0].n_init; nnf = g_sys[0].n_nf; igb = g_sys[0].irq_gap_bad;
          ngb = g_sys[0].nf_gap_bad; hpb = g_sys[0].hdr_pos_bad; drops = g_sys[0].frame_drops;
          fcount = g_sys[0].frame_count; ierr = g_sys[0].index_errors;
          inc = g_sys[0].incomplete_scans; ovr = g_sys[0].overruns;
          tgt = g_sys[0].scanner_target; pos = g_sys[0].scan_pos;
        end
        default: begin
          pc = g_sys[1].pchecks; pf = g_sys[1].pfails; nfov = g_sys[1].n_fov; nsync = g_sys[1].n_sync;
          nblind = g_sys[1].n_blind; nspi = g_sys[1].n_spi; nmutex = g_sys[1].n_mutex;
          nstall = g_sys[1].n_stall; nfr = g_sys[1].n_frames; nirq = g_sys[1].n_irq;
          nld = g_sys[1].n_ld; nstop = g_sys[1].n_stop; nwait = g_sys[1].n_wait;
          ninit = g_sys[1].n_init; nnf = g_sys[1].n_nf; igb = g_sys[1].irq_gap_bad;
          ngb = g_sys[1].nf_gap_bad; hpb = g_sys[1].hdr_pos_bad; drops = g_sys[1].frame_drops;
          fcount = g_sys[1].frame_count; ierr = g_sys[1].index_errors;
          inc = g_sys[1].incomplete_scans; ovr = g_sys[1].overruns;
          tgt = g_sys[1].scanner_target; pos = g_sys[1].scan_pos;
        end
      endcase
      $display("%s: frames=%0d drops=%0d NEXT_FRAME=%0d FOV_DONE=%0d I=%0d BLIND_DONE=%0d irq=%0d ld=%0d stop=%0d wait=%0d spi=%0d mutex_busy=%0d dram_stalls=%0d",
               m == 0 ? "AMP" : "SEQ", fcount, drops, nnf, nfov, nsync, nblind, nirq, nld, nstop,
               nwait, nspi, nmutex, nstall);
      checks += pc; failures += pf;
      check(ninit == 1, "INIT_DONE once");
      check(nnf == int'(fcount) && nnf >= 3, "NEXT_FRAME happened");
      check(nwait > 0, "WAIT_FRAME happened");
      check(nfov >= 3 && nblind >= 3, "FOV_DONE and BLIND_DONE happened");
      check(nirq == nnf * NS || nirq == (nnf - 1) * NS + (nirq % NS), "DMA interrupts per scan");
      check(nld == nirq || nld == nirq + 1, "one laser trigger per scan");
      check(nstop == nld, "one STOP per laser trigger");
      check(igb == 0, "DMA interrupts SCAN_CYCLES apart");
      check(nspi > 0 && tgt >= 16'd100, "scanner commanded over SPI");
      check(pos == tgt, "scanner position reached the target");
      check(hpb == 0, "scanner position in block headers");
      check(nstall > 0, "DRAM stalls happened");
      check(ierr == 0 && inc == 0 && ovr == 0, "no DSP errors");
      if (m == 0) begin
        check(drops == 0, "AMP: no frame drop");
        check(ngb == 0, "AMP: frames FRAME_CYCLES apart");
        check(nsync >= 3, "AMP: 'I' hand-over happened");
        check(nmutex > 0, "AMP: mutex contention happened");
      end else begin
        check(drops > 0, "sequential: frame drop happened");
        check(nsync == 0, "sequential: no hand-over");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
