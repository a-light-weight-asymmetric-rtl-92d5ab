// lidar_amp_top: PL of the LiDAR FPGA SoC with its shared memory, wired to the
// ADC and scanner simulation boards of the hardware-in-the-loop rig.
//
// The PL runs the FoV work: a master clock starts a frame (NEXT_FRAME), the laser
// firing unit fires the laser and raises STOP once per scan, four DAQ receivers
// take the TDC groups' serial words, the DSP stage stacks the 16 words of a scan
// into a block in block RAM, and the DMA interface copies each block to DRAM and
// raises the DMA interrupt. The PS runs the Blind work on two cores (software,
// outside this design). PL and PS synchronise through the shared on-chip memory:
// the PL writes the 'N' flag and the DMA interrupt counter there; core #1 writes
// 'F' (FOV_DONE) when the counter reaches the number of scans and 'I' when it
// hands the frame to core #2; 'B' (BLIND_DONE) ends the Blind work; the state
// machine follows those writes. The two PS cores reach the memory through the
// ps_req/ps_rsp ports, the PS's AHB bus reaches the SPI master, and the DRAM
// write port is brought out.
//
// Defaults are the document's frame: 4,650 scans of 14.181 us (1418 clocks at the
// assumed 100 MHz) at 10 frames per second, 16 TDC channels in 4 groups, a 256 KB
// shared memory. The boards are part of the top because the document's design is
// validated with them; in a real system the sdo/stop/lclk and GPIO nets leave
// the chip.
//
// Lint notes: frame_tick, fov_active, fov_scans_done, blocks_done and the DAQ
// receivers' word_num and busy are status outputs of the sub-blocks that the
// top does not need (the state machine, not the laser unit, ends the FoV work;
// the DSP stage tells complete scans apart by channel index); they stay on the
// sub-blocks for their own testbenches and for debug. hreadyout and hresp are
// constant and hrdata[31:16] is zero, because the SPI bridge never stalls or
// errors and its registers are 16 bits wide. rst_n is reported as both an
// asynchronous reset and a synchronous input only because assertions use it in
// their disable condition; no logic resets synchronously.
module lidar_amp_top
  import lidar_pkg::*;
#(
  parameter int unsigned FRAME_CYCLES = 10_000_000,
  parameter int unsigned NUM_SCANS    = 4650,
  parameter int unsigned SCAN_CYCLES  = 1418,
  parameter int unsigned STOP_DELAY   = 200,
  parameter int unsigned OCM_WORDS    = 65536,
  parameter int unsigned SPI_HALF     = 5,
  parameter int unsigned STEP_CYCLES  = 100
) (
  input  logic         clk,
  input  logic         rst_n,
  // PS cores #1 and #2 on the shared memory
  input  ocm_req_t     ps_req [2],
  output ocm_rsp_t     ps_rsp [2],
  // PS AHB bus to the SPI master
  input  logic         hsel,
  input  logic [31:0]  haddr,
  input  logic [1:0]   htrans,
  input  logic         hwrite,
  input  logic [31:0]  hwdata,
  input  logic         hready,
  output logic [31:0]  hrdata,
  output logic         hreadyout,
  output logic         hresp,
  // SPI chip select 1 leads to the ADC board's configuration port
  output logic         adc_spi_cs_n,
  output logic         spi_sclk,
  output logic         spi_mosi,
  input  logic         adc_spi_miso,
  // DRAM write port
  output logic         dram_wvalid,
  output logic [31:0]  dram_waddr,
  output logic [31:0]  dram_wdata,
  input  logic         dram_wready,
  // to the PS interrupt controller and for observation
  output logic         dma_irq,
  output logic         ld_trigger,
  output logic         stop,
  output logic         refclk,
  output lidar_state_e state,
  output logic [31:0]  frame_count,
  output logic [31:0]  frame_drops,
  output logic [31:0]  irq_count,
  output logic [31:0]  index_errors,
  output logic [31:0]  incomplete_scans,
  output logic [31:0]  overruns,
  output logic [15:0]  scan_pos,
  output logic [15:0]  scanner_target
);

  localparam int unsigned GROUPS     = 4;
  localparam int unsigned CH_PER_GRP = 4;
  localparam int unsigned BANK_WORDS = 32;

  // ---------------------------------------------------------------- clocks
  logic lclk, lclk_rise, lclk_fall;
  refclk_gen #(.LCLK_HALF(1), .REF_HALF(5)) u_refclk (
    .clk, .rst_n, .lclk, .lclk_rise, .lclk_fall, .refclk);

  // --------------------------------------------------------- state machine
  logic        flag_wr_valid;
  state_flag_e flag_wr_data;
  logic        frame_tick, next_frame;
  lidar_state_machine #(.FRAME_CYCLES(FRAME_CYCLES)) u_fsm (
    .clk, .rst_n, .flag_wr_valid, .flag_wr_data, .state, .frame_tick,
    .next_frame, .frame_count, .frame_drops);

  // ------------------------------------------------------------ laser firing
  logic        fov_active, scan_start, fov_scans_done;
  logic [15:0] scan_idx;
  laser_firing #(.NUM_SCANS(NUM_SCANS), .SCAN_CYCLES(SCAN_CYCLES),
                 .STOP_DELAY(STOP_DELAY)) u_laser (
    .clk, .rst_n, .next_frame, .lclk_fall, .fov_active, .scan_start, .scan_idx,
    .ld_trigger, .stop, .fov_scans_done);

  // ---------------------------------------------------- ADC simulation board
  logic [GROUPS-1:0] sdo;
  tdc_emulator #(.GROUPS(GROUPS), .CH_PER_GROUP(CH_PER_GRP)) u_adc_board (
    .lclk, .rst_n, .stop, .sdo);

  // --------------------------------------------------------------------- DAQ
  logic [GROUPS-1:0] word_valid;
  tdc_word_t         word [GROUPS];
  for (genvar g = 0; g < GROUPS; g++) begin : g_daq
    logic [$clog2(CH_PER_GRP+1)-1:0] word_num;
    logic                            busy;
    tdc_sdo_receiver #(.WORDS(CH_PER_GRP)) u_rx (
      .clk, .rst_n, .lclk_rise, .stop, .sdo(sdo[g]), .word_valid(word_valid[g]),
      .word(word[g]), .word_num, .busy);
  end

  // --------------------------------------------------------------------- DSP
  logic        ram_we, ram_re, block_valid, block_bank, dma_busy;
  logic [$clog2(2*BANK_WORDS)-1:0] ram_waddr, ram_raddr;
  logic [31:0] ram_wdata, ram_rdata;
  dsp_block_packer #(.GROUPS(GROUPS), .CHANNELS(GROUPS*CH_PER_GRP),
                     .BANK_WORDS(BANK_WORDS)) u_dsp (
    .clk, .rst_n, .scan_start, .scan_idx, .scan_pos_gpio(scan_pos), .word_valid,
    .word, .ram_we, .ram_waddr, .ram_wdata, .dma_busy, .block_valid, .block_bank,
    .index_errors, .incomplete_scans, .overruns);

  bram_dp #(.DEPTH(2*BANK_WORDS), .WIDTH(32)) u_bram (
    .clk, .we(ram_we), .waddr(ram_waddr), .wdata(ram_wdata), .re(ram_re),
    .raddr(ram_raddr), .rdata(ram_rdata));

  // ------------------------------------------------------------------- DMA
  logic [31:0] blocks_done;
  dma_interface #(.BANK_WORDS(BANK_WORDS), .BLOCK_WORDS(GROUPS*CH_PER_GRP + 1)) u_dma (
    .clk, .rst_n, .frame_start(next_frame), .block_valid, .block_bank,
    .busy(dma_busy), .ram_re, .ram_raddr, .ram_rdata, .dram_wvalid, .dram_waddr,
    .dram_wdata, .dram_wready, .dma_irq, .blocks_done);

  // ------------------------------------------------ shared on-chip memory
  ocm_req_t ocm_req [3];
  ocm_rsp_t ocm_rsp [3];

  pl_sync_writer u_sync (
    .clk, .rst_n, .next_frame, .dma_irq, .ocm_req(ocm_req[0]),
    .ocm_rsp(ocm_rsp[0]), .irq_count);

  assign ocm_req[1] = ps_req[0];
  assign ocm_req[2] = ps_req[1];
  assign ps_rsp[0]  = ocm_rsp[1];
  assign ps_rsp[1]  = ocm_rsp[2];

  shared_ocm #(.NPORTS(3), .WORDS(OCM_WORDS)) u_ocm (
    .clk, .rst_n, .req(ocm_req), .rsp(ocm_rsp), .flag_wr_valid, .flag_wr_data);

  // ------------------------------------------------- SPI and scanner board
  logic [1:0] cs_n;
  logic       scanner_miso;
  ahb_spi_bridge #(.NCS(2), .SPI_HALF(SPI_HALF)) u_spi (
    .clk, .rst_n, .hsel, .haddr, .htrans, .hwrite, .hwdata, .hready, .hrdata,
    .hreadyout, .hresp, .sclk(spi_sclk), .mosi(spi_mosi),
    .miso(!cs_n[0] ? scanner_miso : adc_spi_miso), .cs_n);
  assign adc_spi_cs_n = cs_n[1];

  scanner_emulator #(.STEP_CYCLES(STEP_CYCLES)) u_scanner_board (
    .clk, .rst_n, .sclk(spi_sclk), .mosi(spi_mosi), .cs_n(cs_n[0]),
    .miso(scanner_miso), .pos_gpio(scan_pos), .target(scanner_target));

endmodule
