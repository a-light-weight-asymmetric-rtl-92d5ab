// dsp_block_packer: DSP stage that turns the TDC words of one scan into a block.
//
// The document says only that its DSP process turns the raw TDC words into blocks
// that can be stacked in DRAM, without giving its insides; this is the simplest block builder
// that does that. The four TDC groups deliver their words at the same time, so
// each group's word is held in a one-word slot and the slots are written to the
// block RAM one per clock, lowest group first. A word goes to the slot of the
// block given by its own channel index (word 1 + index), so the block comes out
// in channel order whatever the arrival order. Words whose index is not below
// CHANNELS are dropped and counted in index_errors. When all CHANNELS words of the
// scan are in, a header word {scan index[15:0], scan position[15:0]} is written
// to word 0 and the block is handed to the DMA interface (block_valid, one clock)
// and the next scan uses the other bank of the RAM.
//
// The scanner position arrives on GPIO from the scanner board; it passes a
// two-stage synchroniser and is sampled at scan_start. A scan that starts while
// the previous one is still incomplete counts in incomplete_scans; a block that
// is complete while the DMA is still copying the other bank is dropped and
// counted in overruns. Banks, header layout and counters are this design's own.
module dsp_block_packer
  import lidar_pkg::*;
#(
  parameter int unsigned GROUPS     = 4,   // TDC groups
  parameter int unsigned CHANNELS   = 16,  // TDC channels per scan
  parameter int unsigned BANK_WORDS = 32   // block RAM words per bank
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   scan_start,
  input  logic [15:0]            scan_idx,
  input  logic [15:0]            scan_pos_gpio,   // asynchronous scanner feedback
  input  logic [GROUPS-1:0]      word_valid,
  input  tdc_word_t              word [GROUPS],
  // block RAM write port
  output logic                   ram_we,
  output logic [$clog2(2*BANK_WORDS)-1:0] ram_waddr,
  output logic [31:0]            ram_wdata,
  // hand-off to the DMA interface
  input  logic                   dma_busy,
  output logic                   block_valid,
  output logic                   block_bank,
  output logic [31:0]            index_errors,
  output logic [31:0]            incomplete_scans,
  output logic [31:0]            overruns
);

  localparam int unsigned OW = $clog2(BANK_WORDS);
  localparam int unsigned NW = $clog2(CHANNELS + 1);
  localparam int unsigned GW = (GROUPS > 1) ? $clog2(GROUPS) : 1;

  logic [15:0]       pos_s1, pos_s2, hdr_pos, hdr_idx;
  logic [GROUPS-1:0] pend;
  tdc_word_t         slot [GROUPS];
  logic [NW-1:0]     count;
  logic              hdr_due;
  logic              bank;

  // pick the lowest pending group
  logic          pick_any;
  logic [GW-1:0] pick;
  always_comb begin
    pick_any = 1'b0;
    pick     = '0;
    for (int g = GROUPS - 1; g >= 0; g--) begin
      if (pend[g]) begin
        pick_any = 1'b1;
        pick     = GW'(g);
      end
    end
  end

  tdc_word_t pw;
  logic      pw_ok;
  assign pw    = slot[pick];
  assign pw_ok = (pw.index < INDEX_BITS'(CHANNELS));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pos_s1           <= '0;
      pos_s2           <= '0;
      hdr_pos          <= '0;
      hdr_idx          <= '0;
      pend             <= '0;
      count            <= '0;
      hdr_due          <= 1'b0;
      bank             <= 1'b0;
      ram_we           <= 1'b0;
      ram_waddr        <= '0;
      ram_wdata        <= '0;
      block_valid      <= 1'b0;
      block_bank       <= 1'b0;
      index_errors     <= '0;
      incomplete_scans <= '0;
      overruns         <= '0;
      for (int g = 0; g < GROUPS; g++) slot[g] <= '0;
    end else begin
      pos_s1      <= scan_pos_gpio;
      pos_s2      <= pos_s1;
      ram_we      <= 1'b0;
      block_valid <= 1'b0;

      if (scan_start) begin
        hdr_idx <= scan_idx;
        hdr_pos <= pos_s2;
        count   <= '0;
        hdr_due <= 1'b0;
        if (count != '0) incomplete_scans <= incomplete_scans + 1'b1;
      end else if (hdr_due) begin
        // header last, then hand the bank over
        hdr_due   <= 1'b0;
        count     <= '0;
        ram_we    <= 1'b1;
        ram_waddr <= {bank, OW'(0)};
        ram_wdata <= {hdr_idx, hdr_pos};
        if (dma_busy) begin
          overruns <= overruns + 1'b1;
        end else begin
          block_valid <= 1'b1;
          block_bank  <= bank;
          bank        <= !bank;
        end
      end else if (pick_any) begin
        if (pw_ok) begin
          ram_we    <= 1'b1;
          ram_waddr <= {bank, OW'(pw.index) + OW'(1)};
          ram_wdata <= pw;
          count     <= count + 1'b1;
          if (count == NW'(CHANNELS - 1)) hdr_due <= 1'b1;
        end else begin
          index_errors <= index_errors + 1'b1;
        end
      end

      // slots: clear the one written, load new words
      for (int g = 0; g < GROUPS; g++) begin
        if (!scan_start && !hdr_due && pick_any && pick == GW'(g)) pend[g] <= 1'b0;
        if (word_valid[g]) begin
          pend[g] <= 1'b1;
          slot[g] <= word[g];
        end
      end
    end
  end

endmodule
