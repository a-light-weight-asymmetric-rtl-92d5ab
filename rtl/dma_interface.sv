// dma_interface: copies each finished scan block from block RAM to DRAM.
//
// When the DSP stage hands over a bank (block_valid, block_bank), the block's
// BLOCK_WORDS words are read from the RAM one by one (one clock read latency)
// and written to DRAM over a simple valid/ready write port, at consecutive word
// addresses starting at DRAM_BASE + block number * BLOCK_WORDS * 4. Blocks of a
// frame are thus stacked in DRAM in scan order; the block number restarts at
// frame_start. When the last word has been accepted, dma_irq pulses for one clock:
// this is the DMA interrupt that the document's PS counts to detect the end of
// the FoV work. busy stays high from block_valid until the interrupt.
// The document takes the DMA from the SoC vendor and gives no insides; this is
// the simplest copy engine that does the job, and the DRAM port, base address and
// layout are this design's own.
//
// Lint note: rst_n is reported as both an asynchronous reset and a synchronous
// input only because the assertion uses it in its disable condition; no logic
// resets synchronously.
module dma_interface #(
  parameter int unsigned BANK_WORDS  = 32,
  parameter int unsigned BLOCK_WORDS = 17,
  parameter logic [31:0] DRAM_BASE   = 32'h1000_0000
) (
  input  logic                            clk,
  input  logic                            rst_n,
  input  logic                            frame_start,
  input  logic                            block_valid,
  input  logic                            block_bank,
  output logic                            busy,
  // block RAM read port
  output logic                            ram_re,
  output logic [$clog2(2*BANK_WORDS)-1:0] ram_raddr,
  input  logic [31:0]                     ram_rdata,
  // DRAM write port
  output logic                            dram_wvalid,
  output logic [31:0]                     dram_waddr,
  output logic [31:0]                     dram_wdata,
  input  logic                            dram_wready,
  output logic                            dma_irq,
  output logic [31:0]                     blocks_done
);

  localparam int unsigned OW = $clog2(BANK_WORDS);
  localparam int unsigned WW = $clog2(BLOCK_WORDS + 1);

  typedef enum logic [1:0] {S_IDLE, S_READ, S_DATA, S_WRITE} dma_state_e;
  dma_state_e    st;
  logic          bank;
  logic [WW-1:0] widx;
  logic [31:0]   blk_base;   // byte address of the current block

  logic          restart;    // frame_start seen, apply when idle

  assign busy      = (st != S_IDLE);
  assign ram_re    = (st == S_READ);
  assign ram_raddr = {bank, OW'(widx)};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st          <= S_IDLE;
      bank        <= 1'b0;
      widx        <= '0;
      blk_base    <= DRAM_BASE;
      restart     <= 1'b0;
      dram_wvalid <= 1'b0;
      dram_waddr  <= '0;
      dram_wdata  <= '0;
      dma_irq     <= 1'b0;
      blocks_done <= '0;
    end else begin
      dma_irq <= 1'b0;
      if (frame_start) restart <= 1'b1;
      unique case (st)
        S_IDLE: begin
          if (restart) begin
            blk_base <= DRAM_BASE;
            restart  <= frame_start;
          end
          if (block_valid) begin
            bank <= block_bank;
            widx <= '0;
            st   <= S_READ;
          end
        end
        S_READ: st <= S_DATA;  // RAM reads this cycle
        S_DATA: begin          // RAM output is valid in this cycle
          dram_wvalid <= 1'b1;
          dram_waddr  <= blk_base + 32'({widx, 2'b00});
          dram_wdata  <= ram_rdata;
          st          <= S_WRITE;
        end
        S_WRITE: if (dram_wready) begin
          dram_wvalid <= 1'b0;
          if (widx == WW'(BLOCK_WORDS - 1)) begin
            st          <= S_IDLE;
            dma_irq     <= 1'b1;
            blocks_done <= blocks_done + 1'b1;
            blk_base    <= blk_base + 32'(BLOCK_WORDS * 4);
          end else begin
            widx <= widx + 1'b1;
            st   <= S_READ;
          end
        end
        default: st <= S_IDLE;
      endcase
    end
  end

  // a write, once offered, is held until accepted
  property p_hold;
    @(posedge clk) disable iff (!rst_n)
      dram_wvalid && !dram_wready |=> dram_wvalid && $stable(dram_waddr) && $stable(dram_wdata);
  endproperty
  a_hold: assert property (p_hold);

endmodule
