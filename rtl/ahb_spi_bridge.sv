// ahb_spi_bridge: AHB interface from the PS to the SPI links of the boards.
//
// The PS configures the ADC board and commands the scanner board over SPI; in
// the TDC data-pipeline diagram the SPI link of the ADC board reaches the PS
// through an AHB interface in the PL. The document names these parts only, so
// this is a plain AHB-Lite slave with four 32-bit registers and an SPI master:
//   0x00 CTRL   write: bit 0 starts a transfer, bits 9:8 select the chip select
//   0x04 TXDATA bits 15:0 are sent
//   0x08 RXDATA bits 15:0 received in the last transfer
//   0x0C STATUS bit 0 busy, bit 1 done (set at the end, cleared by a start)
// The SPI master sends 16-bit words MSB first in mode 0 (SCLK idle low, MISO
// sampled on the rising edge, MOSI changed on the falling edge); SCLK half period
// is SPI_HALF clocks. The bus never inserts wait states and never errors.
// Register map, word size, SPI mode and rate are this design's choices.
//
// Lint notes: only haddr[3:2] selects a register (word-aligned accesses in a
// 16-byte window, the rest of the address is decoded outside by hsel), only
// htrans[1] is needed to tell an active transfer from IDLE/BUSY, and hwdata
// above bit 15 has no register to go to. hreadyout and hresp are constant and
// hrdata[31:16] reads zero, as said above.
module ahb_spi_bridge #(
  parameter int unsigned NCS      = 2,   // chip selects (scanner, ADC board)
  parameter int unsigned SPI_HALF = 5    // SCLK half period in clocks
) (
  input  logic            clk,
  input  logic            rst_n,
  // AHB-Lite slave
  input  logic            hsel,
  input  logic [31:0]     haddr,
  input  logic [1:0]      htrans,
  input  logic            hwrite,
  input  logic [31:0]     hwdata,
  input  logic            hready,
  output logic [31:0]     hrdata,
  output logic            hreadyout,
  output logic            hresp,
  // SPI
  output logic            sclk,
  output logic            mosi,
  input  logic            miso,
  output logic [NCS-1:0]  cs_n
);

  localparam int unsigned HW = (SPI_HALF > 1) ? $clog2(SPI_HALF) : 1;

  assign hreadyout = 1'b1;
  assign hresp     = 1'b0;

  // address phase
  logic       dp_valid, dp_write;
  logic [3:2] dp_addr;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      dp_valid <= 1'b0;
      dp_write <= 1'b0;
      dp_addr  <= '0;
    end else if (hready) begin
      dp_valid <= hsel && htrans[1];
      dp_write <= hwrite;
      dp_addr  <= haddr[3:2];
    end
  end

  logic [15:0] txdata, rxdata, shreg;
  logic [1:0]  cs_sel;
  logic        busy, done;
  logic [HW-1:0] hcnt;
  logic [4:0]  edges_left;   // rising edges still to come
  logic        start;

  assign start = dp_valid && dp_write && dp_addr == 2'd0 && hwdata[0] && !busy;

  always_comb begin
    unique case (dp_addr)
      2'd0:    hrdata = {22'd0, cs_sel, 8'd0};
      2'd1:    hrdata = {16'd0, txdata};
      2'd2:    hrdata = {16'd0, rxdata};
      default: hrdata = {30'd0, done, busy};
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      txdata     <= '0;
      rxdata     <= '0;
      shreg      <= '0;
      cs_sel     <= '0;
      busy       <= 1'b0;
      done       <= 1'b0;
      hcnt       <= '0;
      edges_left <= '0;
      sclk       <= 1'b0;
      mosi       <= 1'b0;
      cs_n       <= '1;
    end else begin
      if (dp_valid && dp_write) begin
        if (dp_addr == 2'd0) cs_sel <= hwdata[9:8];
        if (dp_addr == 2'd1) txdata <= hwdata[15:0];
      end
      if (start) begin
        busy       <= 1'b1;
        done       <= 1'b0;
        shreg      <= txdata;
        mosi       <= txdata[15];
        cs_n       <= ~(NCS'(1) << hwdata[9:8]);
        edges_left <= 5'd16;
        hcnt       <= '0;
        sclk       <= 1'b0;
      end else if (busy) begin
        if (hcnt == HW'(SPI_HALF - 1)) begin
          hcnt <= '0;
          if (!sclk) begin
            if (edges_left == 5'd0) begin      // last falling edge done: finish
              busy   <= 1'b0;
              done   <= 1'b1;
              cs_n   <= '1;
              rxdata <= shreg;
            end else begin                     // rising edge: sample MISO
              sclk       <= 1'b1;
              shreg      <= {shreg[14:0], miso};
              edges_left <= edges_left - 1'b1;
            end
          end else begin                       // falling edge: next MOSI bit
            sclk <= 1'b0;
            mosi <= shreg[15];
          end
        end else begin
          hcnt <= hcnt + 1'b1;
        end
      end
    end
  end

endmodule
