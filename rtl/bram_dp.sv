// bram_dp: simple dual-port block RAM (one write port, one read port).
//
// Buffers the TDC words of a scan between the DSP stage, which writes them, and
// the DMA interface, which reads them out to DRAM. Both ports are in the PL clock
// domain; a read returns its data on the clock after the address (registered
// output, as an FPGA block RAM). The document names the BRAM; depth and width are
// this design's choice (two 32-word banks of 32-bit words).
module bram_dp #(
  parameter int unsigned DEPTH = 64,
  parameter int unsigned WIDTH = 32
) (
  input  logic                     clk,
  input  logic                     we,
  input  logic [$clog2(DEPTH)-1:0] waddr,
  input  logic [WIDTH-1:0]         wdata,
  input  logic                     re,
  input  logic [$clog2(DEPTH)-1:0] raddr,
  output logic [WIDTH-1:0]         rdata
);

  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    if (re) rdata <= mem[raddr];
  end

endmodule
