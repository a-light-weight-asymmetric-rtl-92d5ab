// tdc_sdo_receiver: data acquisition (DAQ) of one TDC group's serial data output.
//
// Each TDC group sends, after every STOP, the words of its channels one after the
// other on a single serial line (SDO), MSB first, one bit per LCLK period. A word
// is 32 bits: the upper 12 bits are the TDC channel index and the lower 20 bits
// the pulse position, as in the document. The ADC board launches the first bit on
// the first rising LCLK edge at which it sees STOP high after seeing it low, and
// one more bit on each following rising edge; this receiver samples the line on
// the rising edge after each launch, so it runs the same STOP edge detector at
// the same LCLK edges and then shifts in WORDS*32 bits. Every completed word is
// presented for one clock on word_valid with its position in the burst
// (word_num). The bit order within a field and the launch/sample edges are not
// given by the document and are this design's choice.
//
// Works in the PL clock domain; lclk_rise is the enable of the cycle at whose end
// LCLK rises.
module tdc_sdo_receiver
  import lidar_pkg::*;
#(
  parameter int unsigned WORDS = 4   // channels per TDC group
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic                        lclk_rise,
  input  logic                        stop,
  input  logic                        sdo,
  output logic                        word_valid,
  output tdc_word_t                   word,
  output logic [$clog2(WORDS+1)-1:0]  word_num,
  output logic                        busy
);

  localparam int unsigned TOTAL = WORDS * SDO_BITS;
  localparam int unsigned BW    = $clog2(TOTAL + 1);

  logic          stop_q;    // STOP level at the previous rising LCLK edge
  logic [BW-1:0] bits_in;   // bits received in this burst
  logic [30:0]   shreg;    // the first 31 bits of the word in progress

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      stop_q     <= 1'b0;
      busy       <= 1'b0;
      bits_in    <= '0;
      shreg      <= '0;
      word_valid <= 1'b0;
      word       <= '0;
      word_num   <= '0;
    end else begin
      word_valid <= 1'b0;
      if (lclk_rise) begin
        stop_q <= stop;
        if (busy) begin
          shreg   <= {shreg[29:0], sdo};
          bits_in <= bits_in + 1'b1;
          if (bits_in[4:0] == 5'd31) begin
            word_valid <= 1'b1;
            word       <= {shreg, sdo};
            word_num   <= ($clog2(WORDS+1))'(bits_in >> 5);
          end
          if (bits_in == BW'(TOTAL - 1)) busy <= 1'b0;
        end else if (stop && !stop_q) begin
          busy    <= 1'b1;
          bits_in <= '0;
        end
      end
    end
  end

endmodule
