// tdc_emulator: logic of the ADC simulation board of the hardware-in-the-loop rig.
//
// The board stands in for the TDC front end: at each STOP from the PL it makes a
// virtual pulse for every one of its GROUPS*CH_PER_GROUP channels and sends the
// result as 32-bit words on one serial line (SDO) per TDC group, the channels of
// a group one after the other. A word carries the channel index in its upper 12
// bits and the pulse position in its lower 20 bits, as in the document. The board
// is clocked by LCLKIN from the PL: on the first rising edge at which it sees
// STOP high after low it drives the MSB of the first word, and one more bit on
// each following rising edge, WORDS*32 bits in all; the line is low otherwise.
// The document asks for a fixed distance pattern per scan point but
// does not give it; this board uses
//   position = POS_BASE + scan * SCAN_STEP + channel * CH_STEP  (mod 2^20)
// where scan counts STOP events since reset, and group g carries channels
// g*CH_PER_GROUP .. g*CH_PER_GROUP+CH_PER_GROUP-1. Both are this design's choice.
module tdc_emulator
  import lidar_pkg::*;
#(
  parameter int unsigned GROUPS       = 4,
  parameter int unsigned CH_PER_GROUP = 4,
  parameter int unsigned POS_BASE     = 32'h01000,
  parameter int unsigned SCAN_STEP    = 3,
  parameter int unsigned CH_STEP      = 257
) (
  input  logic              lclk,   // LCLKIN from the PL
  input  logic              rst_n,
  input  logic              stop,
  output logic [GROUPS-1:0] sdo
);

  localparam int unsigned TOTAL = CH_PER_GROUP * SDO_BITS;
  localparam int unsigned BW    = $clog2(TOTAL + 1);
  localparam int unsigned CW    = (CH_PER_GROUP > 1) ? $clog2(CH_PER_GROUP) : 1;

  logic              stop_q, busy;
  logic [BW-1:0]     bit_no;       // bit now on the line, 0 = first
  logic [POS_BITS-1:0] scan_pos;   // POS_BASE + scan * SCAN_STEP
  logic [31:0]       shreg [GROUPS];

  function automatic tdc_word_t make_word(input int unsigned ch, input logic [POS_BITS-1:0] base);
    tdc_word_t w;
    w.index    = INDEX_BITS'(ch);
    w.position = base + POS_BITS'(ch * CH_STEP);
    return w;
  endfunction

  always_ff @(posedge lclk or negedge rst_n) begin
    tdc_word_t nw;
    if (!rst_n) begin
      stop_q   <= 1'b0;
      busy     <= 1'b0;
      bit_no   <= '0;
      scan_pos <= POS_BITS'(POS_BASE);
      sdo      <= '0;
      for (int g = 0; g < GROUPS; g++) shreg[g] <= '0;
    end else begin
      stop_q <= stop;
      if (busy) begin
        if (bit_no == BW'(TOTAL - 1)) begin
          busy     <= 1'b0;
          sdo      <= '0;
          scan_pos <= scan_pos + POS_BITS'(SCAN_STEP);
        end else begin
          bit_no <= bit_no + 1'b1;
          for (int g = 0; g < GROUPS; g++) begin
            if (bit_no[4:0] == 5'd31) begin   // next word of the group
              nw       = make_word(g * CH_PER_GROUP + int'(CW'((bit_no + 1'b1) >> 5)), scan_pos);
              shreg[g] <= nw;
              sdo[g]   <= nw[31];
            end else begin
              shreg[g] <= shreg[g] << 1;
              sdo[g]   <= shreg[g][30];
            end
          end
        end
      end else if (stop && !stop_q) begin
        busy   <= 1'b1;
        bit_no <= '0;
        for (int g = 0; g < GROUPS; g++) begin
          nw       = make_word(g * CH_PER_GROUP, scan_pos);
          shreg[g] <= nw;
          sdo[g]   <= nw[31];
        end
      end
    end
  end

endmodule
