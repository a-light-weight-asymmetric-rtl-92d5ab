// scanner_emulator: logic of the scanner simulation board of the hardware-in-the-loop rig.
//
// The board takes the scanner control input that the PS sends over SPI and
// emulates the scanner's position feedback, which it returns to the PL on GPIO.
// Here the control input is a 16-bit target position sent as one SPI word (mode 0,
// MSB first, the same framing as the PL's SPI master); while the word is shifted
// in, the current position is shifted out on MISO. After chip select rises, the
// emulated position moves one step towards the target every STEP_CYCLES clocks,
// a simple model of a mirror slewing at a fixed rate. SCLK, MOSI and CS are
// brought into the board clock through two-stage synchronisers, so SCLK must be
// at least four board clocks per half period. The document states only what the
// board does; word size, SPI mode and the slew model are this design's choices.
module scanner_emulator #(
  parameter int unsigned STEP_CYCLES = 100
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        sclk,
  input  logic        mosi,
  input  logic        cs_n,
  output logic        miso,
  output logic [15:0] pos_gpio,   // position feedback to the PL
  output logic [15:0] target
);

  localparam int unsigned SW = (STEP_CYCLES > 1) ? $clog2(STEP_CYCLES) : 1;

  logic [2:0]  sclk_s, cs_s;
  logic [1:0]  mosi_s;
  logic [15:0] shreg;
  logic [4:0]  nbits;
  logic [SW-1:0] step_cnt;

  wire sclk_rise = sclk_s[1] && !sclk_s[2];
  wire sclk_fall = !sclk_s[1] && sclk_s[2];
  wire cs_fall   = !cs_s[1] && cs_s[2];
  wire cs_rise   = cs_s[1] && !cs_s[2];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sclk_s   <= '0;
      cs_s     <= '1;
      mosi_s   <= '0;
      shreg    <= '0;
      nbits    <= '0;
      miso     <= 1'b0;
      target   <= '0;
      pos_gpio <= '0;
      step_cnt <= '0;
    end else begin
      sclk_s <= {sclk_s[1:0], sclk};
      cs_s   <= {cs_s[1:0], cs_n};
      mosi_s <= {mosi_s[0], mosi};

      if (cs_fall) begin
        shreg <= pos_gpio;
        miso  <= pos_gpio[15];
        nbits <= '0;
      end else if (!cs_s[1]) begin
        if (sclk_rise) begin
          shreg <= {shreg[14:0], mosi_s[1]};
          nbits <= nbits + 1'b1;
        end else if (sclk_fall) begin
          miso <= shreg[15];
        end
      end
      if (cs_rise && nbits == 5'd16) target <= shreg;

      // slew towards the target
      if (step_cnt == SW'(STEP_CYCLES - 1)) begin
        step_cnt <= '0;
        if (pos_gpio < target)      pos_gpio <= pos_gpio + 1'b1;
        else if (pos_gpio > target) pos_gpio <= pos_gpio - 1'b1;
      end else begin
        step_cnt <= step_cnt + 1'b1;
      end
    end
  end

endmodule
