// refclk_gen: LCLKIN and TDC reference clock for the ADC board.
//
// The PL supplies the ADC board with its system clock (LCLKIN), which clocks the
// serial data outputs, and with a reference clock for TDC timing. Both are made
// here by dividing the PL clock: lclk toggles every LCLK_HALF clocks and refclk
// every REF_HALF clocks. The document names these clocks but gives no rates; the
// dividers are this design's choice. lclk_rise / lclk_fall are one-cycle enables
// that are high in the clock cycle at whose end lclk rises / falls, so that logic
// in the PL clock domain can act on LCLK edges without a second clock.
module refclk_gen #(
  parameter int unsigned LCLK_HALF = 1,  // lclk period = 2*LCLK_HALF clocks
  parameter int unsigned REF_HALF  = 5   // refclk period = 2*REF_HALF clocks
) (
  input  logic clk,
  input  logic rst_n,
  output logic lclk,
  output logic lclk_rise,
  output logic lclk_fall,
  output logic refclk
);

  localparam int unsigned LW = (LCLK_HALF > 1) ? $clog2(LCLK_HALF) : 1;
  localparam int unsigned RW = (REF_HALF > 1) ? $clog2(REF_HALF) : 1;

  logic [LW-1:0] lcnt;
  logic [RW-1:0] rcnt;
  logic          lwrap;

  assign lwrap     = (lcnt == LW'(LCLK_HALF - 1));
  assign lclk_rise = lwrap && !lclk;
  assign lclk_fall = lwrap &&  lclk;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      lcnt <= '0;
      lclk <= 1'b0;
    end else if (lwrap) begin
      lcnt <= '0;
      lclk <= !lclk;
    end else begin
      lcnt <= lcnt + 1'b1;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rcnt   <= '0;
      refclk <= 1'b0;
    end else if (rcnt == RW'(REF_HALF - 1)) begin
      rcnt   <= '0;
      refclk <= !refclk;
    end else begin
      rcnt <= rcnt + 1'b1;
    end
  end

endmodule
