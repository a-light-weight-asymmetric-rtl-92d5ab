// laser_firing: per-scan timing of the FoV work (laser firing and STOP).
//
// On NEXT_FRAME the block runs NUM_SCANS scans back to back, each SCAN_CYCLES
// clocks long (the per-scan time window). At the start of every scan it pulses
// scan_start and drives the laser-diode trigger for LD_PULSE clocks. STOP_DELAY
// clocks after the trigger (the acquisition time window, a system parameter) it
// raises STOP, which tells the ADC board that the analog window has ended and
// that it must send its TDC words. STOP changes only on falling edges of LCLK
// (lclk_fall enable) and stays high for STOP_LCLKS LCLK periods, so the ADC
// board, which samples on rising LCLK edges, always sees a settled level.
// fov_scans_done pulses when the last scan window of the frame has ended.
//
// The document gives 4,650 scans of 14.181 us per frame; at the assumed 100 MHz
// PL clock the window is 1418 clocks. The trigger is a single-wire pulse, as on
// the GPIO link to the laser driver in the document's system diagram; the
// document also mentions a fast serial link for it but gives no format. Trigger
// length, STOP delay and STOP length are not given and are this design's choice.
module laser_firing #(
  parameter int unsigned NUM_SCANS   = 4650,
  parameter int unsigned SCAN_CYCLES = 1418,
  parameter int unsigned LD_PULSE    = 4,
  parameter int unsigned STOP_DELAY  = 200,
  parameter int unsigned STOP_LCLKS  = 4
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        next_frame,      // start of the FoV work
  input  logic        lclk_fall,       // LCLK falls at the end of this cycle
  output logic        fov_active,
  output logic        scan_start,      // 1-cycle pulse at each scan start
  output logic [15:0] scan_idx,        // scan number within the frame
  output logic        ld_trigger,      // laser-diode trigger
  output logic        stop,            // STOP to the ADC board
  output logic        fov_scans_done   // 1-cycle pulse after the last scan
);

  localparam int unsigned CW = $clog2(SCAN_CYCLES + 1);
  localparam int unsigned SW = $clog2(STOP_LCLKS + 1);

  logic [CW-1:0] scan_cyc;
  logic          stop_pending;
  logic [SW-1:0] stop_left;

  assign ld_trigger = fov_active && (scan_cyc < CW'(LD_PULSE));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      fov_active     <= 1'b0;
      scan_start     <= 1'b0;
      scan_idx       <= '0;
      scan_cyc       <= '0;
      fov_scans_done <= 1'b0;
    end else begin
      scan_start     <= 1'b0;
      fov_scans_done <= 1'b0;
      if (!fov_active) begin
        if (next_frame) begin
          fov_active <= 1'b1;
          scan_idx   <= '0;
          scan_cyc   <= '0;
          scan_start <= 1'b1;
        end
      end else if (scan_cyc == CW'(SCAN_CYCLES - 1)) begin
        scan_cyc <= '0;
        if (scan_idx == 16'(NUM_SCANS - 1)) begin
          fov_active     <= 1'b0;
          fov_scans_done <= 1'b1;
        end else begin
          scan_idx   <= scan_idx + 1'b1;
          scan_start <= 1'b1;
        end
      end else begin
        scan_cyc <= scan_cyc + 1'b1;
      end
    end
  end

  // STOP generation, aligned to falling LCLK edges
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      stop_pending <= 1'b0;
      stop         <= 1'b0;
      stop_left    <= '0;
    end else begin
      if (fov_active && scan_cyc == CW'(STOP_DELAY))
        stop_pending <= 1'b1;
      if (lclk_fall) begin
        if (stop) begin
          if (stop_left == SW'(1)) stop <= 1'b0;
          stop_left <= stop_left - 1'b1;
        end else if (stop_pending) begin
          stop         <= 1'b1;
          stop_left    <= SW'(STOP_LCLKS);
          stop_pending <= 1'b0;
        end
      end
    end
  end

endmodule
