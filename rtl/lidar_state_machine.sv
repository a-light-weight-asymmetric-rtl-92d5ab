// lidar_state_machine: application state machine of the LiDAR and its master clock.
//
// Four states: Init work, Idle, FoV work and Blind work. Init moves to Idle on
// INIT_DONE; Idle waits (WAIT_FRAME) for the master-clock frame tick, then issues
// NEXT_FRAME and enters FoV work; FoV work moves to Blind work on FOV_DONE; Blind
// work returns to Idle on BLIND_DONE. The states and actions are the document's.
// The PS cores raise FOV_DONE, INIT_DONE and BLIND_DONE by writing state flags
// into the shared on-chip memory; this block snoops those flag writes
// (flag_wr_valid/flag_wr_data from the memory). The master clock is a counter
// that ticks every FRAME_CYCLES clocks (10 frames per second at the assumed
// 100 MHz PL clock). A tick that finds the machine outside Idle cannot start a
// frame: it is counted in frame_drops (the document reports such frame drops for
// the sequential baseline; counting them is this design's choice).
//
// Timing: next_frame is a one-cycle pulse in the cycle after the tick that found
// Idle; state changes one cycle after the flag write is seen.
module lidar_state_machine
  import lidar_pkg::*;
#(
  parameter int unsigned FRAME_CYCLES = 10_000_000  // master-clock frame period
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                flag_wr_valid,  // a state flag was written to the OCM
  input  state_flag_e         flag_wr_data,   // the flag value written
  output lidar_state_e        state,
  output logic                frame_tick,     // master-clock tick (1 cycle)
  output logic                next_frame,     // NEXT_FRAME action (1 cycle)
  output logic [31:0]         frame_count,    // frames started
  output logic [31:0]         frame_drops     // ticks lost because a frame was still busy
);

  logic [$clog2(FRAME_CYCLES)-1:0] tick_cnt;

  // master clock
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      tick_cnt   <= '0;
      frame_tick <= 1'b0;
    end else begin
      frame_tick <= 1'b0;
      if (tick_cnt == $bits(tick_cnt)'(FRAME_CYCLES - 1)) begin
        tick_cnt   <= '0;
        frame_tick <= 1'b1;
      end else begin
        tick_cnt <= tick_cnt + 1'b1;
      end
    end
  end

  logic flag_init, flag_fov, flag_blind;
  assign flag_init  = flag_wr_valid && (flag_wr_data == FLAG_INIT_DONE);
  assign flag_fov   = flag_wr_valid && (flag_wr_data == FLAG_FOV_DONE);
  assign flag_blind = flag_wr_valid && (flag_wr_data == FLAG_BLIND_DONE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state       <= ST_INIT;
      next_frame  <= 1'b0;
      frame_count <= '0;
      frame_drops <= '0;
    end else begin
      next_frame <= 1'b0;
      unique case (state)
        ST_INIT:  if (flag_init) state <= ST_IDLE;
        ST_IDLE:  if (frame_tick) begin          // otherwise WAIT_FRAME
                    state       <= ST_FOV;
                    next_frame  <= 1'b1;
                    frame_count <= frame_count + 1'b1;
                  end
        ST_FOV:   if (flag_fov) state <= ST_BLIND;
        ST_BLIND: if (flag_blind) state <= ST_IDLE;
        default:  state <= ST_INIT;
      endcase
      if (frame_tick && (state == ST_FOV || state == ST_BLIND))
        frame_drops <= frame_drops + 1'b1;
    end
  end

endmodule
