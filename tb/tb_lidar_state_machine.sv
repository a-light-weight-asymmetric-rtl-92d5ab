// tb_lidar_state_machine: checks the LiDAR state machine and its master clock.
//
// Drives flag writes as the shared memory would and checks: Init ignores frame
// ticks; INIT_DONE moves to Idle; NEXT_FRAME comes exactly one clock after a tick
// and ticks are FRAME_CYCLES apart; FOV_DONE and BLIND_DONE move FoV -> Blind ->
// Idle; 'I' and 'N' do not move the machine; a tick during FoV or Blind work is
// counted as a dropped frame and starts nothing.
module tb_lidar_state_machine;
  import lidar_pkg::*;

  localparam int unsigned FC = 40;

  logic clk = 0, rst_n = 0;
  logic flag_wr_valid = 0;
  state_flag_e flag_wr_data = FLAG_NONE;
  lidar_state_e state;
  logic frame_tick, next_frame;
  logic [31:0] frame_count, frame_drops;

  int checks = 0, failures = 0;

  lidar_state_machine #(.FRAME_CYCLES(FC)) dut (.*);

  always #5 clk = !clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s (state=%0d count=%0d drops=%0d)", what, state, frame_count, frame_drops);
    end
  endtask

  task automatic put_flag(input state_flag_e f);
    @(negedge clk);
    flag_wr_valid = 1; flag_wr_data = f;
    @(negedge clk);
    flag_wr_valid = 0; flag_wr_data = FLAG_NONE;
  endtask

  longint cyc = 0;
  longint tick_at[$];
  longint nf_at[$];
  always @(posedge clk) cyc++;
  always @(negedge clk) begin
    if (frame_tick) tick_at.push_back(cyc);
    if (next_frame) nf_at.push_back(cyc);
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    check(state == ST_INIT, "reset state is Init");
    repeat (2 * FC + 5) @(negedge clk);
    check(frame_count == 0 && frame_drops == 0, "no frame starts in Init");
    put_flag(FLAG_FOV_DONE);
    check(state == ST_INIT, "FOV_DONE ignored in Init");
    put_flag(FLAG_INIT_DONE);
    check(state == ST_IDLE, "INIT_DONE -> Idle");
    wait (next_frame);
    @(negedge clk);
    #1;
    check(state == ST_FOV, "NEXT_FRAME -> FoV");
    check(tick_at.size() > 0 && nf_at.size() == 1 && nf_at[0] == tick_at[tick_at.size()-1] + 1,
          "NEXT_FRAME one clock after the tick");
    put_flag(FLAG_NEXT_FRAME);
    put_flag(FLAG_CORE_SYNC);
    check(state == ST_FOV, "N and I flags do not move FoV");
    put_flag(FLAG_FOV_DONE);
    check(state == ST_BLIND, "FOV_DONE -> Blind");
    put_flag(FLAG_BLIND_DONE);
    check(state == ST_IDLE, "BLIND_DONE -> Idle");
    // Idle waits for the tick (WAIT_FRAME)
    wait (next_frame);
    @(negedge clk);
    #1;
    check(nf_at.size() == 2 && nf_at[1] - nf_at[0] == FC, "frames FRAME_CYCLES apart");
    check(frame_count == 2, "two frames started");
    // stay in FoV over a tick: dropped frame
    repeat (FC + 2) @(negedge clk);
    check(frame_drops == 1, "tick in FoV counted as a drop");
    check(state == ST_FOV && frame_count == 2, "dropped tick starts nothing");
    put_flag(FLAG_FOV_DONE);
    repeat (FC) @(negedge clk);
    check(frame_drops == 2 && state == ST_BLIND, "tick in Blind counted as a drop");
    put_flag(FLAG_BLIND_DONE);
    wait (next_frame);
    @(negedge clk);
    #1;
    check(frame_count == 3 && state == ST_FOV, "next tick after Blind starts a frame");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
