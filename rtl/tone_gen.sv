// tone_gen: signal tones built from the 450 Hz sine table.
//
// Once per frame (frame_tick) the sample index steps through the 18-entry
// sine table, so every tone byte changes once per 125 us and holds for the
// whole frame. From that one sine the tones are gated in frame counts:
//   dial tone   - the sine, continuously;
//   ring-back   - the sine for RB_ON frames, then idle for RB_OFF (1 s / 4 s);
//   busy tone   - the sine for BUSY_ON frames, then idle for BUSY_OFF
//                 (0.25 s / 0.25 s);
//   ringing     - a square wave with RING_HALF frames high and RING_HALF low
//                 (25 Hz), gated by the same 1 s / 4 s cadence as ring-back,
//                 so a caller's ring-back and the called phone's bell coincide.
// The on/off times and the 25 Hz come from the document; sharing one cadence
// counter between ring-back and ringing, and sending the idle code in the off
// part, are this design's choices. All outputs are registered and change one
// clock after frame_tick.
module tone_gen
  import spc_pkg::*;
#(
  parameter int SINE_LEN  = 18,
  parameter int RB_ON     = 8000,   // frames, 1 s
  parameter int RB_OFF    = 32000,  // frames, 4 s
  parameter int BUSY_ON   = 2000,   // frames, 0.25 s
  parameter int BUSY_OFF  = 2000,   // frames, 0.25 s
  parameter int RING_HALF = 160     // frames, half period of 25 Hz
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       frame_tick,
  output logic [7:0] dial_code,
  output logic [7:0] rb_code,
  output logic [7:0] busy_code,
  output logic       rb_on,      // ring-back / ringing cadence in its on part
  output logic       busy_on,
  output logic       ring_wave   // 25 Hz square wave, gated by the cadence
);

  localparam int RB_W   = $clog2(RB_ON + RB_OFF);
  localparam int BUSY_W = $clog2(BUSY_ON + BUSY_OFF);
  localparam int RING_W = $clog2(2 * RING_HALF);

  logic [4:0]        sidx;
  logic [7:0]        sine;
  logic [RB_W-1:0]   rb_cnt;
  logic [BUSY_W-1:0] busy_cnt;
  logic [RING_W-1:0] ring_cnt;

  sine_table u_sine (.idx(sidx), .code(sine));

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      sidx     <= '0;
      rb_cnt   <= '0;
      busy_cnt <= '0;
      ring_cnt <= '0;
    end else if (frame_tick) begin
      sidx     <= (sidx == 5'(SINE_LEN - 1)) ? '0 : sidx + 1'b1;
      rb_cnt   <= (rb_cnt == RB_W'(RB_ON + RB_OFF - 1)) ? '0 : rb_cnt + 1'b1;
      busy_cnt <= (busy_cnt == BUSY_W'(BUSY_ON + BUSY_OFF - 1)) ? '0 : busy_cnt + 1'b1;
      ring_cnt <= (ring_cnt == RING_W'(2 * RING_HALF - 1)) ? '0 : ring_cnt + 1'b1;
    end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      dial_code <= IDLE_CODE;
      rb_code   <= IDLE_CODE;
      busy_code <= IDLE_CODE;
      rb_on     <= 1'b0;
      busy_on   <= 1'b0;
      ring_wave <= 1'b0;
    end else begin
      rb_on     <= rb_cnt < RB_W'(RB_ON);
      busy_on   <= busy_cnt < BUSY_W'(BUSY_ON);
      dial_code <= sine;
      rb_code   <= (rb_cnt < RB_W'(RB_ON)) ? sine : IDLE_CODE;
      busy_code <= (busy_cnt < BUSY_W'(BUSY_ON)) ? sine : IDLE_CODE;
      ring_wave <= (rb_cnt < RB_W'(RB_ON)) && (ring_cnt < RING_W'(RING_HALF));
    end

endmodule
