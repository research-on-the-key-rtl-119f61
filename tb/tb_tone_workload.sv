// tb_tone_workload: the tone measurements of the exchange, taken on the tone
// generator at its default parameters. Frame ticks are issued every other
// clock so that 15 s of tone (120,000 frames) simulate quickly. Measured
// against the intended tones:
//   dial tone  - never silent, repeats every 18 frames (8000/18 = 444.4 Hz);
//   ring-back  - bursts of exactly 8000 frames (1 s) separated by 32000 (4 s);
//   busy tone  - 2000 frames (0.25 s) on, 2000 off;
//   ringing    - 25 full square-wave periods (25 Hz) inside each 1 s burst,
//                each half period 160 frames, and no ringing in the pause.
module tb_tone_workload;
  import spc_pkg::*;

  localparam int FRAMES = 120000;

  logic clk = 1'b0, rst_n = 1'b0, frame_tick = 1'b0;
  logic [7:0] dial_code, rb_code, busy_code;
  logic rb_on, busy_on, ring_wave;
  int checks = 0, failures = 0;

  tone_gen dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s", what);
    end
  endtask

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] dial_hist [FRAMES];
    bit rb_prev = 0, busy_prev = 0, ring_prev = 0;
    int rb_run = 0, busy_run = 0, ring_run = 0, ring_rises = 0;
    int rb_bursts = 0, rb_gaps = 0, busy_bursts = 0, busy_gaps = 0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    @(posedge clk); #1;
    for (int f = 0; f < FRAMES; f++) begin
      bit rb, busy;
      rb = rb_code != IDLE_CODE;
      busy = busy_code != IDLE_CODE;
      dial_hist[f] = dial_code;
      check(dial_code != IDLE_CODE, "dial tone never silent");
      if (f >= 18) check(dial_code == dial_hist[f - 18], "dial tone period 18 frames");
      check(rb == rb_on, "ring-back follows cadence flag");
      // ring-back runs
      if (f > 0 && rb != rb_prev) begin
        if (rb_prev) begin check(rb_run == 8000, "ring-back burst 1 s"); rb_bursts++; end
        else begin check(rb_run == 32000, "ring-back pause 4 s"); rb_gaps++; end
        rb_run = 0;
      end
      rb_run++;
      // busy runs
      if (f > 0 && busy != busy_prev) begin
        if (busy_prev) begin check(busy_run == 2000, "busy burst 0.25 s"); busy_bursts++; end
        else begin check(busy_run == 2000, "busy pause 0.25 s"); busy_gaps++; end
        busy_run = 0;
      end
      busy_run++;
      // ringing
      check(!ring_wave || rb, "ringing only during the ring-back burst");
      if (ring_wave && !ring_prev) begin
        ring_rises++;
        if (f > 0) check(!rb_prev || ring_run == 160, "ringing low half 160 frames");
        ring_run = 0;
      end else if (!ring_wave && ring_prev) begin
        check(ring_run == 160, "ringing high half 160 frames");
        ring_run = 0;
      end
      ring_run++;
      if (!rb && rb_prev) begin
        check(ring_rises == 25, "25 ringing periods per burst");
        ring_rises = 0;
      end
      rb_prev = rb; busy_prev = busy; ring_prev = ring_wave;
      frame_tick = 1'b1;
      @(posedge clk); #1;
      frame_tick = 1'b0;
      @(posedge clk); #1;
    end
    $display("ring-back bursts %0d pauses %0d, busy bursts %0d pauses %0d",
             rb_bursts, rb_gaps, busy_bursts, busy_gaps);
    check(rb_bursts == 3 && rb_gaps == 2, "three ring-back cycles seen");
    check(busy_bursts >= 29 && busy_gaps >= 29, "busy cycles seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
