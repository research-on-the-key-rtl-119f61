// tb_tone_gen: runs the tone generator with short cadences and checks, after
// every frame tick, each output against a frame count kept by the testbench:
// the sine index, dial tone always on, ring-back and busy gated by their
// on/off frame counts, and the ringing square wave gated by the ring-back
// cadence. It also counts the edges of the ringing wave.
module tb_tone_gen;
  import spc_pkg::*;

  localparam int RB_ON = 3, RB_OFF = 5, BUSY_ON = 2, BUSY_OFF = 3, RING_HALF = 1;

  logic clk = 1'b0, rst_n = 1'b0, frame_tick = 1'b0;
  logic [7:0] dial_code, rb_code, busy_code;
  logic rb_on, busy_on, ring_wave;
  int checks = 0, failures = 0;
  logic [7:0] sine [18] = '{8'hA1, 8'hC7, 8'hC6, 8'hA0, 8'hB0, 8'hD0, 8'hAC, 8'hD0, 8'hB0,
                            8'hA0, 8'hC6, 8'hC7, 8'hA1, 8'hB1, 8'hD1, 8'hAD, 8'hD1, 8'hB1};

  tone_gen #(.RB_ON(RB_ON), .RB_OFF(RB_OFF), .BUSY_ON(BUSY_ON), .BUSY_OFF(BUSY_OFF),
             .RING_HALF(RING_HALF)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what, input int f);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s after %0d ticks", what, f);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit exp_rb, exp_busy, exp_ring;
    int ring_edges = 0;
    bit last_ring = 0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int f = 0; f < 100; f++) begin
      // f frame ticks have happened; outputs settle one clock later
      @(posedge clk); @(posedge clk); #1;
      exp_rb   = (f % (RB_ON + RB_OFF)) < RB_ON;
      exp_busy = (f % (BUSY_ON + BUSY_OFF)) < BUSY_ON;
      exp_ring = exp_rb && ((f % (2 * RING_HALF)) < RING_HALF);
      check(dial_code == sine[f % 18], "dial tone sample", f);
      check(rb_code == (exp_rb ? sine[f % 18] : IDLE_CODE), "ring-back", f);
      check(busy_code == (exp_busy ? sine[f % 18] : IDLE_CODE), "busy", f);
      check(rb_on == exp_rb && busy_on == exp_busy, "cadence flags", f);
      check(ring_wave == exp_ring, "ringing wave", f);
      if (ring_wave != last_ring) ring_edges++;
      last_ring = ring_wave;
      frame_tick = 1'b1;
      @(posedge clk); #1;
      frame_tick = 1'b0;
    end
    check(ring_edges > 10, "ringing wave toggles", 100);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
