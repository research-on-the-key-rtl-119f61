// tb_timeslot_gen: checks the frame timing against a cycle count kept by the
// testbench: T2048 is the clock halved, TP(k+1) is high in bit period 8k of
// the 256-bit frame, the data slot/bit lag the bit period by one, and
// frame_tick comes every 512 clocks (125 us at 4.096 MHz).
module tb_timeslot_gen;
  import spc_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  logic t2048, frame_tick, bit_start, bit_sample;
  logic [N_SLOTS-1:0] tp;
  logic [SLOT_W-1:0] dslot;
  logic [2:0] dbit;
  int checks = 0, failures = 0;
  int c = 0;            // clocks since reset release
  int last_tick = -1;
  int ticks = 0;

  timeslot_gen dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s at clock %0d", what, c);
    end
  endtask

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int b, p;
    logic [N_SLOTS-1:0] exp_tp;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    for (c = 0; c < 512 * 4 + 7; c++) begin
      b = (c / 2) % 256;
      p = (b + 255) % 256;
      exp_tp = '0;
      if (b % 8 == 0) exp_tp[b / 8] = 1'b1;
      check(t2048 == ((c % 2) == 0), "t2048");
      check(bit_sample == ((c % 2) == 1), "bit_sample");
      check(tp == exp_tp, "tp");
      check(dslot == SLOT_W'(p / 8) && dbit == 3'(p % 8), "dslot/dbit");
      if (frame_tick) begin
        check(p == 0 && (c % 2) == 0, "frame_tick position");
        if (last_tick >= 0) check(c - last_tick == 512, "frame length 512 clocks");
        last_tick = c;
        ticks++;
      end
      @(posedge clk);
      #1;
    end
    check(ticks == 5, "five frame starts seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
