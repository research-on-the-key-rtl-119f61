// tb_poly_ring: loads a small music store with a known pattern, plays it and
// checks that one sample per frame comes out in address order, wrapping at
// the end, and that dropping `play` restarts from the first sample.
module tb_poly_ring;
  localparam int DEPTH = 10;

  logic clk = 1'b0, rst_n = 1'b0, frame_tick = 1'b0, play = 1'b0, we = 1'b0;
  logic [$clog2(DEPTH)-1:0] waddr = '0;
  logic [7:0] wdata = '0, code;
  int checks = 0, failures = 0;

  poly_ring #(.DEPTH(DEPTH)) dut (.*);

  always #5 clk = ~clk;

  function automatic logic [7:0] pat(int i);
    return 8'(i * 37 + 11);
  endfunction

  task automatic tick();
    frame_tick = 1'b1;
    @(posedge clk); #1;
    frame_tick = 1'b0;
    @(posedge clk); @(posedge clk); #1;
  endtask

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s", what);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int i = 0; i < DEPTH; i++) begin
      we = 1'b1; waddr = $clog2(DEPTH)'(i); wdata = pat(i);
      @(posedge clk); #1;
    end
    we = 1'b0;
    play = 1'b1;
    @(posedge clk); @(posedge clk); #1;
    for (int f = 0; f < 25; f++) begin
      check(code == pat(f % DEPTH), $sformatf("sample %0d", f));
      tick();
    end
    play = 1'b0;
    @(posedge clk); @(posedge clk); #1;
    play = 1'b1;
    @(posedge clk); #1;
    check(code == pat(0), "restart at first sample");
    tick();
    check(code == pat(1), "second sample after restart");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
