// tb_dtmf_capture: presses a sequence of keys on a modelled DTMF receiver
// (code on q, le_n low while the key is held) and checks that each press
// gives exactly one digit_valid strobe, three clocks after le_n falls, with
// the right code, and that nothing is reported while no key is held.
module tb_dtmf_capture;
  logic clk = 1'b0, rst_n = 1'b0;
  logic [3:0] q = '0;
  logic le_n = 1'b1;
  logic digit_valid;
  logic [3:0] digit;
  int checks = 0, failures = 0;
  int strobes = 0;
  logic [3:0] keys [8] = '{4'h8, 4'hA, 4'h1, 4'h2, 4'h9, 4'hB, 4'hC, 4'h5};

  dtmf_capture dut (.*);

  always #5 clk = ~clk;

  always @(posedge clk) if (rst_n && digit_valid) strobes++;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    repeat (5) @(posedge clk);
    checks++;
    if (strobes != 0) failures++;
    foreach (keys[k]) begin
      int n0;
      #1 q = keys[k];
      @(posedge clk); #1;
      le_n = 1'b0;
      n0 = strobes;
      // the strobe is registered on the third clock edge after le_n falls
      repeat (2) @(posedge clk);
      #1;
      checks++;
      if (digit_valid) failures++;
      @(posedge clk); #1;
      checks++;
      if (!digit_valid || digit != keys[k]) begin
        failures++;
        $display("FAIL key %0d: valid=%b digit=%h", k, digit_valid, digit);
      end
      repeat (10) @(posedge clk);
      #1;
      le_n = 1'b1;
      q = 4'hF;
      repeat (10) @(posedge clk);
      checks++;
      if (strobes != n0 + 1) begin
        failures++;
        $display("FAIL key %0d gave %0d strobes", k, strobes - n0);
      end
      checks++;
      if (digit != keys[k]) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
