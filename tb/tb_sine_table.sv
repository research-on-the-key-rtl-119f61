// tb_sine_table: reads every address of the 450 Hz table and compares it with
// the 18 codes of one period; addresses past the period must give the idle
// code.
module tb_sine_table;
  import spc_pkg::*;

  logic [4:0] idx;
  logic [7:0] code;
  int checks = 0, failures = 0;
  logic [7:0] expv [18] = '{8'hA1, 8'hC7, 8'hC6, 8'hA0, 8'hB0, 8'hD0, 8'hAC, 8'hD0, 8'hB0,
                            8'hA0, 8'hC6, 8'hC7, 8'hA1, 8'hB1, 8'hD1, 8'hAD, 8'hD1, 8'hB1};

  sine_table dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 32; i++) begin
      idx = 5'(i);
      #1;
      checks++;
      if (i < 18 ? code != expv[i] : code != IDLE_CODE) begin
        failures++;
        $display("FAIL idx %0d code %h", i, code);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
