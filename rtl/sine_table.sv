// sine_table: one period of the 450 Hz tone as 18 PCM codes.
//
// The period is cut into 18 samples taken every 125 us (one per frame), so the
// tone played from it is 8000/18 = 444.4 Hz. Each entry is the A-law code of
// the sample as the TP3067 codec expects it, i.e. with the even bits
// inverted. The 18 codes are the ones the document lists for one period; the
// table is a combinational ROM (a small LUT ROM in an FPGA). An index past the
// last entry returns the idle code.
module sine_table
  import spc_pkg::*;
(
  input  logic [4:0] idx,
  output logic [7:0] code
);

  always_comb
    unique case (idx)
      5'd0:  code = 8'hA1;
      5'd1:  code = 8'hC7;
      5'd2:  code = 8'hC6;
      5'd3:  code = 8'hA0;
      5'd4:  code = 8'hB0;
      5'd5:  code = 8'hD0;
      5'd6:  code = 8'hAC;
      5'd7:  code = 8'hD0;
      5'd8:  code = 8'hB0;
      5'd9:  code = 8'hA0;
      5'd10: code = 8'hC6;
      5'd11: code = 8'hC7;
      5'd12: code = 8'hA1;
      5'd13: code = 8'hB1;
      5'd14: code = 8'hD1;
      5'd15: code = 8'hAD;
      5'd16: code = 8'hD1;
      5'd17: code = 8'hB1;
      default: code = IDLE_CODE;
    endcase

endmodule
