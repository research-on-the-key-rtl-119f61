// dtmf_capture: takes the dialled digits from one MT8870 DTMF receiver.
//
// The receiver presents a 4-bit code on Q1..Q4 and raises STD when it has
// recognised a key; the board passes STD through an inverter, so this block
// sees le_n, low while a key is valid. le_n is brought into the clock domain
// with two flip-flops; on its falling edge the code is latched into `digit`
// and digit_valid pulses for one clock, once per key press. The code is the
// receiver's own 4-bit code (1..9 as binary, 0 as 1010) and is passed on
// unchanged; `digit` keeps the last key for the board's LED display.
// Latency: digit_valid comes three clocks after le_n falls.
module dtmf_capture (
  input  logic       clk,
  input  logic       rst_n,
  input  logic [3:0] q,
  input  logic       le_n,
  output logic       digit_valid,
  output logic [3:0] digit
);

  logic [2:0] le_sync;   // [0] first stage, [2] previous synchronised value

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      le_sync     <= 3'b111;
      digit_valid <= 1'b0;
      digit       <= '0;
    end else begin
      le_sync     <= {le_sync[1:0], le_n};
      digit_valid <= le_sync[2] && !le_sync[1];
      if (le_sync[2] && !le_sync[1]) digit <= q;
    end

endmodule
