// majority_codec: repetition code for the one-bit block-type marker kept in a
// spare byte of each NAND page. The bit is repeated 7 times in the low seven
// bits of the byte and decoded by majority vote, so up to 3 flipped bits are
// corrected. A decoded 0 (the all-zero word) marks a block that holds a copy
// of the RAM tables; a 1 marks an ordinary block, and erased flash (0xFF)
// also reads as 1. Code length, majority decoding and the meaning of the
// all-zero word follow the published design; keeping bit 7 at 0 when
// encoding and ignoring it when decoding is this design's choice.
//
// Interface: combinational. bit_in -> byte_out; byte_in -> bit_out,
// is_table_copy, err_count (number of repetitions that disagree, 0..3).
module majority_codec (
  input  logic       bit_in,
  output logic [7:0] byte_out,
  input  logic [7:0] byte_in,
  output logic       bit_out,
  output logic       is_table_copy,
  output logic [1:0] err_count
);
  logic [2:0] ones;

  assign byte_out = {1'b0, {7{bit_in}}};

  always_comb begin
    ones = '0;
    for (int i = 0; i < 7; i++) ones += 3'(byte_in[i]);
    bit_out       = (ones >= 3'd4);
    is_table_copy = !bit_out;
    err_count     = bit_out ? 2'(3'd7 - ones) : 2'(ones);
  end
endmodule
