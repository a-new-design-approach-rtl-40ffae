// exor_compare: the pair of ex-or gates that check one output bit of the two
// working copies against the reference copy.
//
// x1 = y1 xor yr and x2 = y2 xor yr, where y1, y2 are the same output of fa_1
// and fa_2 and yr that of the trusted reference fa_r. A 1 marks a copy whose
// output disagrees with the reference, i.e. a faulty net. For the sum bit the
// outputs are the nets called s_3/s_4 (encoder inputs i_1/i_2), for the carry
// bit the encoder inputs i_3/i_4. Combinational.
module exor_compare (
  input  logic y1,  // output bit of working copy 1
  input  logic y2,  // same output bit of working copy 2
  input  logic yr,  // same output bit of the reference copy
  output logic x1,  // 1: copy 1 disagrees with the reference
  output logic x2   // 1: copy 2 disagrees with the reference
);

  always_comb begin
    x1 = y1 ^ yr;
    x2 = y2 ^ yr;
  end

endmodule
