// priority_encoder: two-input priority encoder that turns the ex-or mismatch
// flags of one output bit into the select line of its multiplexer.
//
// The encoder looks for the highest-priority copy that agrees with the
// reference (a 0 on its input). Input i_hi (i_1 or i_3) has priority:
//   i_hi = 0            -> o = 0 (use copy 1)
//   i_hi = 1, i_lo = 0  -> o = 1 (use copy 2)
//   i_hi = 1, i_lo = 1  -> o = 0, and none = 1
// The last row lies outside the single-fault assumption; keeping copy 1
// selected there and flagging it on `none` is this design's own choice.
// Combinational.
module priority_encoder (
  input  logic i_hi,  // mismatch flag of copy 1 (priority input)
  input  logic i_lo,  // mismatch flag of copy 2
  output logic o,     // select: 0 = copy 1, 1 = copy 2
  output logic none   // no copy agrees with the reference
);

  always_comb begin
    o    = 1'b0;
    none = 1'b0;
    if (!i_hi)      o = 1'b0;
    else if (!i_lo) o = 1'b1;
    else            none = 1'b1;
  end

endmodule
