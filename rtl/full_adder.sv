// full_adder: one-bit full adder, the circuit under test of this design.
//
// s  = a xor b xor ci
// co = majority(a, b, ci)
// It realises the truth table of the exhaustive test (all eight input
// combinations). The top instantiates it three times: the reference copy fa_r
// and the working copies fa_1 and fa_2. Purely combinational, no clock.
module full_adder (
  input  logic a,   // first addend bit
  input  logic b,   // second addend bit
  input  logic ci,  // carry in
  output logic s,   // sum
  output logic co   // carry out
);

  always_comb begin
    s  = a ^ b ^ ci;
    co = (a & b) | (a & ci) | (b & ci);
  end

endmodule
