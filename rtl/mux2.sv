// mux2: two-to-one multiplexer (mux_1 for the sum, mux_2 for the carry) that
// passes the output of the working copy chosen by the priority encoder.
//
// y = sel ? d1 : d0. Data input d0 is the output of fa_1, d1 that of fa_2.
// Combinational.
module mux2 (
  input  logic d0,   // output bit of copy 1
  input  logic d1,   // output bit of copy 2
  input  logic sel,  // from the priority encoder
  output logic y     // fault-free output
);

  always_comb y = sel ? d1 : d0;

endmodule
