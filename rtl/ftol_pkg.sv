// ftol_pkg: types and constants shared by the interconnect-fault-tolerant
// full adder.
//
// The circuit under test (CUT) is a one-bit full adder with two outputs,
// sum and carry. Three copies exist: the reference fa_r, which is trusted
// because it has been tested exhaustively, and the working copies fa_1 and
// fa_2. A fault-injection flip-flop may sit on each output net of fa_1 and
// fa_2; the four injection sites are numbered as below. The numbering and the
// struct are this design's own conventions.
package ftol_pkg;

  // Number of output bits of the circuit under test (sum, carry).
  localparam int unsigned CUT_OUTPUTS = 2;

  // Bit positions of the CUT outputs inside an output vector.
  localparam int unsigned BIT_SUM   = 0;
  localparam int unsigned BIT_CARRY = 1;

  // Fault-injection sites: the output nets of the two working copies.
  localparam int unsigned SITE_S1    = 0;  // sum of fa_1
  localparam int unsigned SITE_C1    = 1;  // carry of fa_1
  localparam int unsigned SITE_S2    = 2;  // sum of fa_2
  localparam int unsigned SITE_C2    = 3;  // carry of fa_2
  localparam int unsigned NUM_SITES  = 4;

  // The two outputs of one full-adder copy.
  typedef struct packed {
    logic carry;
    logic sum;
  } fa_out_t;

endpackage
