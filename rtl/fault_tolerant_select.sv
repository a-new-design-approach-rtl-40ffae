// fault_tolerant_select: the circuit that takes the place of the TMR voter.
// From two working copies of a circuit and one trusted reference copy it
// passes, bit by bit, an output that agrees with the reference.
//
// Each of the WIDTH output bits has its own lane of three parts:
//   exor_compare      two ex-or gates: mismatch of copy 1 and of copy 2
//                     against the reference,
//   priority_encoder  picks copy 1 if it agrees, else copy 2 if it agrees,
//   mux2              forwards the picked copy's bit.
// The data forwarded always comes from a working copy, never from the
// reference; the reference is only used to decide which copy to trust.
// Under a single stuck-at fault on any one copy output, on an encoder input
// or on an encoder output, the forwarded bit is still correct.
//
// The lane structure follows the design description, which shows it for the
// two outputs (sum, carry) of a full adder; WIDTH lets it serve any circuit,
// as the description says it can be generalised. `sel` and `none` are
// brought out for observation, which is this design's own addition.
// An assertion in each lane checks that the forwarded bit equals the
// reference bit whenever at most one copy is wrong.
// Combinational: outputs follow the inputs in the same cycle.
module fault_tolerant_select #(
  parameter int unsigned WIDTH = 2  // output bits of the circuit under test
) (
  input  logic [WIDTH-1:0] y1,    // outputs of working copy 1
  input  logic [WIDTH-1:0] y2,    // outputs of working copy 2
  input  logic [WIDTH-1:0] yr,    // outputs of the reference copy
  output logic [WIDTH-1:0] y,     // fault-free outputs
  output logic [WIDTH-1:0] sel,   // per bit: 0 = copy 1 used, 1 = copy 2 used
  output logic [WIDTH-1:0] none   // per bit: neither copy agrees (multiple fault)
);

  for (genvar k = 0; k < WIDTH; k++) begin : g_lane
    logic x1, x2;

    exor_compare u_cmp (
      .y1 (y1[k]),
      .y2 (y2[k]),
      .yr (yr[k]),
      .x1 (x1),
      .x2 (x2)
    );

    priority_encoder u_enc (
      .i_hi (x1),
      .i_lo (x2),
      .o    (sel[k]),
      .none (none[k])
    );

    mux2 u_mux (
      .d0  (y1[k]),
      .d1  (y2[k]),
      .sel (sel[k]),
      .y   (y[k])
    );

    // The property the circuit exists for: unless both copies disagree with
    // the reference, the forwarded bit equals the reference bit.
    always_comb begin
      if (!none[k]) assert final (y[k] == yr[k])
        else $error("fault_tolerant_select: lane %0d forwards a wrong bit", k);
    end
  end

endmodule
