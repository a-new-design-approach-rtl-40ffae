// fault_inject_ff: D flip-flop with asynchronous set and reset, inserted on
// an output net of the circuit under test to inject stuck-at faults.
//
// While rst is high the output q is held at 0 (stuck-at-0); while set is high
// it is held at 1 (stuck-at-1). With both low the flip-flop samples d on each
// rising clock edge, so the net carries the CUT output one cycle late. The
// flip-flop exists only to inject faults for test; in a fielded circuit the
// net would be a plain wire.
//
// Following the design description: a D flip-flop on the output net, with set
// and reset inputs, reset giving s-a-0 and set giving s-a-1. Own choices:
// both controls are active high and asynchronous, reset wins if both are
// high, and the flip-flop is rising-edge triggered. After a control is
// released q keeps the forced value until the next rising edge; releasing
// reset while set stays high likewise leaves q at 0 until that edge.
module fault_inject_ff (
  input  logic clk,  // sampling clock
  input  logic rst,  // force q to 0 (stuck-at-0), asynchronous, active high
  input  logic set,  // force q to 1 (stuck-at-1), asynchronous, active high
  input  logic d,    // CUT output net
  output logic q     // net as seen by the checker
);

  // Either control forces the flip-flop asynchronously; the value forced is
  // 1 only for set without reset.
  logic force_q;
  assign force_q = rst | set;

  always_ff @(posedge clk or posedge force_q) begin
    if (force_q) q <= ~rst;
    else         q <= d;
  end

endmodule
