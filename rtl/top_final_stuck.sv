// top_final_stuck: a full adder that tolerates a single stuck-at fault on the
// interconnect at its outputs.
//
// Three copies of the full adder see the same inputs a, b, ci: the reference
// fa_r, assumed fault free because it has been tested exhaustively, and the
// working copies fa_1 and fa_2. The sum and carry nets of fa_1 and fa_2
// (s_1, c_1, s_2, c_2) each pass through a fault_inject_ff, whose reset and
// set inputs force that net to stuck-at-0 or stuck-at-1. The checker
// (fault_tolerant_select) compares each net with the reference through ex-or
// gates, and a priority encoder per output drives the select line of mux_1
// (sum) and mux_2 (carry): fa_1's bit is used while it agrees with the
// reference, otherwise fa_2's. sum_o and carry_o are thus correct for any
// single stuck-at fault on s_1, c_1, s_2 or c_2.
//
// Timing: with FAULT_INJECTION = 1 (default, the configuration the design was
// evaluated in) the injection flip-flops sample the adders on the rising edge
// of clk. So that the checker compares values of the same input vector, the
// reference outputs pass through the same kind of flip-flop with set and
// reset tied low: sum_o/carry_o show the result of the inputs present at the
// previous rising clock edge, and a stuck-at control acts at once.
// With FAULT_INJECTION = 0 the flip-flops are left out, the injection ports
// are unused and the circuit is purely combinational, as the description
// says the fielded circuit would be.
//
// Follows the description: three adder copies, ex-or compare, two priority
// encoders with priority on copy 1, two multiplexers fed by fa_1/fa_2, D
// flip-flops with set/reset for fault injection. Own choices: the register on
// the reference outputs, the clock, active-high controls, and the extra
// observation outputs sel_* and multi_fault.
module top_final_stuck
  import ftol_pkg::*;
#(
  parameter bit FAULT_INJECTION = 1'b1  // 1: injection flip-flops present
) (
  input  logic                 clk,          // clock of the injection flip-flops
  input  logic                 a,            // addend bit
  input  logic                 b,            // addend bit
  input  logic                 ci,           // carry in
  input  logic [NUM_SITES-1:0] inj_sa0,      // per site: stuck-at-0 (ff reset)
  input  logic [NUM_SITES-1:0] inj_sa1,      // per site: stuck-at-1 (ff set)
  output logic                 sum_o,        // fault-free sum
  output logic                 carry_o,      // fault-free carry
  output logic                 sel_sum,      // mux_1 select (o_1): 1 = fa_2 used
  output logic                 sel_carry,    // mux_2 select (o_2): 1 = fa_2 used
  output logic [1:0]           multi_fault   // [0] sum, [1] carry: no copy agrees
);

  fa_out_t fa_r_out, fa_1_out, fa_2_out;  // adder outputs
  fa_out_t net_r, net_1, net_2;           // output nets seen by the checker

  full_adder u_fa_r (.a(a), .b(b), .ci(ci), .s(fa_r_out.sum), .co(fa_r_out.carry));
  full_adder u_fa_1 (.a(a), .b(b), .ci(ci), .s(fa_1_out.sum), .co(fa_1_out.carry));
  full_adder u_fa_2 (.a(a), .b(b), .ci(ci), .s(fa_2_out.sum), .co(fa_2_out.carry));

  if (FAULT_INJECTION) begin : g_inject
    // Working-copy nets: one injection flip-flop each.
    fault_inject_ff u_ff_s1 (.clk(clk), .rst(inj_sa0[SITE_S1]), .set(inj_sa1[SITE_S1]),
                             .d(fa_1_out.sum),   .q(net_1.sum));
    fault_inject_ff u_ff_c1 (.clk(clk), .rst(inj_sa0[SITE_C1]), .set(inj_sa1[SITE_C1]),
                             .d(fa_1_out.carry), .q(net_1.carry));
    fault_inject_ff u_ff_s2 (.clk(clk), .rst(inj_sa0[SITE_S2]), .set(inj_sa1[SITE_S2]),
                             .d(fa_2_out.sum),   .q(net_2.sum));
    fault_inject_ff u_ff_c2 (.clk(clk), .rst(inj_sa0[SITE_C2]), .set(inj_sa1[SITE_C2]),
                             .d(fa_2_out.carry), .q(net_2.carry));
    // Reference nets: same delay, never faulted.
    fault_inject_ff u_ff_sr (.clk(clk), .rst(1'b0), .set(1'b0),
                             .d(fa_r_out.sum),   .q(net_r.sum));
    fault_inject_ff u_ff_cr (.clk(clk), .rst(1'b0), .set(1'b0),
                             .d(fa_r_out.carry), .q(net_r.carry));
  end else begin : g_direct
    assign net_r = fa_r_out;
    assign net_1 = fa_1_out;
    assign net_2 = fa_2_out;
  end

  logic [CUT_OUTPUTS-1:0] y_out, y_sel, y_none;

  fault_tolerant_select #(.WIDTH(CUT_OUTPUTS)) u_select (
    .y1   (net_1),
    .y2   (net_2),
    .yr   (net_r),
    .y    (y_out),
    .sel  (y_sel),
    .none (y_none)
  );

  assign sum_o       = y_out[BIT_SUM];
  assign carry_o     = y_out[BIT_CARRY];
  assign sel_sum     = y_sel[BIT_SUM];
  assign sel_carry   = y_sel[BIT_CARRY];
  assign multi_fault = {y_none[BIT_CARRY], y_none[BIT_SUM]};

endmodule
