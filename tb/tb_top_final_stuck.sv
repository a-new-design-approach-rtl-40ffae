// tb_top_final_stuck: end-to-end test of the fault-tolerant full adder at its
// default parameters (injection flip-flops present).
//
// For each fault condition -- none, and stuck-at-0 / stuck-at-1 on each of
// s_1, c_1, s_2, c_2 -- the eight exhaustive vectors of the full-adder truth
// table and the four pseudo-random vectors (000, 011, 001, 111) are applied.
// Inputs change on the falling clock edge; sum_o/carry_o are checked after
// the next rising edge against the truth table written out below, and the
// mux selects against the fault placed. The one-cycle latency is checked by
// looking at the outputs before that rising edge as well. Then the two
// worked examples of the design (001 with s_1 stuck-at-0, 011 with s_1
// stuck-at-1), stuck-at faults forced on the priority-encoder inputs and
// outputs, a double fault (flagged on multi_fault), and 400 random vectors
// with random single faults. Every mechanism is counted; one that never
// happened counts as a failure.
module tb_top_final_stuck
  import ftol_pkg::*;
;
  int checks = 0, failures = 0;

  logic clk = 1'b0;
  logic a = 0, b = 0, ci = 0;
  logic [NUM_SITES-1:0] inj_sa0 = '0, inj_sa1 = '0;
  logic sum_o, carry_o, sel_sum, sel_carry;
  logic [1:0] multi_fault;

  top_final_stuck dut (
    .clk, .a, .b, .ci, .inj_sa0, .inj_sa1,
    .sum_o, .carry_o, .sel_sum, .sel_carry, .multi_fault);

  always #5 clk = ~clk;

  // Full-adder truth table, {s, co} indexed by {a, b, ci}.
  localparam logic [1:0] TRUTH [8] = '{2'b00, 2'b10, 2'b10, 2'b01,
                                       2'b10, 2'b01, 2'b01, 2'b11};
  // Pseudo-random test vectors {a, b, ci}.
  localparam logic [2:0] PRTEST [4] = '{3'b000, 3'b011, 3'b001, 3'b111};

  // Mechanism counters.
  int n_sa0, n_sa1, n_resel_sum, n_resel_carry, n_copy2_masked;
  int n_example1, n_example2, n_enc_in_fault, n_enc_out_fault, n_multi, n_latency;

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_out(input logic [2:0] v, input logic exp_ss, input logic exp_sc,
                            input string what);
    logic [1:0] t;
    t = TRUTH[v];
    checks++;
    if (sum_o !== t[1] || carry_o !== t[0]) begin
      failures++;
      $display("FAIL %s abc=%b: sum_o=%b carry_o=%b expected %b %b",
               what, v, sum_o, carry_o, t[1], t[0]);
    end
    checks++;
    if (sel_sum !== exp_ss || sel_carry !== exp_sc || multi_fault !== 2'b00) begin
      failures++;
      $display("FAIL %s abc=%b: sel_sum=%b sel_carry=%b multi=%b expected %b %b 00",
               what, v, sel_sum, sel_carry, multi_fault, exp_ss, exp_sc);
    end
    if (sel_sum)   n_resel_sum++;
    if (sel_carry) n_resel_carry++;
  endtask

  // Apply one vector with one fault condition and check it.
  // site < 0: no fault. sa: stuck value.
  task automatic run_vec(input logic [2:0] v, input int site, input logic sa,
                         input string what);
    logic [1:0] t;
    logic ss, sc;
    logic [2:0] prev;
    logic [1:0] tp;
    prev = {a, b, ci};
    tp = TRUTH[prev];
    @(negedge clk);
    {a, b, ci} = v;
    inj_sa0 = '0;
    inj_sa1 = '0;
    if (site >= 0) begin
      if (sa) begin inj_sa1[site] = 1'b1; n_sa1++; end
      else    begin inj_sa0[site] = 1'b1; n_sa0++; end
    end
    t = TRUTH[v];
    ss = (site == int'(SITE_S1)) && (sa != t[1]);
    sc = (site == int'(SITE_C1)) && (sa != t[0]);
    if ((site == int'(SITE_S2) && sa != t[1]) || (site == int'(SITE_C2) && sa != t[0]))
      n_copy2_masked++;
    // One-cycle latency: before the rising edge the outputs still show the
    // previous vector (checked when no fault is being placed).
    if (site < 0 && prev != v) begin
      #1;
      checks++;
      n_latency++;
      if (sum_o !== tp[1] || carry_o !== tp[0]) begin
        failures++;
        $display("FAIL latency: outputs changed before the clock edge");
      end
    end
    @(posedge clk);
    #1;
    expect_out(v, ss, sc, what);
  endtask

  initial begin
    n_sa0 = 0; n_sa1 = 0; n_resel_sum = 0; n_resel_carry = 0; n_copy2_masked = 0;
    n_example1 = 0; n_example2 = 0; n_enc_in_fault = 0; n_enc_out_fault = 0;
    n_multi = 0; n_latency = 0;
    repeat (2) @(posedge clk);

    // Exhaustive and pseudo-random vector sets under every single fault.
    for (int site = -1; site < int'(NUM_SITES); site++) begin
      for (int sa = 0; sa < 2; sa++) begin
        if (site < 0 && sa == 1) continue;
        for (int v = 0; v < 8; v++) run_vec(3'(v), site, 1'(sa), "exhaustive");
        for (int k = 0; k < 4; k++) run_vec(PRTEST[k], site, 1'(sa), "pseudo-random");
      end
    end

    // Worked example 1: input 001, s_1 stuck-at-0 -> fa_2's sum '1' is used.
    run_vec(3'b001, int'(SITE_S1), 1'b0, "example 001 s1 sa0");
    if (sel_sum === 1'b1 && sum_o === 1'b1) n_example1++;
    // Worked example 2: input 011, s_1 stuck-at-1 -> fa_2's sum '0' is used.
    run_vec(3'b011, int'(SITE_S1), 1'b1, "example 011 s1 sa1");
    if (sel_sum === 1'b1 && sum_o === 1'b0) n_example2++;

    // One clean cycle first, so no stuck value is left on an adder net.
    @(negedge clk);
    inj_sa0 = '0;
    inj_sa1 = '0;
    @(posedge clk);
    // Stuck-at faults on the priority-encoder inputs (ex-or outputs) and on
    // the encoder outputs (mux select lines), no fault on the adder nets.
    for (int lane = 0; lane < 2; lane++) begin
      for (int where = 0; where < 3; where++) begin
        for (int sa = 0; sa < 2; sa++) begin
          for (int v = 0; v < 8; v++) begin
            logic [1:0] t;
            @(negedge clk);
            {a, b, ci} = 3'(v);
            inj_sa0 = '0;
            inj_sa1 = '0;
            case ({lane[0], where[1:0]})
              3'b000: force dut.u_select.g_lane[0].x1 = 1'(sa);
              3'b001: force dut.u_select.g_lane[0].x2 = 1'(sa);
              3'b010: force dut.u_select.sel[0]       = 1'(sa);
              3'b100: force dut.u_select.g_lane[1].x1 = 1'(sa);
              3'b101: force dut.u_select.g_lane[1].x2 = 1'(sa);
              default: force dut.u_select.sel[1]      = 1'(sa);
            endcase
            @(posedge clk);
            #1;
            t = TRUTH[v];
            checks++;
            if (sum_o !== t[1] || carry_o !== t[0]) begin
              failures++;
              $display("FAIL encoder fault lane %0d where %0d sa%0d abc=%b: %b %b",
                       lane, where, sa, v, sum_o, carry_o);
            end else if (where == 2) n_enc_out_fault++;
            else n_enc_in_fault++;
            // The forced value must really reach the select line: x1 or sel
            // stuck at sa gives select sa, x2 stuck leaves copy 1 selected.
            checks++;
            if ((lane == 0 ? sel_sum : sel_carry) !== (where == 1 ? 1'b0 : 1'(sa))) begin
              failures++;
              $display("FAIL encoder fault lane %0d where %0d sa%0d: select not as forced",
                       lane, where, sa);
            end
            release dut.u_select.g_lane[0].x1;
            release dut.u_select.g_lane[0].x2;
            release dut.u_select.sel[0];
            release dut.u_select.g_lane[1].x1;
            release dut.u_select.g_lane[1].x2;
            release dut.u_select.sel[1];
          end
        end
      end
    end

    // Double fault, outside the single-fault assumption: both sums stuck at 0
    // while the true sum is 1. The design flags it on multi_fault[0].
    @(negedge clk);
    {a, b, ci} = 3'b100;
    inj_sa0 = '0;
    inj_sa1 = '0;
    inj_sa0[SITE_S1] = 1'b1;
    inj_sa0[SITE_S2] = 1'b1;
    @(posedge clk);
    #1;
    checks++;
    if (multi_fault !== 2'b01) begin
      failures++;
      $display("FAIL double fault: multi_fault=%b expected 01", multi_fault);
    end else n_multi++;
    // Clear the faults and let the flip-flops take a clean value.
    @(negedge clk);
    inj_sa0 = '0;
    inj_sa1 = '0;
    @(posedge clk);

    // Random vectors, each with no fault or one random single fault.
    for (int n = 0; n < 400; n++) begin
      int site;
      site = int'($urandom_range(0, NUM_SITES)) - 1;
      run_vec(3'($urandom), site, 1'($urandom), "random");
    end

    @(negedge clk);
    inj_sa0 = '0;
    inj_sa1 = '0;

    $display("mechanisms: sa0=%0d sa1=%0d resel_sum=%0d resel_carry=%0d copy2_masked=%0d",
             n_sa0, n_sa1, n_resel_sum, n_resel_carry, n_copy2_masked);
    $display("            example1=%0d example2=%0d enc_in_fault=%0d enc_out_fault=%0d multi=%0d latency=%0d",
             n_example1, n_example2, n_enc_in_fault, n_enc_out_fault, n_multi, n_latency);
    if (n_sa0 == 0)           begin failures++; $display("FAIL no stuck-at-0 injected"); end
    if (n_sa1 == 0)           begin failures++; $display("FAIL no stuck-at-1 injected"); end
    if (n_resel_sum == 0)     begin failures++; $display("FAIL sum never moved to fa_2"); end
    if (n_resel_carry == 0)   begin failures++; $display("FAIL carry never moved to fa_2"); end
    if (n_copy2_masked == 0)  begin failures++; $display("FAIL no fault on fa_2 masked"); end
    if (n_example1 == 0)      begin failures++; $display("FAIL example 1 not seen"); end
    if (n_example2 == 0)      begin failures++; $display("FAIL example 2 not seen"); end
    if (n_enc_in_fault == 0)  begin failures++; $display("FAIL no encoder-input fault tolerated"); end
    if (n_enc_out_fault == 0) begin failures++; $display("FAIL no encoder-output fault tolerated"); end
    if (n_multi == 0)         begin failures++; $display("FAIL double fault never flagged"); end
    if (n_latency == 0)       begin failures++; $display("FAIL latency never checked"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
