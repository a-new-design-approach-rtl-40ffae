// tb_top_final_stuck_comb: the fault-tolerant full adder without the
// injection flip-flops (FAULT_INJECTION = 0), the purely combinational form
// meant for use once testing is done.
//
// Outputs must follow the inputs within the same time step, the injection
// ports must have no effect, and a stuck-at value forced directly onto an
// output net of fa_1 or fa_2 must still be tolerated, with the mux select
// moving to fa_2 when fa_1's net is wrong.
module tb_top_final_stuck_comb;
  int checks = 0, failures = 0;
  int n_resel = 0, n_stuck = 0;

  logic clk = 1'b0;
  logic a, b, ci;
  logic [3:0] inj_sa0, inj_sa1;
  logic sum_o, carry_o, sel_sum, sel_carry;
  logic [1:0] multi_fault;

  top_final_stuck #(.FAULT_INJECTION(1'b0)) dut (
    .clk, .a, .b, .ci, .inj_sa0, .inj_sa1,
    .sum_o, .carry_o, .sel_sum, .sel_carry, .multi_fault);

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_vec(input logic exp_ss, input logic exp_sc, input string what);
    int unsigned total;
    total = int'(a) + int'(b) + int'(ci);
    checks++;
    if ({carry_o, sum_o} !== 2'(total) || sel_sum !== exp_ss || sel_carry !== exp_sc
        || multi_fault !== 2'b00) begin
      failures++;
      $display("FAIL %s abc=%b%b%b: sum=%b carry=%b sel=%b%b multi=%b",
               what, a, b, ci, sum_o, carry_o, sel_sum, sel_carry, multi_fault);
    end
    if (exp_ss || exp_sc) n_resel++;
  endtask

  initial begin
    // No fault; injection ports toggled at random must not matter.
    for (int n = 0; n < 64; n++) begin
      {a, b, ci} = 3'(n);
      inj_sa0 = 4'($urandom);
      inj_sa1 = 4'($urandom);
      #1;
      check_vec(1'b0, 1'b0, "no fault");
    end
    // Stuck-at values forced onto the adder output nets.
    for (int site = 0; site < 4; site++) begin
      for (int sa = 0; sa < 2; sa++) begin
        case (site)
          0: force dut.net_1.sum   = 1'(sa);
          1: force dut.net_1.carry = 1'(sa);
          2: force dut.net_2.sum   = 1'(sa);
          default: force dut.net_2.carry = 1'(sa);
        endcase
        n_stuck++;
        for (int v = 0; v < 8; v++) begin
          logic s_true, c_true;
          {a, b, ci} = 3'(v);
          #1;
          s_true = a ^ b ^ ci;
          c_true = (int'(a) + int'(b) + int'(ci)) >= 2;
          check_vec(site == 0 && 1'(sa) != s_true, site == 1 && 1'(sa) != c_true, "stuck net");
        end
        release dut.net_1.sum;
        release dut.net_1.carry;
        release dut.net_2.sum;
        release dut.net_2.carry;
      end
    end
    if (n_resel == 0) begin failures++; $display("FAIL select never moved to fa_2"); end
    if (n_stuck == 0) begin failures++; $display("FAIL no stuck net applied"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
