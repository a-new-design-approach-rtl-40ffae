// tb_full_adder: exhaustive test of the one-bit full adder.
// All eight input combinations are applied; the expected sum and carry are
// the two bits of the integer a + b + ci, computed here independently of the
// adder's gate equations.
module tb_full_adder;
  int checks = 0, failures = 0;
  logic a, b, ci, s, co;

  full_adder dut (.a(a), .b(b), .ci(ci), .s(s), .co(co));

  initial begin : watchdog
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 8; v++) begin
      int unsigned total;
      {a, b, ci} = 3'(v);
      #1;
      total = int'(a) + int'(b) + int'(ci);
      checks++;
      if ({co, s} !== 2'(total)) begin
        failures++;
        $display("FAIL abc=%b%b%b: s=%b co=%b expected total %0d", a, b, ci, s, co, total);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
