// tb_fault_inject_ff: checks the fault-injection flip-flop.
// Without set/reset q must equal d of the previous rising edge. Reset must
// force 0 and set must force 1 at once, without a clock edge, and hold the
// value while asserted regardless of d and the clock (stuck-at behaviour);
// reset wins when both are high. After release q follows d again.
module tb_fault_inject_ff;
  int checks = 0, failures = 0;
  logic clk = 0, rst = 0, set = 0, d = 0, q;

  fault_inject_ff dut (.clk(clk), .rst(rst), .set(set), .d(d), .q(q));

  always #5 clk = ~clk;

  task automatic check(input logic exp, input string what);
    checks++;
    if (q !== exp) begin
      failures++;
      $display("FAIL %s: q=%b expected %b at %0t", what, q, exp, $time);
    end
  endtask

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic prev;
    // Normal capture.
    for (int i = 0; i < 40; i++) begin
      @(negedge clk);
      d = 1'($urandom);
      prev = d;
      @(posedge clk); #1;
      check(prev, "capture");
      // between edges q must not follow d
      @(negedge clk);
      d = ~prev; #1;
      check(prev, "hold between edges");
    end
    // Stuck-at-0 and stuck-at-1, applied mid-cycle.
    for (int i = 0; i < 20; i++) begin
      logic sa;
      sa = 1'($urandom);
      @(negedge clk);
      d = ~sa;
      #1;  // q now holds ~sa from the last edge or is about to
      if (sa) set = 1; else rst = 1;
      #1;
      check(sa, "force without clock");
      repeat (3) begin
        @(posedge clk); #1;
        d = 1'($urandom);
        check(sa, "held while forced");
      end
      @(negedge clk);
      rst = 0; set = 0;
      d = ~sa;
      @(posedge clk); #1;
      check(~sa, "follows d after release");
    end
    // Both controls: reset wins.
    @(negedge clk);
    d = 1; rst = 1; set = 1; #1;
    check(1'b0, "reset wins over set");
    @(posedge clk); #1;
    check(1'b0, "reset wins over set, clocked");
    @(negedge clk);
    rst = 0; set = 0;
    @(posedge clk); #1;
    check(1'b1, "after both released");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
