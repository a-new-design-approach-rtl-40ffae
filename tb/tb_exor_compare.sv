// tb_exor_compare: all eight input combinations of the comparator pair.
// A flag must be 1 exactly when the copy's bit differs from the reference.
module tb_exor_compare;
  int checks = 0, failures = 0;
  logic y1, y2, yr, x1, x2;

  exor_compare dut (.y1(y1), .y2(y2), .yr(yr), .x1(x1), .x2(x2));

  initial begin : watchdog
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 8; v++) begin
      logic e1, e2;
      {y1, y2, yr} = 3'(v);
      #1;
      e1 = (y1 != yr);
      e2 = (y2 != yr);
      checks++;
      if (x1 !== e1 || x2 !== e2) begin
        failures++;
        $display("FAIL y1=%b y2=%b yr=%b: x1=%b x2=%b", y1, y2, yr, x1, x2);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
