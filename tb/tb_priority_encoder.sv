// tb_priority_encoder: the four input rows of the two-input priority encoder.
// Expected rows: priority input 0 -> select 0; priority input 1 and second
// input 0 -> select 1; both 1 -> select 0 with the `none` flag raised.
module tb_priority_encoder;
  int checks = 0, failures = 0;
  logic i_hi, i_lo, o, none;

  priority_encoder dut (.i_hi(i_hi), .i_lo(i_lo), .o(o), .none(none));

  initial begin : watchdog
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // expected {o, none} indexed by {i_hi, i_lo}
  logic [1:0] expected [4] = '{2'b00, 2'b00, 2'b10, 2'b01};

  initial begin
    for (int v = 0; v < 4; v++) begin
      {i_hi, i_lo} = 2'(v);
      #1;
      checks++;
      if ({o, none} !== expected[v]) begin
        failures++;
        $display("FAIL i_hi=%b i_lo=%b: o=%b none=%b", i_hi, i_lo, o, none);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
