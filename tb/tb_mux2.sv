// tb_mux2: all eight input combinations of the two-to-one multiplexer.
module tb_mux2;
  int checks = 0, failures = 0;
  logic d0, d1, sel, y;

  mux2 dut (.d0(d0), .d1(d1), .sel(sel), .y(y));

  initial begin : watchdog
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 8; v++) begin
      logic [1:0] data;
      {sel, d1, d0} = 3'(v);
      data = {d1, d0};
      #1;
      checks++;
      if (y !== data[sel]) begin
        failures++;
        $display("FAIL sel=%b d1=%b d0=%b: y=%b", sel, d1, d0, y);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
