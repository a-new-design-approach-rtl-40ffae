// tb_fault_tolerant_select: checks the compare/encode/select circuit.
// The default two-bit instance gets all 64 combinations of copy 1, copy 2
// and reference. A 6-bit instance gets random vectors in which each bit of
// each copy is independently corrupted, so single and double faults of every
// lane occur. Expected per bit: copy 1's bit if it equals the reference
// (select 0), else copy 2's bit if that equals it (select 1), else copy 1's
// bit with the `none` flag. In every single-fault case the output must equal
// the reference.
module tb_fault_tolerant_select;
  int checks = 0, failures = 0;
  int single_fault_fixed = 0;

  localparam int unsigned W2 = 2;
  localparam int unsigned W6 = 6;

  logic [W2-1:0] a1, a2, ar, ay, asel, anone;
  logic [W6-1:0] b1, b2, br, by, bsel, bnone;

  fault_tolerant_select dut2 (
    .y1(a1), .y2(a2), .yr(ar), .y(ay), .sel(asel), .none(anone));
  fault_tolerant_select #(.WIDTH(W6)) dut6 (
    .y1(b1), .y2(b2), .yr(br), .y(by), .sel(bsel), .none(bnone));

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Reference model of one lane.
  function automatic logic [2:0] lane(input logic c1, input logic c2, input logic r);
    // returns {y, sel, none}
    if (c1 == r)      return {c1, 1'b0, 1'b0};
    else if (c2 == r) return {c2, 1'b1, 1'b0};
    else              return {c1, 1'b0, 1'b1};
  endfunction

  initial begin
    for (int v = 0; v < 64; v++) begin
      {a1, a2, ar} = 6'(v);
      #1;
      for (int k = 0; k < int'(W2); k++) begin
        logic [2:0] e;
        e = lane(a1[k], a2[k], ar[k]);
        checks++;
        if ({ay[k], asel[k], anone[k]} !== e) begin
          failures++;
          $display("FAIL W2 bit %0d c1=%b c2=%b r=%b: y=%b sel=%b none=%b",
                   k, a1[k], a2[k], ar[k], ay[k], asel[k], anone[k]);
        end
        if ((a1[k] != ar[k]) != (a2[k] != ar[k])) begin
          checks++;
          single_fault_fixed++;
          if (ay[k] !== ar[k]) begin
            failures++;
            $display("FAIL W2 bit %0d: single fault not tolerated", k);
          end
        end
      end
    end
    for (int n = 0; n < 500; n++) begin
      logic [W6-1:0] f1, f2;
      br = W6'($urandom);
      f1 = W6'($urandom) & W6'($urandom);
      f2 = W6'($urandom) & W6'($urandom);
      b1 = br ^ f1;
      b2 = br ^ f2;
      #1;
      for (int k = 0; k < int'(W6); k++) begin
        logic [2:0] e;
        e = lane(b1[k], b2[k], br[k]);
        checks++;
        if ({by[k], bsel[k], bnone[k]} !== e) begin
          failures++;
          $display("FAIL W6 bit %0d c1=%b c2=%b r=%b: y=%b sel=%b none=%b",
                   k, b1[k], b2[k], br[k], by[k], bsel[k], bnone[k]);
        end
      end
    end
    if (single_fault_fixed == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
