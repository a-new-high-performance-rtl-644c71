// Exhaustive test of booth_encoder against the radix-4 Booth truth table
// (digit = -2*y(i+1) + y(i) + y(i-1); neg, x1_b, x2_b, z as tabulated).
module tb_booth_encoder;
  logic y_p1, y_0, y_m1, neg, x1_b, x2_b, z;
  int checks = 0, failures = 0;

  booth_encoder dut (.y_p1(y_p1), .y_0(y_0), .y_m1(y_m1), .neg(neg), .x1_b(x1_b), .x2_b(x2_b), .z(z));

  // Expected {neg, x1_b, x2_b, z} per triplet, written out row by row.
  logic [3:0] table_exp [8] = '{4'b0101, 4'b0011, 4'b0010, 4'b0100,
                                4'b1100, 4'b1010, 4'b1011, 4'b1101};

  initial begin
    for (int t = 0; t < 8; t++) begin
      int digit;
      {y_p1, y_0, y_m1} = 3'(t);
      #1;
      checks++;
      if ({neg, x1_b, x2_b, z} !== table_exp[t]) begin
        failures++;
        $display("FAIL triplet %03b: got %04b exp %04b", t[2:0], {neg, x1_b, x2_b, z}, table_exp[t]);
      end
      // The outputs must also identify the digit value.
      digit = -2 * int'(y_p1) + int'(y_0) + int'(y_m1);
      checks++;
      if ((!x1_b ? (neg ? -1 : 1) : (z ? 0 : (neg ? -2 : 2))) != digit) begin
        failures++;
        $display("FAIL triplet %03b: digit decode mismatch", t[2:0]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
