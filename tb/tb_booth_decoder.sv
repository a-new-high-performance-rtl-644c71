// Exhaustive test of booth_decoder: for every Booth triplet and every pair
// of multiplicand bits, the partial-product bit must be the selected bit of
// |digit| * X (x_j for 1, x_(j-1) for 2, 0 for 0), inverted for a negative
// digit. Encoder outputs are computed here from the digit, not by the encoder.
module tb_booth_decoder;
  logic x_j, x_jm1, neg, x1_b, x2_b, z, pp;
  int checks = 0, failures = 0;

  booth_decoder dut (.x_j(x_j), .x_jm1(x_jm1), .neg(neg), .x1_b(x1_b), .x2_b(x2_b), .z(z), .pp(pp));

  initial begin
    for (int t = 0; t < 8; t++) begin
      for (int xb = 0; xb < 4; xb++) begin
        int  digit, mag;
        logic sel, exp_pp;
        digit = -2 * ((t >> 2) & 1) + ((t >> 1) & 1) + (t & 1);
        mag   = (digit < 0) ? -digit : digit;
        neg   = 1'((t >> 2) & 1);
        x1_b  = (mag != 1);
        x2_b  = (mag == 1);
        z     = (((t >> 2) & 1) == ((t >> 1) & 1));
        x_j   = 1'(xb & 1);
        x_jm1 = 1'((xb >> 1) & 1);
        sel   = (mag == 1) ? x_j : (mag == 2) ? x_jm1 : 1'b0;
        exp_pp = sel ^ neg;
        #1;
        checks++;
        if (pp !== exp_pp) begin
          failures++;
          $display("FAIL triplet %0d x=%0d: got %b exp %b", t, xb, pp, exp_pp);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
