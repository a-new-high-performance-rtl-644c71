// Exhaustive test of the 8 x 8 signed Booth/Wallace multiplier: all 65536
// operand pairs against the built-in signed product.
module tb_booth_wallace_mult;
  localparam int N = 8;
  logic signed [N-1:0]   x, y;
  logic signed [2*N-1:0] p;
  int checks = 0, failures = 0;

  booth_wallace_mult dut (.x(x), .y(y), .p(p));

  initial begin
    for (int i = -128; i < 128; i++) begin
      for (int j = -128; j < 128; j++) begin
        x = N'(i); y = N'(j);
        #1;
        checks++;
        if (int'(p) != i * j) begin
          failures++;
          if (failures < 10) $display("FAIL %0d * %0d: got %0d", i, j, p);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
