// cos_rom: every entry against floor(127.5*cos(2*pi*(a+0.5)/1024)), the table
// must fall monotonically, and entry + 0.5 must be within 0.5 LSB of the
// exact cosine at the centre of the phase step.
module tb_cos_rom;
  logic [7:0] addr, data;
  int checks = 0, failures = 0;

  cos_rom dut (.addr(addr), .data(data));

  initial begin
    int last = 1000;
    for (int a = 0; a < 256; a++) begin
      real c;
      int  e;
      addr = 8'(a);
      #1;
      c = 127.5 * $cos(2.0 * 3.14159265358979 * (real'(a) + 0.5) / 1024.0);
      e = $rtoi($floor(c));
      checks++;
      if (int'(data) != e) begin
        failures++;
        $display("FAIL addr %0d: got %0d exp %0d", a, data, e);
      end
      checks++;
      if (int'(data) > last || real'(data) + 0.5 - c > 0.5 || c - real'(data) - 0.5 > 0.5) begin
        failures++;
        $display("FAIL addr %0d: not monotonic or off by more than 0.5 LSB", a);
      end
      last = int'(data);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
