// loop_gain: fcw = center + 2*loop_in modulo 2^18, for edge and random values.
module tb_loop_gain;
  logic [17:0]        center, fcw;
  logic signed [11:0] lin;
  int checks = 0, failures = 0;

  loop_gain dut (.center_fcw(center), .loop_in(lin), .fcw(fcw));

  task automatic try(int c, int l);
    int e;
    center = 18'(c); lin = 12'(l);
    #1;
    e = (c + 2 * l + 262144) % 262144;
    checks++;
    if (int'(fcw) != e) begin
      failures++;
      $display("FAIL center %0d in %0d: got %0d exp %0d", c, l, fcw, e);
    end
  endtask

  initial begin
    try(2621, 0); try(2621, 2047); try(2621, -2048); try(8192, -1); try(0, -1); try(262143, 1);
    for (int i = 0; i < 2000; i++) try(int'($urandom % 262144), int'($urandom % 4096) - 2048);
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
