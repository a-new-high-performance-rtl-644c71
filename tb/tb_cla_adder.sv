// cla_adder at its default 16 bits: corner cases (all carries propagating)
// and random operands, sum and carry out compared with a plain addition.
module tb_cla_adder;
  localparam int N = 16;
  logic [N-1:0] a, b, sum;
  logic         cin, cout;
  int checks = 0, failures = 0;

  cla_adder dut (.a(a), .b(b), .cin(cin), .sum(sum), .cout(cout));

  task automatic try(logic [N-1:0] ta, logic [N-1:0] tb_, logic tc);
    logic [N:0] exp_v;
    a = ta; b = tb_; cin = tc;
    #1;
    exp_v = {1'b0, ta} + {1'b0, tb_} + (N+1)'(tc);
    checks++;
    if ({cout, sum} !== exp_v) begin
      failures++;
      if (failures < 10) $display("FAIL %h + %h + %b: got %h exp %h", ta, tb_, tc, {cout, sum}, exp_v);
    end
  endtask

  initial begin
    try('1, 16'd1, 1'b0);
    try('1, '0, 1'b1);
    try('1, '1, 1'b1);
    try(16'h0F0F, 16'h00F1, 1'b0);
    try(16'h7FFF, 16'h0001, 1'b0);
    for (int i = 0; i < 20000; i++) try(N'($urandom), N'($urandom), 1'($urandom));
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
