// fm_data_generator: random bytes sent LSB first with irregular gaps between
// bit enables. Checks: each framed word equals the byte sent, word_valid
// comes exactly one cycle after the 8th bit_en, and after each bit the live
// shift register holds the bits received so far (newest in bit 7).
module tb_fm_data_generator;
  logic clk = 0, rst_n = 0, bit_en = 0, fm_in = 0;
  logic [7:0] fm_out, word_out;
  logic word_valid;
  int checks = 0, failures = 0;

  fm_data_generator dut (.clk(clk), .rst_n(rst_n), .bit_en(bit_en), .fm_in(fm_in),
                         .fm_out(fm_out), .word_out(word_out), .word_valid(word_valid));
  always #5 clk = ~clk;

  logic [7:0] hist;
  int valid_count = 0;
  always @(posedge clk) if (rst_n && word_valid) valid_count++;

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    hist = '0;
    for (int w = 0; w < 200; w++) begin
      logic [7:0] byte_v;
      byte_v = 8'($urandom);
      for (int b = 0; b < 8; b++) begin
        int gap, vc;
        gap = int'($urandom % 3);
        repeat (gap) @(negedge clk);
        bit_en = 1; fm_in = byte_v[b];
        vc = valid_count;
        @(negedge clk);
        bit_en = 0;
        hist = {byte_v[b], hist[7:1]};
        checks++;
        if (fm_out !== hist) begin
          failures++;
          $display("FAIL word %0d bit %0d: shift register %b exp %b", w, b, fm_out, hist);
        end
        // word_valid is high in exactly the cycle after the 8th bit.
        checks++;
        if (word_valid !== (b == 7)) begin
          failures++;
          $display("FAIL word %0d bit %0d: word_valid %b", w, b, word_valid);
        end
        if (b == 7) begin
          checks++;
          if (word_out !== byte_v) begin
            failures++;
            $display("FAIL word %0d: got %h exp %h", w, word_out, byte_v);
          end
        end
      end
    end
    @(negedge clk);
    checks++;
    if (valid_count != 200) begin
      failures++;
      $display("FAIL %0d words framed, expected 200", valid_count);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
