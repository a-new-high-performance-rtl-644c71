// FM data generator: serial-to-parallel converter for the modulator input.
//
// The serial FM input is sampled on every cycle in which bit_en (the FM
// symbol clock, used as a clock enable) is high, and shifted into a chain of
// W registers. As in the register chain of the original design, the bit that
// arrives enters the stage that drives fm_out[W-1] and moves one stage towards
// fm_out[0] per symbol, so after W symbols the first bit received sits in
// bit 0 (LSB first).
//
// Framing is this design's choice: a counter started by reset marks every
// W-th bit, the shift register is then copied into word_out and word_valid
// pulses for one cycle (the cycle after the W-th bit_en).
//
// Interface: clk, rst_n (synchronous, active low), bit_en, fm_in;
//            fm_out = live shift register, word_out/word_valid = framed word.
// An assertion checks that word_valid never lasts more than one cycle.
module fm_data_generator #(
  parameter int unsigned W = 8
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         bit_en,
  input  logic         fm_in,
  output logic [W-1:0] fm_out,
  output logic [W-1:0] word_out,
  output logic         word_valid
);
  localparam int unsigned CW = (W > 1) ? $clog2(W) : 1;

  logic [CW-1:0] bit_cnt;
  logic [W-1:0]  shreg;
  logic          word_done;

  // The W-th bit of a word is being taken in this cycle.
  assign word_done = bit_en && (bit_cnt == CW'(W - 1));

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      shreg      <= '0;
      bit_cnt    <= '0;
      word_out   <= '0;
      word_valid <= 1'b0;
    end else begin
      word_valid <= 1'b0;
      if (bit_en) begin
        shreg   <= {fm_in, shreg[W-1:1]};
        bit_cnt <= word_done ? '0 : bit_cnt + 1'b1;
        if (word_done) begin
          word_out   <= {fm_in, shreg[W-1:1]};
          word_valid <= 1'b1;
        end
      end
    end
  end

  assign fm_out = shreg;

  // A framed word is announced for exactly one cycle.
  a_word_valid_pulse: assert property (@(posedge clk) disable iff (!rst_n)
    word_valid |=> !word_valid || (W == 1));
endmodule
