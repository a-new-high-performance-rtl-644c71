// Direct digital frequency synthesizer with quarter-wave-symmetry cosine ROM.
//
// An L-bit phase accumulator adds the frequency control word add_in every
// cycle. Its top W bits form the truncated phase: the top two (MSB1, MSB0)
// give the quadrant, the remaining W-2 address the quarter-wave ROM.
//   - MSB0 = 1 (second and fourth quadrant): the address is 1's complemented,
//     reading the quarter wave backwards.
//   - MSB1 ^ MSB0 = 1 (second and third quadrant): the ROM word is 1's
//     complemented, i.e. negated (see cos_rom for why inversion is exact).
// dds_out is the two's complement code of cos(2*pi*phase/2**L); its value is
// code + 0.5 in units of 1/127.5 of full scale.
//
// PIPELINED = 1 (modulator): one register after the address multiplexer and
// one after the ROM, the quadrant select delayed to match, so dds_out follows
// the accumulator by 2 cycles. PIPELINED = 0 (demodulator): address mux, ROM
// and output mux are combinational, dds_out follows the accumulator directly.
// The accumulator itself is a register, so a new add_in first reaches the
// phase one cycle later in both cases.
//
// Widths (L=18, W=10, K=8), the 1's complementers, the quadrant XOR and the
// 2-cycle pipeline follow the original design. Two registers (not one) on the
// quadrant path, and a synchronous active-low reset of the accumulator, are
// this design's choices.
module ddfs #(
  parameter int unsigned L         = 18,
  parameter int unsigned W         = 10,
  parameter int unsigned K         = 8,
  parameter bit          PIPELINED = 1'b1
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [L-1:0] add_in,
  output logic [K-1:0] dds_out,
  output logic [L-1:0] phase
);
  localparam int unsigned AW = W - 2;

  logic [L-1:0]  acc;
  logic          msb1, msb0;
  logic [AW-1:0] addr_raw, addr_sel;
  logic [AW-1:0] addr_q;
  logic [K-1:0]  rom_data, rom_q;
  logic          neg_now;
  logic          neg_use;

  always_ff @(posedge clk) begin
    if (!rst_n) acc <= '0;
    else        acc <= acc + add_in;
  end
  assign phase = acc;

  assign msb1     = acc[L-1];
  assign msb0     = acc[L-2];
  assign addr_raw = acc[L-3 -: AW];
  assign addr_sel = msb0 ? ~addr_raw : addr_raw;
  assign neg_now  = msb1 ^ msb0;

  cos_rom #(.AW(AW), .DW(K)) u_rom (
    .addr (addr_q),
    .data (rom_data)
  );

  if (PIPELINED) begin : g_pipe
    logic neg_q1, neg_q2;
    always_ff @(posedge clk) begin
      if (!rst_n) begin
        addr_q <= '0;
        rom_q  <= '0;
        neg_q1 <= 1'b0;
        neg_q2 <= 1'b0;
      end else begin
        addr_q <= addr_sel;
        rom_q  <= rom_data;
        neg_q1 <= neg_now;
        neg_q2 <= neg_q1;
      end
    end
    assign neg_use = neg_q2;
  end else begin : g_comb
    assign addr_q  = addr_sel;
    assign rom_q   = rom_data;
    assign neg_use = neg_now;
  end

  assign dds_out = neg_use ? ~rom_q : rom_q;
endmodule
