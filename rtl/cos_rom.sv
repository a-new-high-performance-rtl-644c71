// Quarter-wave cosine table of the DDFS.
//
// 2**AW entries cover the first quadrant of a cosine whose full period has
// 4 * 2**AW = 1024 phase steps. Entry a holds
//   floor(A * cos(2*pi*(a + 0.5) / 1024)),  A = 2**(DW-1) - 0.5 = 127.5,
// computed at elaboration. An entry is read as code + 0.5, so its 1's
// complement (-code - 1, read as -code - 0.5) is exactly its negative: the
// quadrant logic of the DDFS can negate with inverters only. The half-step
// phase offset makes the table symmetric under address complement in the
// same way. The table contents are this design's choice; the original design
// only names a cosine ROM of 8-bit words.
// Combinational read: data follows addr in the same cycle.
module cos_rom #(
  parameter int unsigned AW = 8,
  parameter int unsigned DW = 8
) (
  input  logic [AW-1:0] addr,
  output logic [DW-1:0] data
);
  localparam int unsigned DEPTH = 1 << AW;
  typedef logic [DW-1:0] table_t [DEPTH];

  function automatic table_t make_table();
    table_t t;
    real    amp, ph;
    amp = real'(1 << (DW - 1)) - 0.5;
    for (int a = 0; a < int'(DEPTH); a++) begin
      ph   = 2.0 * 3.14159265358979323846 * (real'(a) + 0.5) / real'(4 * DEPTH);
      t[a] = DW'($rtoi($floor(amp * $cos(ph))));
    end
    return t;
  endfunction

  localparam table_t TABLE = make_table();

  assign data = TABLE[addr];
endmodule
