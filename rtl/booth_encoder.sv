// Radix-4 modified Booth encoder for one multiplier-bit triplet
// (y_p1, y_0, y_m1) = (Y[i+1], Y[i], Y[i-1]).
//
// Outputs, as in the original design's truth table:
//   neg  = Y[i+1]                  (digit is negative)
//   x1_b = ~(Y[i] ^ Y[i-1])        (low when the digit magnitude is 1)
//   x2_b =   Y[i] ^ Y[i-1]         (low when the magnitude is 0 or 2)
//   z    = ~(Y[i+1] ^ Y[i])        (with x1_b high: 1 -> digit 0, 0 -> digit +-2)
// Digit = -2*Y[i+1] + Y[i] + Y[i-1]. Purely combinational.
module booth_encoder (
  input  logic y_p1,
  input  logic y_0,
  input  logic y_m1,
  output logic neg,
  output logic x1_b,
  output logic x2_b,
  output logic z
);
  assign neg  = y_p1;
  assign x1_b = ~(y_0 ^ y_m1);
  assign x2_b = y_0 ^ y_m1;
  assign z    = ~(y_p1 ^ y_0);
endmodule
