// Booth decoder: one bit of a radix-4 Booth partial product.
//
// From the encoder outputs of the row (neg, x1_b, x2_b, z) and two adjacent
// multiplicand bits x_j and x_jm1 = X[j-1] it selects
//   +-1 * X : bit x_j        (x1_b = 0)
//   +-2 * X : bit x_jm1      (x2_b = 0, z = 0)
//    0      : 0              (x2_b = 0, z = 1)
// and inverts the result when neg = 1 (1's complement; the +1 that completes
// the two's complement is added in the tree). The selection is written from
// the encoder truth table; the gate structure is the synthesis tool's.
// Combinational.
module booth_decoder (
  input  logic x_j,
  input  logic x_jm1,
  input  logic neg,
  input  logic x1_b,
  input  logic x2_b,
  input  logic z,
  output logic pp
);
  logic one, two;
  assign one = ~x1_b;
  assign two = ~x2_b & ~z;
  assign pp  = ((one & x_j) | (two & x_jm1)) ^ neg;
endmodule
