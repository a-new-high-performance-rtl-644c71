// Signed N x N multiplier: radix-4 modified Booth encoding, Wallace tree of
// carry-save adders, carry look-ahead final adder. Product is 2N bits.
//
// Partial products. The multiplier y is cut into N/2 overlapping triplets
// (y[2i+1], y[2i], y[2i-1]), y[-1] = 0; each is encoded by booth_encoder into
// a digit in {-2,-1,0,1,2}. Row i is N+1 bits wide, one booth_decoder per
// bit, selecting bits of x (digit +-1) or of 2x (digit +-2) and inverting
// them for a negative digit. The missing +1 of each negated row is a separate
// bit at weight 2^(2i) (all such bits form one extra row).
// Sign extension prevention: the sign bit of each row is inverted and the
// constant -sum_i 2^(N+2i), modulo 2^(2N), is added as one more row, so no row
// has to be sign-extended across the product width.
// Reduction. The N/2 + 2 rows are reduced three at a time by 3:2 carry-save
// adders, all groups of a level in parallel, until two rows remain; those are
// added by cla_adder.
// The encoder, decoder, Wallace tree and CLA follow the original design; the
// exact sign-extension constant and the handling of the +1 bits are the usual
// textbook choices. Combinational.
module booth_wallace_mult #(
  parameter int unsigned N = 8          // even
) (
  input  logic signed [N-1:0]   x,      // multiplicand
  input  logic signed [N-1:0]   y,      // multiplier (Booth encoded)
  output logic signed [2*N-1:0] p
);
  localparam int unsigned NR = N / 2;   // Booth rows
  localparam int unsigned R  = NR + 2;  // + correction row + constant row
  localparam int unsigned PW = 2 * N;

  typedef logic [PW-1:0] row_t;

  // Constant for sign extension prevention.
  function automatic row_t sign_const();
    row_t c;
    c = '0;
    for (int i = 0; i < int'(NR); i++) c = c - (row_t'(1) << (N + 2 * i));
    return c;
  endfunction
  localparam row_t SCONST = sign_const();

  logic [NR-1:0] neg, x1_b, x2_b, z;
  logic [N:0]    pp [NR];
  logic [N+1:0]  xe;                    // {x sign, x, 0}: xe[j+1] = x[j], x[N] = x[N-1]

  assign xe = {x[N-1], x, 1'b0};

  for (genvar i = 0; i < int'(NR); i++) begin : g_row
    logic y_m1;
    assign y_m1 = (i == 0) ? 1'b0 : y[2*i-1];

    booth_encoder u_enc (
      .y_p1 (y[2*i+1]),
      .y_0  (y[2*i]),
      .y_m1 (y_m1),
      .neg  (neg[i]),
      .x1_b (x1_b[i]),
      .x2_b (x2_b[i]),
      .z    (z[i])
    );

    for (genvar j = 0; j <= int'(N); j++) begin : g_bit
      booth_decoder u_dec (
        .x_j   (xe[j+1]),
        .x_jm1 (xe[j]),
        .neg   (neg[i]),
        .x1_b  (x1_b[i]),
        .x2_b  (x2_b[i]),
        .z     (z[i]),
        .pp    (pp[i][j])
      );
    end
  end

  // Rows entering the tree.
  row_t rows0 [R];
  always_comb begin
    for (int i = 0; i < int'(NR); i++)
      rows0[i] = row_t'({~pp[i][N], pp[i][N-1:0]}) << (2 * i);
    rows0[NR] = '0;
    for (int i = 0; i < int'(NR); i++) rows0[NR][2*i] = neg[i];
    rows0[NR+1] = SCONST;
  end

  // Wallace tree: 3:2 carry-save levels until two rows remain. Level l has
  // rows_at(l) rows; each full group of three becomes a sum row and a
  // shifted carry row, leftover rows pass to the next level unchanged.
  function automatic int rows_at(int lvl);
    int r = int'(R);
    for (int i = 0; i < lvl; i++) r = 2 * (r / 3) + r % 3;
    return r;
  endfunction

  function automatic int num_levels();
    int r = int'(R);
    int l = 0;
    while (r > 2) begin
      r = 2 * (r / 3) + r % 3;
      l++;
    end
    return l;
  endfunction

  localparam int NL = num_levels();

  for (genvar l = 0; l < NL; l++) begin : g_lvl
    localparam int RI = rows_at(l);
    localparam int NG = RI / 3;
    localparam int RO = rows_at(l + 1);
    row_t rin  [R];
    row_t rout [R];
    for (genvar i = 0; i < int'(R); i++) begin : g_in
      if (l == 0) begin : g_first
        assign rin[i] = rows0[i];
      end else begin : g_next
        assign rin[i] = g_lvl[l-1].rout[i];
      end
    end
    for (genvar g = 0; g < NG; g++) begin : g_csa
      row_t a, b, c;
      assign a = rin[3*g];
      assign b = rin[3*g+1];
      assign c = rin[3*g+2];
      assign rout[2*g]   = a ^ b ^ c;
      assign rout[2*g+1] = ((a & b) | (a & c) | (b & c)) << 1;
    end
    for (genvar r = 0; r < RI % 3; r++) begin : g_pass
      assign rout[2*NG+r] = rin[3*NG+r];
    end
    for (genvar r = RO; r < int'(R); r++) begin : g_unused
      assign rout[r] = '0;
    end
  end

  row_t sum_a, sum_b;
  assign sum_a = g_lvl[NL-1].rout[0];
  assign sum_b = g_lvl[NL-1].rout[1];

  logic cout_unused;
  cla_adder #(.N(PW)) u_cla (
    .a    (sum_a),
    .b    (sum_b),
    .cin  (1'b0),
    .sum  (p),
    .cout (cout_unused)
  );
endmodule
