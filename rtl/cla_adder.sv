// Carry look-ahead adder, N bits (final adder of the multiplier tree).
//
// Bits are grouped by 4. Inside a group every carry is formed directly from
// the bit generate/propagate terms and the group carry-in; each group also
// forms a group generate G and propagate P, and the carry into every group is
// formed from those of the groups below it and cin (a second look-ahead
// level), so no carry ripples from bit to bit. Combinational.
// The grouping is this design's choice; the original design only names a CLA.
module cla_adder #(
  parameter int unsigned N = 16
) (
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  input  logic         cin,
  output logic [N-1:0] sum,
  output logic         cout
);
  localparam int unsigned NG = (N + 3) / 4;
  localparam int unsigned NP = NG * 4;

  logic [NP-1:0] ap, bp, g, p, c;
  logic [NG-1:0] gg, gp;
  logic [NG:0]   gc;

  assign ap = NP'(a);
  assign bp = NP'(b);
  assign g  = ap & bp;
  assign p  = ap ^ bp;

  // Group generate / propagate.
  always_comb begin
    for (int k = 0; k < int'(NG); k++) begin
      gp[k] = &p[4*k +: 4];
      gg[k] = g[4*k+3]
            | (p[4*k+3] & g[4*k+2])
            | (p[4*k+3] & p[4*k+2] & g[4*k+1])
            | (p[4*k+3] & p[4*k+2] & p[4*k+1] & g[4*k]);
    end
  end

  // Second level: carry into each group from all lower groups and cin.
  always_comb begin
    logic term;
    gc[0] = cin;
    for (int k = 1; k <= int'(NG); k++) begin
      gc[k] = 1'b0;
      for (int j = 0; j <= k; j++) begin
        // term j: generated in group j-1 (or cin for j = 0), propagated through groups j..k-1
        term = (j == 0) ? cin : gg[j-1];
        for (int m = j; m < k; m++) term = term & gp[m];
        gc[k] = gc[k] | term;
      end
    end
  end

  // First level: carries inside each group.
  always_comb begin
    for (int k = 0; k < int'(NG); k++) begin
      c[4*k]   = gc[k];
      c[4*k+1] = g[4*k] | (p[4*k] & gc[k]);
      c[4*k+2] = g[4*k+1] | (p[4*k+1] & g[4*k]) | (p[4*k+1] & p[4*k] & gc[k]);
      c[4*k+3] = g[4*k+2] | (p[4*k+2] & g[4*k+1]) | (p[4*k+2] & p[4*k+1] & g[4*k])
               | (p[4*k+2] & p[4*k+1] & p[4*k] & gc[k]);
    end
  end

  assign sum = p[N-1:0] ^ c[N-1:0];
  if (N == NP) begin : g_cout_grp
    assign cout = gc[NG];
  end else begin : g_cout_bit
    assign cout = g[N-1] | (p[N-1] & c[N-1]);
  end
endmodule
