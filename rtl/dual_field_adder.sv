// dual_field_adder: W-bit dual-field parallel-prefix (Kogge-Stone) adder.
//
// In GF(p) mode (fsel = 0) it is an ordinary binary adder: s = a + b + cin, with
// carry out. In GF(2^n) mode (fsel = 1) the operands are polynomials over GF(2),
// addition is coefficient-wise modulo 2, so every generate signal and the carry
// in are forced to zero: s = a ^ b and cout = 0. The same prefix tree therefore
// serves both fields. The document names a dual-field carry-lookahead adder and
// parallel-prefix adders inside the MAC units; the Kogge-Stone tree and the
// carry gating are this design's choices. Purely combinational.
module dual_field_adder #(
  parameter int W = 32
) (
  input  logic         fsel,   // 0: integer, 1: polynomial (carry-free)
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         cin,
  output logic [W-1:0] s,
  output logic         cout
);
  localparam int LVL = (W > 1) ? $clog2(W) : 1;

  logic [W-1:0] g [0:LVL];
  logic [W-1:0] p [0:LVL];
  logic [W-1:0] hp;
  logic         c0;

  always_comb begin
    c0    = cin & ~fsel;
    hp    = a ^ b;
    g[0]  = (a & b) & {W{~fsel}};
    p[0]  = hp;
    // fold the carry in into bit 0 so the tree yields carries directly
    g[0][0] = g[0][0] | (hp[0] & c0);
    for (int l = 0; l < LVL; l++) begin
      for (int i = 0; i < W; i++) begin
        if (i >= (1 << l)) begin
          g[l+1][i] = g[l][i] | (p[l][i] & g[l][i-(1<<l)]);
          p[l+1][i] = p[l][i] & p[l][i-(1<<l)];
        end else begin
          g[l+1][i] = g[l][i];
          p[l+1][i] = p[l][i];
        end
      end
    end
    s    = hp ^ {g[LVL][W-2:0], c0};
    cout = g[LVL][W-1];
  end
endmodule
