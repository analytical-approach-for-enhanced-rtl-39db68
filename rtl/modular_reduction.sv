// modular_reduction: dual-field reduction of an XW-bit value modulo an
// (R+1)-bit modulus.
//
// GF(p) mode (fsel = 0): r = x mod m for an integer modulus 1 <= m < 2^R
// (bit R of m is zero). Restoring long division: for k = XW-1 down to 0, if
// the running remainder shifted right by k is at least m, m*2^k is subtracted.
// GF(2^n) mode (fsel = 1): r = x(t) mod m(t) for a polynomial modulus of degree
// exactly R (bit R set). For k = XW-1-R down to 0, if coefficient k+R of the
// running remainder is one, m(t)*t^k is added (XOR).
// The quotient is dropped; r is R bits. Purely combinational, XW stages deep.
// The document names a modular reduction unit but not how it works; the
// long-division structure is this design's choice.
module modular_reduction #(
  parameter int R  = 16,
  parameter int XW = 2*R + 2
) (
  input  logic          fsel,
  input  logic [XW-1:0] x,
  input  logic [R:0]    m,
  output logic [R-1:0]  r
);
  localparam int EW = XW + R + 1;   // room for m shifted by up to XW-1

  logic [EW-1:0] rem, ms;

  always_comb begin
    rem = EW'(x);
    for (int k = XW - 1; k >= 0; k--) begin
      ms = EW'(m) << k;
      if (fsel) begin
        if (k + R < XW && rem[k+R]) rem = rem ^ ms;
      end else begin
        if (rem >= ms) rem = rem - ms;
      end
    end
    r = rem[R-1:0];
  end
endmodule
