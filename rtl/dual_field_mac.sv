// dual_field_mac: one dual-field multiply-accumulate unit,
//   res = < addend + x * y >_m     (integer mode)
//   res = < addend + x(t)*y(t) >_{m(t)}  (polynomial mode, "+" is XOR)
// The product is formed by the carry-save dual_field_multiplier, the addend is
// added by a dual_field_adder and the sum is reduced by modular_reduction.
// The unreduced product is also brought out (prod) for the residue-to-binary
// digit chain, which sums products of several units. Inputs x, y and addend are
// R-bit residues; the unit accepts any R-bit values, not only reduced ones.
// Purely combinational; the accumulator register lives in the lane (mac_array).
// The document gives the MAC's role (Eq. (6), (8), Section 5) and its
// CSA/prefix-adder makeup; the internal arrangement is this design's.
module dual_field_mac #(
  parameter int R = 16
) (
  input  logic           fsel,
  input  logic [R-1:0]   x,
  input  logic [R-1:0]   y,
  input  logic [R-1:0]   addend,
  input  logic [R:0]     m,
  output logic [2*R-1:0] prod,
  output logic [R-1:0]   res
);
  localparam int SW = 2*R + 1;

  logic [SW-1:0] sum;
  logic          unused_cout;

  dual_field_multiplier #(.W(R)) u_mul (
    .fsel (fsel),
    .x    (x),
    .y    (y),
    .p    (prod)
  );

  dual_field_adder #(.W(SW)) u_add (
    .fsel (fsel),
    .a    ({1'b0, prod}),
    .b    (SW'(addend)),
    .cin  (1'b0),
    .s    (sum),
    .cout (unused_cout)
  );

  modular_reduction #(.R(R), .XW(SW)) u_red (
    .fsel (fsel),
    .x    (sum),
    .m    (m),
    .r    (res)
  );
endmodule
