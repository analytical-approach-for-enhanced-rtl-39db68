// dual_field_multiplier: W x W dual-field multiplier.
//
// GF(p) mode (fsel = 0): p = x * y as unsigned integers (2W bits).
// GF(2^n) mode (fsel = 1): p = x(t) * y(t) over GF(2), the carry-less product
// (degree at most 2W-2, returned in 2W bits).
// The W partial products x & y[i] are accumulated in carry-save form by a chain
// of 3:2 compressors; in polynomial mode the compressor carries are forced to
// zero so that each compressor degenerates into an XOR. A final
// dual_field_adder merges the sum and carry vectors. The document states that
// the MAC units use carry-save adders and parallel-prefix adders; the linear
// array shape is this design's choice. Purely combinational.
module dual_field_multiplier #(
  parameter int W = 16
) (
  input  logic           fsel,
  input  logic [W-1:0]   x,
  input  logic [W-1:0]   y,
  output logic [2*W-1:0] p
);
  localparam int PW = 2*W;

  logic [PW-1:0] sv, cv, pp;
  logic [PW-2:0] c3;   // carries out of the top column are dropped: the product fits in PW bits
  logic          unused_cout;

  always_comb begin
    sv = '0;
    cv = '0;
    for (int i = 0; i < W; i++) begin
      pp = '0;
      pp[i +: W] = x & {W{y[i]}};
      // 3:2 carry-save compressor, carries suppressed in GF(2^n) mode
      c3 = ((sv[PW-2:0] & cv[PW-2:0]) | (sv[PW-2:0] & pp[PW-2:0]) |
            (cv[PW-2:0] & pp[PW-2:0])) & {(PW-1){~fsel}};
      sv = sv ^ cv ^ pp;
      cv = {c3, 1'b0};
    end
  end

  dual_field_adder #(.W(PW)) u_cpa (
    .fsel (fsel),
    .a    (sv),
    .b    (cv),
    .cin  (1'b0),
    .s    (p),
    .cout (unused_cout)
  );
endmodule
