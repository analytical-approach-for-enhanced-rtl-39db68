// r2b_column: residue-to-binary digit chain (Section 5.2 of the method).
//
// The weighted value z = sum_i U_i * W_i is produced one radix-2^R digit per
// step. In step k lane i forms the product U_i * W_i^(k), where W_i^(k) is
// digit k of W_i. The products are added along a chain of dual_field_adders,
// lane 0 first, together with the carry kept from step k-1. The low R bits
// of that sum are digit z^(k); the rest is the carry into step k+1. In
// polynomial mode the adders are XORs, and the high half of each carry-less
// product is the part that moves into the next digit.
// Interface: step (one digit per cycle while high), clear (drop the carry;
// assert together with the first step), prods (the L lane products), digit
// (combinational, valid in the cycle step is high).
// The document describes the chain of MACs passing partial sums and the last
// one giving a digit; registering only the carry between digits is this
// design's choice.
module r2b_column #(
  parameter int L = 4,
  parameter int R = 16
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           fsel,
  input  logic           step,
  input  logic           clear,
  input  logic [2*R-1:0] prods [L],
  output logic [R-1:0]   digit
);
  localparam int CW = 2*R + $clog2(L) + 2;

  logic [CW-1:0] carry_q, carry_in;
  logic [CW-1:0] part [L+1];
  logic          unused_cout [L];

  assign carry_in = clear ? '0 : carry_q;
  assign part[0]  = carry_in;

  for (genvar i = 0; i < L; i++) begin : g_chain
    dual_field_adder #(.W(CW)) u_add (
      .fsel (fsel),
      .a    (part[i]),
      .b    (CW'(prods[i])),
      .cin  (1'b0),
      .s    (part[i+1]),
      .cout (unused_cout[i])
    );
  end

  assign digit = part[L][R-1:0];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    carry_q <= '0;
    else if (step) carry_q <= part[L] >> R;
  end
endmodule
