// mux_logic: operand selection in front of one lane's MAC unit.
//
// Picks the multiplier operand X (lane register, broadcast bus from another
// lane, or the external binary digit), the operand Y (lane register or a
// precomputed constant) and the addend (zero, the lane accumulator or a lane
// register), under control of the xsel/ysel/asel codes of dramm_pkg. These
// choices are what let one MAC array perform binary-to-residue conversion,
// channel-wise multiplication, mixed-radix conversion and base extension. The
// document names this mux logic only; the operand set is this design's.
// Purely combinational.
module mux_logic
  import dramm_pkg::*;
#(
  parameter int R = 16
) (
  input  xsel_e        xsel,
  input  ysel_e        ysel,
  input  asel_e        asel,
  input  logic [R-1:0] reg_x,
  input  logic [R-1:0] reg_y,
  input  logic [R-1:0] reg_a,
  input  logic [R-1:0] bcast,
  input  logic [R-1:0] ext,
  input  logic [R-1:0] cnst,
  input  logic [R-1:0] acc,
  output logic [R-1:0] x,
  output logic [R-1:0] y,
  output logic [R-1:0] addend
);
  always_comb begin
    unique case (xsel)
      X_REG:   x = reg_x;
      X_BCAST: x = bcast;
      X_EXT:   x = ext;
      default: x = '0;
    endcase
    y = (ysel == Y_CONST) ? cnst : reg_y;
    unique case (asel)
      A_ZERO:  addend = '0;
      A_ACC:   addend = acc;
      A_REG:   addend = reg_a;
      default: addend = '0;
    endcase
  end
endmodule
