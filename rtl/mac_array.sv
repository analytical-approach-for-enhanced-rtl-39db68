// mac_array: the L parallel residue lanes ("four MAC" for L = 4).
//
// Lane j owns one dual_field_mac, its operand mux_logic, an accumulator, a
// register file of NREG residues and two host-loaded banks of constants and
// moduli, bank 0 for base A (modulus a_j) and bank 1 for base B (modulus b_j).
// Every cycle the controller issues one mac_ctrl_t step to all lanes at once:
// each enabled lane computes < addend + X * Y >_{m_j} with its own modulus and
// its own constants, and, when ctl.valid is set, stores the result in its
// accumulator and, when ctl.wr is set, in register rd. This one step, applied
// L times with different operand selections, gives Eq. (1) (channel-wise
// products), Eq. (6)/(8) (binary-to-residue), the MRC of Eq. (3)/(4) and base
// extension.
// The broadcast bus carries register rb of lane bsel to every lane (used to
// spread a mixed-radix digit U_i). prod_o exposes each lane's unreduced product
// for the residue-to-binary digit chain; rb_o exposes register rb of every lane.
// Configuration: cfg_we writes cfg_data into lane cfg_lane, bank cfg_base,
// entry cfg_addr (entry c_mod(L) is the modulus, R+1 bits; others are R bits).
// Timing: one step per clock, results visible the cycle after the step.
// Reset clears accumulators and registers; constants are not reset and must be
// loaded before use. Lane count and bank contents follow the document's
// algorithms; storage organisation is this design's.
module mac_array
  import dramm_pkg::*;
#(
  parameter int L = 4,
  parameter int R = 16
) (
  input  logic               clk,
  input  logic               rst_n,
  input  field_e             fsel,
  input  mac_ctrl_t          ctl,
  input  logic [R-1:0]       ext_digit,
  input  logic               cfg_we,
  input  logic [LIW-1:0]     cfg_lane,
  input  logic               cfg_base,
  input  logic [CIW-1:0]     cfg_addr,
  input  logic [R:0]         cfg_data,
  output logic [2*R-1:0]     prod_o [L],
  output logic [R-1:0]       rb_o   [L]
);
  localparam int DEPTH = c_depth(L);
  localparam int MODA  = c_mod(L);
  localparam int AW    = $clog2(DEPTH);

  logic [R-1:0] bcast;
  logic [R-1:0] regs_rb [L];

  always_comb begin
    bcast = '0;
    for (int j = 0; j < L; j++)
      if (ctl.bsel == LIW'(j)) bcast = regs_rb[j];
  end

  for (genvar j = 0; j < L; j++) begin : g_lane
    logic [R-1:0] cbank [2][DEPTH];
    logic [R:0]   modr  [2];
    logic [R-1:0] rf    [NREG];
    logic [R-1:0] acc;
    logic [R-1:0] mx, my, ma, res, cval;

    assign cval       = (int'(ctl.cidx) < DEPTH) ? cbank[ctl.base][ctl.cidx[AW-1:0]] : '0;
    assign regs_rb[j] = rf[ctl.rb];
    assign rb_o[j]    = rf[ctl.rb];

    mux_logic #(.R(R)) u_mux (
      .xsel   (ctl.xsel),
      .ysel   (ctl.ysel),
      .asel   (ctl.asel),
      .reg_x  (rf[ctl.rx]),
      .reg_y  (rf[ctl.ry]),
      .reg_a  (rf[ctl.ra]),
      .bcast  (bcast),
      .ext    (ext_digit),
      .cnst   (cval),
      .acc    (acc),
      .x      (mx),
      .y      (my),
      .addend (ma)
    );

    dual_field_mac #(.R(R)) u_mac (
      .fsel   (fsel),
      .x      (mx),
      .y      (my),
      .addend (ma),
      .m      (modr[ctl.base]),
      .prod   (prod_o[j]),
      .res    (res)
    );

    // constant banks and moduli: written by the host only
    always_ff @(posedge clk) begin
      if (cfg_we && cfg_lane == LIW'(j)) begin
        if (int'(cfg_addr) == MODA)      modr[cfg_base] <= cfg_data;
        else if (int'(cfg_addr) < DEPTH) cbank[cfg_base][cfg_addr[AW-1:0]] <= cfg_data[R-1:0];
      end
    end

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        acc <= '0;
        for (int k = 0; k < NREG; k++) rf[k] <= '0;
      end else if (ctl.valid && ctl.lane_en[j]) begin
        acc <= res;
        if (ctl.wr) rf[ctl.rd] <= res;
      end
    end
  end
endmodule
