// dramm: dual-field residue arithmetic modular multiplier (top level).
//
// Large-operand modular arithmetic over GF(p) (integers) or GF(2^n)
// (polynomials over GF(2)) is split into L independent R-bit residue channels,
// so that multiplication needs no carries between channels. The same L
// dual-field MAC lanes perform every operation: conversion of an L-digit
// binary operand into residues, channel-wise multiplication, RNS Montgomery
// multiplication with base extension by mixed-radix conversion (MRC),
// conversion back to binary, and modular exponentiation. The field is chosen
// per command by cmd_fsel; in polynomial mode all carries are suppressed.
//
// Blocks: dramm_ctrl (sequencer), mac_array (L lanes with mux_logic,
// dual_field_mac = dual_field_multiplier + dual_field_adder +
// modular_reduction), r2b_column (binary digit chain).
//
// Interface
//   cfg_*     host writes of moduli and precomputed constants (see dramm_pkg
//             for the bank layout); load them for the field that will be used.
//   cmd_*     command handshake (valid/ready); din holds the L binary digits
//             (least significant first) for OP_B2R and must stay stable until
//             done.
//   dout      L binary digits of the last OP_R2B, least significant first.
//   dout_mr   the L mixed-radix digits U_1..U_L of the last OP_R2B.
//   done      one-cycle pulse at the end of each command.
// Latencies in clocks from acceptance to done: B2R 2L, RMUL 2, RMM 4L+5,
// R2B 2L, EXP (4L+5) per square and per multiply.
// Defaults: L = 4 channels (four MAC units, as in the document's test);
// R = 16-bit channels and a 64-bit exponent are this design's choices.
module dramm
  import dramm_pkg::*;
#(
  parameter int L  = 4,
  parameter int R  = 16,
  parameter int EW = 64
) (
  input  logic            clk,
  input  logic            rst_n,
  // configuration
  input  logic            cfg_we,
  input  logic [LIW-1:0]  cfg_lane,
  input  logic            cfg_base,
  input  logic [CIW-1:0]  cfg_addr,
  input  logic [R:0]      cfg_data,
  // command
  input  logic            cmd_valid,
  output logic            cmd_ready,
  input  op_e             cmd_op,
  input  field_e          cmd_fsel,
  input  logic [1:0]      cmd_dst,
  input  logic [1:0]      cmd_src1,
  input  logic [1:0]      cmd_src2,
  input  logic [EW-1:0]   cmd_exp,
  input  logic [R-1:0]    din     [L],
  output logic [R-1:0]    dout    [L],
  output logic [R-1:0]    dout_mr [L],
  output logic            done
);
  field_e          fsel;
  mac_ctrl_t       ctl;
  logic [LIW-1:0]  ext_sel, r2b_idx;
  logic            r2b_step, r2b_clear, mr_capture;
  logic [R-1:0]    ext_digit, digit;
  logic [2*R-1:0]  prods [L];
  logic [R-1:0]    rb    [L];

  dramm_ctrl #(.L(L), .EW(EW)) u_ctrl (
    .clk        (clk),
    .rst_n      (rst_n),
    .cmd_valid  (cmd_valid),
    .cmd_ready  (cmd_ready),
    .cmd_op     (cmd_op),
    .cmd_fsel   (cmd_fsel),
    .cmd_dst    (cmd_dst),
    .cmd_src1   (cmd_src1),
    .cmd_src2   (cmd_src2),
    .cmd_exp    (cmd_exp),
    .fsel       (fsel),
    .ctl        (ctl),
    .ext_sel    (ext_sel),
    .r2b_step   (r2b_step),
    .r2b_clear  (r2b_clear),
    .r2b_idx    (r2b_idx),
    .mr_capture (mr_capture),
    .done       (done)
  );

  always_comb begin
    ext_digit = '0;
    for (int i = 0; i < L; i++)
      if (ext_sel == LIW'(i)) ext_digit = din[i];
  end

  mac_array #(.L(L), .R(R)) u_array (
    .clk       (clk),
    .rst_n     (rst_n),
    .fsel      (fsel),
    .ctl       (ctl),
    .ext_digit (ext_digit),
    .cfg_we    (cfg_we),
    .cfg_lane  (cfg_lane),
    .cfg_base  (cfg_base),
    .cfg_addr  (cfg_addr),
    .cfg_data  (cfg_data),
    .prod_o    (prods),
    .rb_o      (rb)
  );

  r2b_column #(.L(L), .R(R)) u_r2b (
    .clk    (clk),
    .rst_n  (rst_n),
    .fsel   (fsel),
    .step   (r2b_step),
    .clear  (r2b_clear),
    .prods  (prods),
    .digit  (digit)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < L; i++) begin
        dout[i]    <= '0;
        dout_mr[i] <= '0;
      end
    end else begin
      if (r2b_step)
        for (int i = 0; i < L; i++)
          if (r2b_idx == LIW'(i)) dout[i] <= digit;
      if (mr_capture)
        for (int i = 0; i < L; i++) dout_mr[i] <= rb[i];
    end
  end

  // the host may only issue a command when the unit is idle
  a_cmd_when_ready: assert property (@(posedge clk) disable iff (!rst_n)
                                     cmd_valid |-> cmd_ready);
endmodule
