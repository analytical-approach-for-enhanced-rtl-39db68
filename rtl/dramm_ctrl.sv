// dramm_ctrl: command sequencer of the dual-field residue modular multiplier.
//
// It turns one host command into a sequence of lane-array steps (mac_ctrl_t),
// one per clock. Registers are addressed in pairs: pair k is register 2k
// (residues in base A) and 2k+1 (residues in base B); pair 3 is scratch.
//
//   OP_B2R  : pair dst <- binary input, L MAC steps per base   (Eq. 6 / 8)
//   OP_RMUL : pair dst <- pair src1 (x) pair src2, one step per base (Eq. 1)
//   OP_RMM  : pair dst <- src1 * src2 * Q^-1 mod p               (Algorithm 2)
//             1  s_A, s_B   <- a*b in each base            2 steps
//             2  t_B        <- s_B * <-p^-1>_B             1 step
//             3  t_A        <- t_B: MRC in base B (L steps), then
//                              evaluation in base A (L steps)
//             4,5 v_A       <- s_A + t_A * p_A             1 step
//             6  c_A        <- v_A * <Q^-1>_A              1 step
//             7  c_B        <- c_A: MRC in base A + evaluation in base B
//             Latency 4L+5 steps.
//   OP_R2B  : MRC of the base-A residues of pair src1 (L steps), then L steps
//             of the residue-to-binary digit chain; the mixed-radix digits and
//             the binary digits are handed to the top level.
//   OP_EXP  : pair dst <- dst * src1^e (Montgomery domain), scanning the EW-bit
//             exponent from its top bit: an RMM square per bit and an RMM
//             multiply per one bit.
//
// MRC (Eq. 3/4, with the missing inverse weights restored): step 0 sets every
// lane to z_j * <W_j^-1>; step i (i >= 1) broadcasts the finished digit U_{i-1}
// from lane i-1 and lanes j >= i add U_{i-1} * <-W_{i-1} W_j^-1>_{m_j}. After
// L steps lane i holds U_i. Base extension then forms
// sum_i U_i * <W_i>_{m'_j} in the other base, one broadcast digit per step.
//
// Handshake: a command is taken when cmd_valid and cmd_ready are both high;
// cmd_ready is high only in idle. done pulses for one cycle when the command's
// last result is written. ext_sel and r2b_idx are lane-index wide (LIW bits)
// but count only to L-1, so their top bits stay zero at L = 4. The command set, the register pairing and the
// exponentiation loop are this design's choices; the document lists the
// operations and gives the algorithms.
module dramm_ctrl
  import dramm_pkg::*;
#(
  parameter int L  = 4,
  parameter int EW = 64
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            cmd_valid,
  output logic            cmd_ready,
  input  op_e             cmd_op,
  input  field_e          cmd_fsel,
  input  logic [1:0]      cmd_dst,
  input  logic [1:0]      cmd_src1,
  input  logic [1:0]      cmd_src2,
  input  logic [EW-1:0]   cmd_exp,
  output field_e          fsel,
  output mac_ctrl_t       ctl,
  output logic [LIW-1:0]  ext_sel,     // index of the binary input digit on ext_digit
  output logic            r2b_step,
  output logic            r2b_clear,
  output logic [LIW-1:0]  r2b_idx,     // binary output digit produced this cycle
  output logic            mr_capture,  // mixed-radix digits are on the rb outputs
  output logic            done
);
  typedef enum logic [4:0] {
    PH_IDLE, PH_B2R_A, PH_B2R_B, PH_MUL_A, PH_MUL_B,
    PH_RMM_SA, PH_RMM_SB, PH_RMM_TB, PH_MRC1, PH_BEXT1, PH_RMM_V, PH_RMM_C,
    PH_MRC2, PH_BEXT2, PH_R2B_MRC, PH_R2B_DIG
  } phase_e;

  localparam int SW = $clog2(L) + 1;
  localparam int BW = (EW > 1) ? $clog2(EW) : 1;
  localparam logic [SW-1:0] LAST = SW'(L - 1);

  phase_e            phase;
  logic [SW-1:0]     step;
  op_e               op_q;
  logic [1:0]        dst_q, src1_q, src2_q;
  logic [1:0]        rs1_q, rs2_q;       // operands of the RMM in progress
  logic [EW-1:0]     exp_q;
  logic [BW-1:0]     bit_q;
  logic              mul_q;              // the RMM in progress is an EXP multiply

  assign cmd_ready = (phase == PH_IDLE);

  function automatic logic [RIW-1:0] ra_of(logic [1:0] pair, logic b);
    return {pair, b};
  endfunction

  function automatic logic [MAXL-1:0] lanes_from(logic [SW-1:0] first);
    logic [MAXL-1:0] m;
    for (int j = 0; j < MAXL; j++) m[j] = (j < L) && (j >= int'(first));
    return m;
  endfunction

  // ---------------------------------------------------------------- steps
  always_comb begin
    ctl          = '0;
    ctl.xsel     = X_REG;
    ctl.ysel     = Y_REG;
    ctl.asel     = A_ZERO;
    ctl.lane_en  = lanes_from('0);
    ext_sel      = LIW'(step);
    r2b_step     = 1'b0;
    r2b_clear    = 1'b0;
    r2b_idx      = LIW'(step);
    mr_capture   = 1'b0;
    unique case (phase)
      PH_B2R_A, PH_B2R_B: begin
        ctl.valid = 1'b1;
        ctl.base  = (phase == PH_B2R_B);
        ctl.xsel  = X_EXT;
        ctl.ysel  = Y_CONST;
        ctl.cidx  = CIW'(c_pow(int'(step)));
        ctl.asel  = (step == 0) ? A_ZERO : A_ACC;
        ctl.wr    = (step == LAST);
        ctl.rd    = ra_of(dst_q, ctl.base);
      end
      PH_MUL_A, PH_MUL_B: begin
        ctl.valid = 1'b1;
        ctl.base  = (phase == PH_MUL_B);
        ctl.rx    = ra_of(src1_q, ctl.base);
        ctl.ry    = ra_of(src2_q, ctl.base);
        ctl.wr    = 1'b1;
        ctl.rd    = ra_of(dst_q, ctl.base);
      end
      PH_RMM_SA, PH_RMM_SB: begin
        ctl.valid = 1'b1;
        ctl.base  = (phase == PH_RMM_SB);
        ctl.rx    = ra_of(rs1_q, ctl.base);
        ctl.ry    = ra_of(rs2_q, ctl.base);
        ctl.wr    = 1'b1;
        ctl.rd    = ctl.base ? RIW'(R_SCRB) : RIW'(R_SCRA);
      end
      PH_RMM_TB: begin
        ctl.valid = 1'b1;
        ctl.base  = 1'b1;
        ctl.rx    = RIW'(R_SCRB);
        ctl.ysel  = Y_CONST;
        ctl.cidx  = CIW'(c_negpinv(L));
        ctl.wr    = 1'b1;
        ctl.rd    = RIW'(R_SCRB);
      end
      PH_MRC1, PH_MRC2, PH_R2B_MRC: begin
        ctl.valid = 1'b1;
        ctl.base  = (phase == PH_MRC1);
        ctl.ysel  = Y_CONST;
        ctl.wr    = 1'b1;
        ctl.rd    = RIW'(R_SCRB);
        ctl.rb    = RIW'(R_SCRB);
        if (step == 0) begin
          ctl.xsel = X_REG;
          ctl.rx   = (phase == PH_MRC1)  ? RIW'(R_SCRB) :
                     (phase == PH_MRC2)  ? ra_of(dst_q, 1'b0) : ra_of(src1_q, 1'b0);
          ctl.cidx = CIW'(c_mrcinv(L));
          ctl.asel = A_ZERO;
        end else begin
          ctl.xsel    = X_BCAST;
          ctl.bsel    = LIW'(step - 1'b1);
          ctl.cidx    = CIW'(c_mrck(L, int'(step) - 1));
          ctl.asel    = A_ACC;
          ctl.lane_en = lanes_from(step);
        end
      end
      PH_BEXT1, PH_BEXT2: begin
        ctl.valid = 1'b1;
        ctl.base  = (phase == PH_BEXT2);
        ctl.xsel  = X_BCAST;
        ctl.bsel  = LIW'(step);
        ctl.rb    = RIW'(R_SCRB);
        ctl.ysel  = Y_CONST;
        ctl.cidx  = CIW'(c_bext(L, int'(step)));
        ctl.asel  = (step == 0) ? A_ZERO : A_ACC;
        ctl.wr    = (step == LAST);
        ctl.rd    = (phase == PH_BEXT1) ? RIW'(R_SCRB) : ra_of(dst_q, 1'b1);
      end
      PH_RMM_V: begin
        ctl.valid = 1'b1;
        ctl.rx    = RIW'(R_SCRB);
        ctl.ysel  = Y_CONST;
        ctl.cidx  = CIW'(c_pmod(L));
        ctl.asel  = A_REG;
        ctl.ra    = RIW'(R_SCRA);
        ctl.wr    = 1'b1;
        ctl.rd    = RIW'(R_SCRA);
      end
      PH_RMM_C: begin
        ctl.valid = 1'b1;
        ctl.rx    = RIW'(R_SCRA);
        ctl.ysel  = Y_CONST;
        ctl.cidx  = CIW'(c_qinv(L));
        ctl.wr    = 1'b1;
        ctl.rd    = ra_of(dst_q, 1'b0);
      end
      PH_R2B_DIG: begin
        ctl.rx     = RIW'(R_SCRB);
        ctl.rb     = RIW'(R_SCRB);
        ctl.ysel   = Y_CONST;
        ctl.cidx   = CIW'(c_wdig(L, int'(step)));
        r2b_step   = 1'b1;
        r2b_clear  = (step == 0);
        mr_capture = (step == 0);
      end
      default: ;
    endcase
  end

  // ---------------------------------------------------------------- sequence
  logic last_step;
  assign last_step = (step == LAST);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      phase  <= PH_IDLE;
      step   <= '0;
      op_q   <= OP_B2R;
      fsel   <= FIELD_GFP;
      dst_q  <= '0;
      src1_q <= '0;
      src2_q <= '0;
      rs1_q  <= '0;
      rs2_q  <= '0;
      exp_q  <= '0;
      bit_q  <= '0;
      mul_q  <= 1'b0;
      done   <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (phase)
        PH_IDLE: begin
          step <= '0;
          if (cmd_valid) begin
            op_q   <= cmd_op;
            fsel   <= cmd_fsel;
            dst_q  <= cmd_dst;
            src1_q <= cmd_src1;
            src2_q <= cmd_src2;
            exp_q  <= cmd_exp;
            bit_q  <= BW'(EW - 1);
            mul_q  <= 1'b0;
            unique case (cmd_op)
              OP_B2R:  phase <= PH_B2R_A;
              OP_RMUL: phase <= PH_MUL_A;
              OP_RMM: begin
                rs1_q <= cmd_src1;
                rs2_q <= cmd_src2;
                phase <= PH_RMM_SA;
              end
              OP_R2B:  phase <= PH_R2B_MRC;
              OP_EXP: begin
                rs1_q <= cmd_dst;
                rs2_q <= cmd_dst;
                phase <= PH_RMM_SA;
              end
              default: phase <= PH_IDLE;
            endcase
          end
        end
        PH_B2R_A:  if (last_step) begin step <= '0; phase <= PH_B2R_B; end
                   else step <= step + 1'b1;
        PH_B2R_B:  if (last_step) begin step <= '0; phase <= PH_IDLE; done <= 1'b1; end
                   else step <= step + 1'b1;
        PH_MUL_A:  phase <= PH_MUL_B;
        PH_MUL_B:  begin phase <= PH_IDLE; done <= 1'b1; end
        PH_RMM_SA: phase <= PH_RMM_SB;
        PH_RMM_SB: phase <= PH_RMM_TB;
        PH_RMM_TB: phase <= PH_MRC1;
        PH_MRC1:   if (last_step) begin step <= '0; phase <= PH_BEXT1; end
                   else step <= step + 1'b1;
        PH_BEXT1:  if (last_step) begin step <= '0; phase <= PH_RMM_V; end
                   else step <= step + 1'b1;
        PH_RMM_V:  phase <= PH_RMM_C;
        PH_RMM_C:  phase <= PH_MRC2;
        PH_MRC2:   if (last_step) begin step <= '0; phase <= PH_BEXT2; end
                   else step <= step + 1'b1;
        PH_BEXT2:  if (!last_step) step <= step + 1'b1;
                   else begin
                     step <= '0;
                     if (op_q != OP_EXP) begin
                       phase <= PH_IDLE;
                       done  <= 1'b1;
                     end else if (!mul_q && exp_q[bit_q]) begin
                       // multiply step of square-and-multiply
                       mul_q <= 1'b1;
                       rs1_q <= dst_q;
                       rs2_q <= src1_q;
                       phase <= PH_RMM_SA;
                     end else if (bit_q == '0) begin
                       phase <= PH_IDLE;
                       done  <= 1'b1;
                     end else begin
                       mul_q <= 1'b0;
                       bit_q <= bit_q - 1'b1;
                       rs1_q <= dst_q;
                       rs2_q <= dst_q;
                       phase <= PH_RMM_SA;
                     end
                   end
        PH_R2B_MRC: if (last_step) begin step <= '0; phase <= PH_R2B_DIG; end
                    else step <= step + 1'b1;
        PH_R2B_DIG: if (last_step) begin step <= '0; phase <= PH_IDLE; done <= 1'b1; end
                    else step <= step + 1'b1;
        default:   phase <= PH_IDLE;
      endcase
    end
  end

  // a command never starts while another is running
  a_one_cmd: assert property (@(posedge clk) disable iff (!rst_n)
                              done |-> cmd_ready);
  a_step_range: assert property (@(posedge clk) disable iff (!rst_n)
                                 int'(step) < L);
endmodule
