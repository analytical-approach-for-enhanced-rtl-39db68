// tb_dramm_ctrl: checks the command sequencer on its own (L = 4, EW = 8).
//
// For each command it records the issued lane steps and checks: the handshake
// (ready only in idle, one done pulse), the latency, the number of MAC steps,
// the field latched with the command, the MRC lane-enable masks (step i
// updates only lanes i..L-1 and broadcasts lane i-1), the base-extension
// broadcast order, the registers that receive the result, and, for OP_EXP,
// that one Montgomery multiplication is issued per exponent bit plus one per
// one bit.
module tb_dramm_ctrl;
  import dramm_pkg::*;
  localparam int L  = 4;
  localparam int EW = 8;

  logic            clk = 1'b0, rst_n;
  logic            cmd_valid, cmd_ready;
  op_e             cmd_op;
  field_e          cmd_fsel;
  logic [1:0]      cmd_dst, cmd_src1, cmd_src2;
  logic [EW-1:0]   cmd_exp;
  field_e          fsel;
  mac_ctrl_t       ctl;
  logic [LIW-1:0]  ext_sel, r2b_idx;
  logic            r2b_step, r2b_clear, mr_capture, done;
  int checks = 0, failures = 0;

  dramm_ctrl #(.L(L), .EW(EW)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_eq(int got, int want, string what);
    checks++;
    if (got != want) begin failures++; $display("FAIL %s: %0d vs %0d", what, got, want); end
  endtask

  // trace of one command
  int n_valid, n_wr_dst_a, n_wr_dst_b, n_r2b, n_mrc_bad, n_bext_bad, n_qinv, lat;
  int bext_i, ext_bad;

  task automatic run(op_e op, field_e f, int dst, int s1, int s2, logic [EW-1:0] e);
    @(negedge clk);
    cmd_valid = 1'b1; cmd_op = op; cmd_fsel = f;
    cmd_dst = 2'(dst); cmd_src1 = 2'(s1); cmd_src2 = 2'(s2); cmd_exp = e;
    checks++;
    if (!cmd_ready) begin failures++; $display("FAIL not ready"); end
    @(posedge clk);
    #1 cmd_valid = 1'b0;
    n_valid = 0; n_wr_dst_a = 0; n_wr_dst_b = 0; n_r2b = 0; n_mrc_bad = 0; n_bext_bad = 0;
    n_qinv = 0; lat = 0; bext_i = 0; ext_bad = 0;
    forever begin
      #1;
      if (done) break;
      lat++;
      if (cmd_ready) begin failures++; checks++; $display("FAIL ready while busy"); end
      if (fsel != f) begin failures++; checks++; $display("FAIL field not latched"); end
      if (ctl.valid) begin
        n_valid++;
        if (ctl.wr && ctl.rd == RIW'(2*dst))     n_wr_dst_a++;
        if (ctl.wr && ctl.rd == RIW'(2*dst + 1)) n_wr_dst_b++;
        if (ctl.ysel == Y_CONST && ctl.cidx == CIW'(c_qinv(L))) n_qinv++;
        if (ctl.xsel == X_EXT && int'(ext_sel) != int'(ctl.cidx)) ext_bad++;
        // MRC step i >= 1: broadcast lane i-1, lanes i.. enabled
        if (ctl.xsel == X_BCAST && int'(ctl.cidx) >= c_mrck(L, 0) && int'(ctl.cidx) < c_bext(L, 0)) begin
          int i = int'(ctl.cidx) - c_mrck(L, 0) + 1;
          for (int j = 0; j < L; j++)
            if (ctl.lane_en[j] != (j >= i)) n_mrc_bad++;
          if (int'(ctl.bsel) != i - 1 || ctl.asel != A_ACC) n_mrc_bad++;
        end
        // base extension: digits broadcast in lane order, all lanes enabled
        if (ctl.xsel == X_BCAST && int'(ctl.cidx) >= c_bext(L, 0) && int'(ctl.cidx) < c_wdig(L, 0)) begin
          if (int'(ctl.bsel) != bext_i || ctl.lane_en[L-1:0] != '1) n_bext_bad++;
          if ((bext_i == 0) != (ctl.asel == A_ZERO)) n_bext_bad++;
          bext_i = (bext_i + 1) % L;
        end
      end
      if (r2b_step) begin
        if (int'(r2b_idx) != n_r2b || r2b_clear != (n_r2b == 0)) n_mrc_bad++;
        n_r2b++;
      end
      @(posedge clk);
    end
    @(posedge clk);
    #1;
    checks++;
    if (done) begin failures++; $display("FAIL done longer than one cycle"); end
  endtask

  localparam int RMM = 4*L + 5;

  initial begin
    rst_n = 1'b0; cmd_valid = 1'b0; cmd_op = OP_B2R; cmd_fsel = FIELD_GFP;
    cmd_dst = '0; cmd_src1 = '0; cmd_src2 = '0; cmd_exp = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int f = 0; f < 2; f++) begin
      run(OP_B2R, field_e'(f), 1, 0, 0, '0);
      expect_eq(lat, 2*L, "B2R latency");    expect_eq(n_valid, 2*L, "B2R steps");
      expect_eq(n_wr_dst_a, 1, "B2R writes A"); expect_eq(n_wr_dst_b, 1, "B2R writes B");
      expect_eq(ext_bad, 0, "B2R digit/constant pairing");
      run(OP_RMUL, field_e'(f), 2, 0, 1, '0);
      expect_eq(lat, 2, "RMUL latency");     expect_eq(n_wr_dst_a, 1, "RMUL A");
      expect_eq(n_wr_dst_b, 1, "RMUL B");
      run(OP_RMM, field_e'(f), 2, 0, 1, '0);
      expect_eq(lat, RMM, "RMM latency");    expect_eq(n_valid, RMM, "RMM steps");
      expect_eq(n_mrc_bad, 0, "RMM MRC masks"); expect_eq(n_bext_bad, 0, "RMM base extension");
      expect_eq(n_wr_dst_a, 1, "RMM c_A");   expect_eq(n_wr_dst_b, 1, "RMM c_B");
      expect_eq(n_qinv, 1, "RMM Q^-1 step");
      run(OP_R2B, field_e'(f), 0, 2, 0, '0);
      expect_eq(lat, 2*L, "R2B latency");    expect_eq(n_valid, L, "R2B MRC steps");
      expect_eq(n_r2b, L, "R2B digits");     expect_eq(n_mrc_bad, 0, "R2B MRC masks");
      run(OP_EXP, field_e'(f), 2, 0, 0, 8'b1010_0011);
      expect_eq(n_qinv, EW + 4, "EXP multiplications");
      expect_eq(lat, RMM * (EW + 4), "EXP latency");
      expect_eq(n_mrc_bad, 0, "EXP MRC masks");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
