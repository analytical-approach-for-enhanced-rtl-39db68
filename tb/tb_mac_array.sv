// tb_mac_array: random-step test of the L = 4 lane MAC array.
//
// Moduli and constant banks are loaded with random values for one field at a
// time (prime-sized integers below 2^16, or degree-16 polynomials). Then
// thousands of random mac_ctrl_t steps are applied: every operand source,
// addend, register, constant, broadcast lane and lane-enable mask. A shadow
// model of the registers and accumulators computes each lane's expected
// <addend + X*Y>_{m_j} with dramm_ref_pkg; the products, the broadcast
// register outputs and the state after each clock are compared. The
// channel-wise product of Eq. (1) is one of the random step kinds.
module tb_mac_array;
  import dramm_pkg::*;
  import dramm_ref_pkg::*;
  localparam int L = 4;
  localparam int R = 16;
  localparam int DEPTH = c_depth(L);

  logic            clk = 1'b0, rst_n;
  field_e          fsel;
  mac_ctrl_t       ctl;
  logic [R-1:0]    ext_digit;
  logic            cfg_we;
  logic [LIW-1:0]  cfg_lane;
  logic            cfg_base;
  logic [CIW-1:0]  cfg_addr;
  logic [R:0]      cfg_data;
  logic [2*R-1:0]  prod_o [L];
  logic [R-1:0]    rb_o   [L];
  int checks = 0, failures = 0;

  mac_array #(.L(L), .R(R)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [R-1:0] sh_rf  [L][NREG];
  logic [R-1:0] sh_acc [L];
  logic [R-1:0] sh_c   [L][2][DEPTH];
  logic [R:0]   sh_m   [L][2];
  int n_bcast = 0, n_masked = 0, n_ext = 0, n_rmul = 0;

  task automatic cfg(int j, int b, int a, logic [R:0] d);
    @(negedge clk);
    cfg_we = 1'b1; cfg_lane = LIW'(j); cfg_base = 1'(b); cfg_addr = CIW'(a); cfg_data = d;
    @(posedge clk);
    #1 cfg_we = 1'b0;
  endtask

  task automatic load(bit f);
    for (int j = 0; j < L; j++)
      for (int b = 0; b < 2; b++) begin
        sh_m[j][b] = f ? {1'b1, 16'($urandom)} : {1'b0, 16'($urandom) | 16'h8001};
        cfg(j, b, c_mod(L), sh_m[j][b]);
        for (int a = 0; a < DEPTH; a++) begin
          sh_c[j][b][a] = 16'($urandom);
          cfg(j, b, a, {1'b0, sh_c[j][b][a]});
        end
      end
  endtask

  task automatic expect_eq(big_t got, big_t want, string what);
    checks++;
    if (got !== want) begin failures++; $display("FAIL %s: %h vs %h at %0t", what, got, want, $time); end
  endtask

  task automatic steps(bit f, int n);
    for (int t = 0; t < n; t++) begin
      logic [R-1:0] x, y, a, res [L];
      logic [R-1:0] bc;
      @(negedge clk);
      fsel = field_e'(f);
      ctl.valid   = ($urandom % 4) != 0;
      ctl.base    = 1'($urandom);
      ctl.xsel    = xsel_e'($urandom % 3);
      ctl.ysel    = ysel_e'($urandom % 2);
      ctl.asel    = asel_e'($urandom % 3);
      ctl.rx      = RIW'($urandom); ctl.ry = RIW'($urandom); ctl.ra = RIW'($urandom);
      ctl.rd      = RIW'($urandom); ctl.rb = RIW'($urandom);
      ctl.wr      = ($urandom % 4) != 0;
      ctl.cidx    = CIW'($urandom % DEPTH);
      ctl.bsel    = LIW'($urandom % L);
      ctl.lane_en = MAXL'($urandom);
      ext_digit   = 16'($urandom);
      if (t % 5 == 0) begin   // Eq. (1): every lane multiplies two of its registers
        ctl.xsel = X_REG; ctl.ysel = Y_REG; ctl.asel = A_ZERO; ctl.lane_en = '1;
        ctl.valid = 1'b1; ctl.wr = 1'b1; n_rmul++;
      end
      if (ctl.xsel == X_BCAST) n_bcast++;
      if (ctl.xsel == X_EXT) n_ext++;
      if (ctl.valid && ctl.lane_en[L-1:0] != '1) n_masked++;
      bc = sh_rf[ctl.bsel][ctl.rb];
      #1;
      for (int j = 0; j < L; j++) begin
        big_t pr;
        x = (ctl.xsel == X_REG) ? sh_rf[j][ctl.rx] : (ctl.xsel == X_BCAST) ? bc : ext_digit;
        y = (ctl.ysel == Y_REG) ? sh_rf[j][ctl.ry] : sh_c[j][ctl.base][ctl.cidx];
        a = (ctl.asel == A_ZERO) ? '0 : (ctl.asel == A_ACC) ? sh_acc[j] : sh_rf[j][ctl.ra];
        pr = fmul(f, big_t'(x), big_t'(y));
        res[j] = R'(f ? pmod(pr ^ big_t'(a), big_t'(sh_m[j][ctl.base]))
                      : (pr + big_t'(a)) % big_t'(sh_m[j][ctl.base]));
        expect_eq(big_t'(prod_o[j]), pr, $sformatf("lane %0d product", j));
        expect_eq(big_t'(rb_o[j]), big_t'(sh_rf[j][ctl.rb]), $sformatf("lane %0d rb", j));
      end
      @(posedge clk);
      for (int j = 0; j < L; j++)
        if (ctl.valid && ctl.lane_en[j]) begin
          sh_acc[j] = res[j];
          if (ctl.wr) sh_rf[j][ctl.rd] = res[j];
        end
      #1;
      expect_eq(big_t'(dut.g_lane[0].acc), big_t'(sh_acc[0]), "lane 0 accumulator");
      expect_eq(big_t'(dut.g_lane[L-1].acc), big_t'(sh_acc[L-1]), "last lane accumulator");
    end
    @(negedge clk);
    ctl.valid = 1'b0;
  endtask

  initial begin
    rst_n = 1'b0; cfg_we = 1'b0; ctl = '0; ext_digit = '0; fsel = FIELD_GFP;
    cfg_lane = '0; cfg_base = 1'b0; cfg_addr = '0; cfg_data = '0;
    for (int j = 0; j < L; j++) begin
      sh_acc[j] = '0;
      for (int k = 0; k < NREG; k++) sh_rf[j][k] = '0;
    end
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    load(1'b0);
    steps(1'b0, 1500);
    load(1'b1);
    steps(1'b1, 1500);
    checks++;
    if (n_bcast == 0 || n_masked == 0 || n_ext == 0 || n_rmul == 0) begin
      failures++; $display("FAIL some step kind never issued");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
