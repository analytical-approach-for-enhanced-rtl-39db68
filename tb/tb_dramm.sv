// tb_dramm: end-to-end test of the dual-field residue modular multiplier at its
// default size (L = 4 channels of R = 16 bits, 64-bit exponent).
//
// For each field, GF(p) with p = 2^61 - 1 and GF(2^63) with p(x) = x^63 + x + 1,
// it loads the moduli and constants computed by dramm_ref_pkg and then:
//   * binary -> residue -> binary round trips, checking the binary result and
//     the mixed-radix digits U_i = floor(z / W_i) mod m_i;
//   * channel-wise products (Eq. 1), checked as x*y mod A;
//   * RNS Montgomery multiplications, checked as c = a*b*Q^-1 (mod p) with
//     c < 2p for integers and c fully reduced for polynomials, including a
//     chained multiplication that consumes the base-B result;
//   * a modular exponentiation in the Montgomery domain, checked against
//     g^e * Q mod p;
// and checks the latency of every command. It counts how often each mechanism
// (field switch, B2R, RMUL, RMM, R2B, EXP square-only and square+multiply
// bits) happened and fails if one never did.
module tb_dramm;
  import dramm_pkg::*;
  import dramm_ref_pkg::*;

  localparam int L  = 4;
  localparam int R  = 16;
  localparam int EW = 64;

  logic            clk = 1'b0;
  logic            rst_n;
  logic            cfg_we;
  logic [LIW-1:0]  cfg_lane;
  logic            cfg_base;
  logic [CIW-1:0]  cfg_addr;
  logic [R:0]      cfg_data;
  logic            cmd_valid, cmd_ready;
  op_e             cmd_op;
  field_e          cmd_fsel;
  logic [1:0]      cmd_dst, cmd_src1, cmd_src2;
  logic [EW-1:0]   cmd_exp;
  logic [R-1:0]    din     [L];
  logic [R-1:0]    dout    [L];
  logic [R-1:0]    dout_mr [L];
  logic            done;

  dramm dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  longint unsigned cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  mods_t ma, mb;
  big_t  p, amod, qmod;
  bit    fld;
  int    n_switch = 0, n_b2r = 0, n_rmul = 0, n_rmm = 0, n_r2b = 0;
  int    n_exp = 0, n_bit0 = 0, n_bit1 = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic setup_field(bit f);
    fld = f;
    if (!f) begin
      ma = '{65521, 65519, 65497, 65479};
      mb = '{65449, 65447, 65437, 65423};
      p  = (big_t'(1) << 61) - 1;
    end else begin
      ma = '{'h1002b, 'h1002d, 'h10039, 'h1003f};
      mb = '{'h10047, 'h10053, 'h1008d, 'h100bd};
      p  = (big_t'(1) << 63) | 3;
    end
    amod = wprod(f, ma, L);
    qmod = wprod(f, mb, L);
    for (int b = 0; b < 2; b++)
      for (int j = 0; j < L; j++)
        for (int idx = 0; idx <= c_mod(L); idx++) begin
          big_t v = b ? make_const(f, L, R, mb, ma, p, j, idx)
                      : make_const(f, L, R, ma, mb, p, j, idx);
          @(negedge clk);
          cfg_we   = 1'b1;
          cfg_lane = LIW'(j);
          cfg_base = b[0];
          cfg_addr = CIW'(idx);
          cfg_data = v[R:0];
        end
    @(negedge clk);
    cfg_we = 1'b0;
    n_switch++;
  endtask

  // issue one command and wait for done; returns the latency in clocks
  task automatic run(op_e op, logic [1:0] dst, logic [1:0] s1, logic [1:0] s2,
                     logic [EW-1:0] e, big_t z, int exp_lat);
    longint unsigned t0;
    @(negedge clk);
    for (int i = 0; i < L; i++) din[i] = z[i*R +: R];
    cmd_valid = 1'b1;
    cmd_op    = op;
    cmd_fsel  = field_e'(fld);
    cmd_dst   = dst;
    cmd_src1  = s1;
    cmd_src2  = s2;
    cmd_exp   = e;
    @(posedge clk);
    t0 = cycle;
    @(negedge clk);
    cmd_valid = 1'b0;
    do @(posedge clk); while (!done);
    check(int'(cycle - t0) == exp_lat + 1,
          $sformatf("%s latency %0d, expected %0d", op.name(), cycle - t0, exp_lat + 1));
  endtask

  localparam int LAT_RMM = 4*L + 5;

  task automatic b2r(logic [1:0] pair, big_t z);
    run(OP_B2R, pair, 2'd0, 2'd0, '0, z, 2*L);
    n_b2r++;
  endtask

  task automatic r2b(logic [1:0] pair, output big_t z);
    run(OP_R2B, 2'd0, pair, 2'd0, '0, '0, 2*L);
    z = '0;
    for (int i = 0; i < L; i++) z[i*R +: R] = dout[i];
    n_r2b++;
  endtask

  function automatic big_t rand64();
    return {$urandom, $urandom};
  endfunction

  // reference Montgomery product: a*b*Q^-1 mod p
  function automatic big_t mont(big_t a, big_t b);
    return fmulmod(fld, fmul(fld, a, b), finv(fld, fmod(fld, qmod, p), p), p);
  endfunction

  function automatic big_t rand_elem2p();   // < 2p (integers), degree < deg p
    return fld ? fmod(1, rand64(), p) : rand64() % (2*p);
  endfunction

  task automatic check_mont(big_t c, big_t a, big_t b, string what);
    if (!fld) check(c < 2*p && (c % p) == mont(a, b), what);
    else      check(c == mont(a, b), what);
  endtask

  task automatic field_tests(bit f);
    big_t z, x, y, a, b, c, c2, g, res, expect_v;
    logic [EW-1:0] e;
    setup_field(f);
    // round trips
    for (int t = 0; t < 4; t++) begin
      z = f ? rand64() : rand64() % amod;
      if (t == 0) z = f ? amod ^ (big_t'(1) << 64) : amod - 1;   // largest value
      b2r(2'd0, z);
      r2b(2'd0, x);
      check(x == z, $sformatf("f%0d round trip %h -> %h", f, z, x));
      for (int i = 0; i < L; i++)
        check(dout_mr[i] == fmod(f, fdiv(f, z, wprod(f, ma, i)), ma[i]),
              $sformatf("f%0d mixed-radix digit %0d", f, i));
    end
    // channel-wise product
    for (int t = 0; t < 4; t++) begin
      x = f ? rand64() : rand64() % amod;
      y = f ? rand64() : rand64() % amod;
      b2r(2'd0, x);
      b2r(2'd1, y);
      run(OP_RMUL, 2'd2, 2'd0, 2'd1, '0, '0, 2);
      n_rmul++;
      r2b(2'd2, z);
      check(z == fmod(f, fmul(f, x, y), amod), $sformatf("f%0d RMUL", f));
    end
    // Montgomery products, chained through the base-B result
    for (int t = 0; t < 4; t++) begin
      a = rand_elem2p();
      b = rand_elem2p();
      b2r(2'd0, a);
      b2r(2'd1, b);
      run(OP_RMM, 2'd2, 2'd0, 2'd1, '0, '0, LAT_RMM);
      n_rmm++;
      r2b(2'd2, c);
      check_mont(c, a, b, $sformatf("f%0d RMM", f));
      run(OP_RMM, 2'd2, 2'd2, 2'd0, '0, '0, LAT_RMM);
      n_rmm++;
      r2b(2'd2, c2);
      check_mont(c2, c, a, $sformatf("f%0d chained RMM", f));
    end
    // exponentiation in the Montgomery domain
    for (int t = 0; t < 2; t++) begin
      int ones;
      g = fld ? fmod(1, rand64(), p) : rand64() % p;
      e = rand64();
      if (t == 1) e = 64'h8000_0000_0000_0005;
      ones = $countones(e);
      b2r(2'd0, fmulmod(f, g, qmod, p));   // g in Montgomery form
      b2r(2'd2, fmod(f, qmod, p));         // one in Montgomery form
      run(OP_EXP, 2'd2, 2'd0, 2'd0, e, '0, LAT_RMM * (EW + ones));
      n_exp++;
      n_bit1 += ones;
      n_bit0 += EW - ones;
      r2b(2'd2, res);
      expect_v = fmulmod(f, fpow(f, g, e, p), qmod, p);
      check(fmod(f, res, p) == expect_v && (f ? res == expect_v : res < 2*p),
            $sformatf("f%0d EXP", f));
    end
  endtask

  initial begin
    rst_n = 1'b0;
    cfg_we = 1'b0;
    cmd_valid = 1'b0;
    cmd_op = OP_B2R;
    cmd_fsel = FIELD_GFP;
    cmd_dst = '0; cmd_src1 = '0; cmd_src2 = '0; cmd_exp = '0;
    cfg_lane = '0; cfg_base = 1'b0; cfg_addr = '0; cfg_data = '0;
    for (int i = 0; i < L; i++) din[i] = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    field_tests(1'b0);
    field_tests(1'b1);
    field_tests(1'b0);   // switch back: constants reloaded, integer mode again
    $display("mechanisms: field switches %0d, B2R %0d, RMUL %0d, RMM %0d, R2B %0d, EXP %0d (bits 0: %0d, 1: %0d)",
             n_switch, n_b2r, n_rmul, n_rmm, n_r2b, n_exp, n_bit0, n_bit1);
    check(n_switch >= 3 && n_b2r > 0 && n_rmul > 0 && n_rmm > 0 && n_r2b > 0 &&
          n_exp > 0 && n_bit0 > 0 && n_bit1 > 0, "every mechanism exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
