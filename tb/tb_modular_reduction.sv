// tb_modular_reduction: checks the dual-field reducer (R = 16, 34-bit input)
// against x % m for random integer moduli below 2^16 and against polynomial
// remainders for random degree-16 moduli computed by dramm_ref_pkg.
module tb_modular_reduction;
  import dramm_ref_pkg::*;
  localparam int R  = 16;
  localparam int XW = 2*R + 2;
  logic          fsel;
  logic [XW-1:0] x;
  logic [R:0]    m;
  logic [R-1:0]  r;
  int checks = 0, failures = 0;

  modular_reduction #(.R(R), .XW(XW)) dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic one(logic f, logic [XW-1:0] a, logic [R:0] md);
    big_t ref_v;
    fsel = f; x = a; m = md;
    #1;
    ref_v = fmod(f, big_t'(a), big_t'(md));
    checks++;
    if (big_t'(r) !== ref_v) begin
      failures++;
      $display("FAIL f=%0d %h mod %h -> %h, expected %h", f, a, md, r, ref_v);
    end
  endtask

  initial begin
    one(0, '1, 17'd65521);
    one(0, '1, 17'd2);
    one(0, 34'd65520, 17'd65521);
    one(1, '1, 17'h1002b);
    // exact multiples of the modulus must reduce to zero
    for (int i = 0; i < 200; i++) begin
      logic [R:0] md;
      md = {1'b0, 16'($urandom) | 16'd2};
      one(0, XW'(md) * XW'(16'($urandom)), md);
    end
    for (int i = 0; i < 3000; i++) begin
      logic [XW-1:0] a;
      a = {2'($urandom), $urandom};
      if (i % 2 == 0) one(0, a, {1'b0, 16'($urandom) | 16'd2});
      else            one(1, a, {1'b1, 16'($urandom)});
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
