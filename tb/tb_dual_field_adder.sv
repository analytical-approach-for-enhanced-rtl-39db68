// tb_dual_field_adder: random and corner-case check of the dual-field prefix
// adder at W = 32 against a + b + cin (integer mode) and a ^ b (polynomial
// mode, carry out zero).
module tb_dual_field_adder;
  localparam int W = 32;
  logic         fsel, cin, cout;
  logic [W-1:0] a, b, s;
  int checks = 0, failures = 0;

  dual_field_adder #(.W(W)) dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic one(logic f, logic [W-1:0] x, logic [W-1:0] y, logic c);
    logic [W:0] ref_v;
    fsel = f; a = x; b = y; cin = c;
    #1;
    ref_v = f ? {1'b0, x ^ y} : {1'b0, x} + {1'b0, y} + (W+1)'(c);
    checks++;
    if ({cout, s} !== ref_v) begin
      failures++;
      $display("FAIL f=%0d %h + %h + %0d -> %h, expected %h", f, x, y, c, {cout, s}, ref_v);
    end
  endtask

  initial begin
    one(0, '1, 32'd1, 1'b0);
    one(0, '1, '1, 1'b1);
    one(1, '1, '1, 1'b1);
    one(0, 32'h8000_0000, 32'h8000_0000, 1'b0);
    for (int i = 0; i < 2000; i++)
      one(1'($urandom), $urandom, $urandom, 1'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
