// tb_dual_field_multiplier: checks the 16 x 16 dual-field multiplier against
// the integer product and against a carry-less product computed bit by bit.
module tb_dual_field_multiplier;
  localparam int W = 16;
  logic           fsel;
  logic [W-1:0]   x, y;
  logic [2*W-1:0] p;
  int checks = 0, failures = 0;

  dual_field_multiplier #(.W(W)) dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [2*W-1:0] clmul16(logic [W-1:0] a, logic [W-1:0] b);
    logic [2*W-1:0] r = '0;
    for (int k = 0; k < W; k++) if (b[k]) r ^= (2*W)'(a) << k;
    return r;
  endfunction

  task automatic one(logic f, logic [W-1:0] a, logic [W-1:0] b);
    logic [2*W-1:0] ref_v;
    fsel = f; x = a; y = b;
    #1;
    ref_v = f ? clmul16(a, b) : (2*W)'(a) * (2*W)'(b);
    checks++;
    if (p !== ref_v) begin
      failures++;
      $display("FAIL f=%0d %h * %h -> %h, expected %h", f, a, b, p, ref_v);
    end
  endtask

  initial begin
    one(0, '1, '1);
    one(1, '1, '1);
    one(0, 16'h8000, 16'h8000);
    for (int i = 0; i < 3000; i++) one(1'($urandom), 16'($urandom), 16'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
