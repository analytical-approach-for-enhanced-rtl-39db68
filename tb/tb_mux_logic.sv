// tb_mux_logic: drives distinct values on every source of the MAC operand
// multiplexer and checks that each select code routes the intended one.
module tb_mux_logic;
  import dramm_pkg::*;
  localparam int R = 16;
  xsel_e        xsel;
  ysel_e        ysel;
  asel_e        asel;
  logic [R-1:0] reg_x, reg_y, reg_a, bcast, ext, cnst, acc, x, y, addend;
  int checks = 0, failures = 0;

  mux_logic #(.R(R)) dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_eq(logic [R-1:0] got, logic [R-1:0] want, string what);
    checks++;
    if (got !== want) begin failures++; $display("FAIL %s: %h vs %h", what, got, want); end
  endtask

  initial begin
    for (int i = 0; i < 50; i++) begin
      reg_x = 16'h1000 + 16'(i); reg_y = 16'h2000 + 16'(i); reg_a = 16'h3000 + 16'(i);
      bcast = 16'h4000 + 16'(i); ext = 16'h5000 + 16'(i); cnst = 16'h6000 + 16'(i);
      acc = 16'h7000 + 16'(i);
      xsel = X_REG;   ysel = Y_REG;   asel = A_ZERO; #1;
      expect_eq(x, reg_x, "x reg"); expect_eq(y, reg_y, "y reg"); expect_eq(addend, '0, "a zero");
      xsel = X_BCAST; ysel = Y_CONST; asel = A_ACC;  #1;
      expect_eq(x, bcast, "x bcast"); expect_eq(y, cnst, "y const"); expect_eq(addend, acc, "a acc");
      xsel = X_EXT;   asel = A_REG;   #1;
      expect_eq(x, ext, "x ext"); expect_eq(addend, reg_a, "a reg");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
