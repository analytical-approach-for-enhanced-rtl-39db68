// tb_r2b_column: feeds the digit chain with L random products per step for
// L steps and checks that the digits spell out the sum of all products
// weighted by 2^(R*k) (integers) or x^(R*k) (polynomials, XOR sums).
module tb_r2b_column;
  import dramm_ref_pkg::*;
  localparam int L = 4;
  localparam int R = 16;
  logic           clk = 1'b0, rst_n, fsel, step, clear;
  logic [2*R-1:0] prods [L];
  logic [R-1:0]   digit;
  int checks = 0, failures = 0;

  r2b_column #(.L(L), .R(R)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 1'b0; step = 1'b0; clear = 1'b0; fsel = 1'b0;
    for (int i = 0; i < L; i++) prods[i] = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 200; t++) begin
      big_t total, got;
      bit f;
      int nk;
      total = '0; got = '0; f = 1'(t);
      // L digit steps, sometimes two more to flush the carry; a run that
      // stops early leaves a carry behind that the next clear must drop
      nk = (t % 4 < 2) ? L : L + 2;
      for (int k = 0; k < nk; k++) begin
        @(negedge clk);
        fsel = f; step = 1'b1; clear = (k == 0);
        for (int i = 0; i < L; i++) begin
          prods[i] = (k < L) ? {$urandom} : '0;
          if (f) total ^= big_t'(prods[i]) << (R*k);
          else   total += big_t'(prods[i]) << (R*k);
        end
        #1;
        got[R*k +: R] = digit;
      end
      @(negedge clk);
      step = 1'b0;
      checks++;
      total &= (big_t'(1) << (R*nk)) - 1;
      if (got !== total) begin failures++; $display("FAIL f=%0d %h vs %h", f, got, total); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
