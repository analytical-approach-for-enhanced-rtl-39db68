// tb_dual_field_mac: checks <addend + x*y>_m of one MAC unit in both fields,
// and its unreduced product output, against dramm_ref_pkg.
module tb_dual_field_mac;
  import dramm_ref_pkg::*;
  localparam int R = 16;
  logic           fsel;
  logic [R-1:0]   x, y, addend, res;
  logic [R:0]     m;
  logic [2*R-1:0] prod;
  int checks = 0, failures = 0;

  dual_field_mac #(.R(R)) dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 3000; i++) begin
      big_t rp, rr;
      bit f;
      f = 1'($urandom);
      fsel = f;
      x = 16'($urandom); y = 16'($urandom); addend = 16'($urandom);
      m = f ? {1'b1, 16'($urandom)} : {1'b0, 16'($urandom) | 16'd2};
      if (i == 0) begin fsel = 0; f = 0; x = '1; y = '1; addend = '1; m = 17'd65521; end
      #1;
      rp = fmul(f, big_t'(x), big_t'(y));
      rr = f ? pmod(rp ^ big_t'(addend), big_t'(m)) : (rp + big_t'(addend)) % big_t'(m);
      checks += 2;
      if (big_t'(prod) !== rp) begin failures++; $display("FAIL product"); end
      if (big_t'(res) !== rr) begin
        failures++;
        $display("FAIL f=%0d <%h + %h*%h>_%h -> %h, expected %h", f, addend, x, y, m, res, rr);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
