// tb_gf_mult: checks the GF(2^13) multiplier against the reference product
// on fixed corner cases and random operands.
module tb_gf_mult;
  import mce_ref_pkg::*;

  logic [12:0] a, b, r;
  int checks = 0, failures = 0;

  gf_mult dut (.op1(a), .op2(b), .res(r));

  task automatic check(logic [12:0] x, logic [12:0] y, logic [12:0] exp);
    a = x; b = y;
    #1;
    checks++;
    if (r !== exp) begin
      failures++;
      $display("FAIL %h * %h = %h, expected %h", x, y, r, exp);
    end
  endtask

  initial begin
    check(13'h1000, 13'h0002, 13'h001B);   // z^12 * z = z^4+z^3+z+1
    check(13'h0000, 13'h1234, 13'h0000);
    check(13'h0001, 13'h1ABC, 13'h1ABC);
    check(13'h1FFF, 13'h0001, 13'h1FFF);
    for (int i = 0; i < 3000; i++) begin
      logic [12:0] x, y;
      x = 13'($urandom);
      y = 13'($urandom);
      check(x, y, gmul(x, y));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
