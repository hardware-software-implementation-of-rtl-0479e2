// tb_gf_div: checks the GF(2^13) divider: res * op2 == op1 for random
// operands, the division-by-zero flag, and the latency of M = 13 cycles
// from start to done.
module tb_gf_div;
  import mce_ref_pkg::*;

  logic clk = 0, rst_n = 0, start = 0;
  logic [12:0] op1, op2, res;
  logic busy, done, div0;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  gf_div dut (.*);

  task automatic run(logic [12:0] x, logic [12:0] y);
    int lat;
    @(negedge clk);
    op1 = x; op2 = y; start = 1;
    @(negedge clk);
    start = 0;
    lat = 0;
    while (!done) begin @(negedge clk); lat++; end
    checks++;
    if (lat != 13) begin failures++; $display("FAIL latency %0d", lat); end
    checks++;
    if (y == 0) begin
      if (!div0 || res != 0) begin failures++; $display("FAIL div0"); end
    end else if (div0 || gmul(res, y) != x || res != gmul(x, ginv(y))) begin
      failures++;
      $display("FAIL %h / %h = %h", x, y, res);
    end
  endtask

  initial begin
    op1 = 0; op2 = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    run(13'h0001, 13'h0002);
    run(13'h1234, 13'h0001);
    run(13'h0055, 13'h0000);
    for (int i = 0; i < 60; i++) run(13'($urandom), 13'($urandom_range(1, 8191)));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
