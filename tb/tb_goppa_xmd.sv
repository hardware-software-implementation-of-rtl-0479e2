// tb_goppa_xmd: checks the XOR-Mod Multiplier/Divisor at NCOEF = 8 against
// reference polynomial arithmetic: all five operations with random
// operands, reduction by Goppa polynomials of full and of lower degree,
// division by divisors of every degree (exercising normalisation), and the
// error flag for division by zero.
module tb_goppa_xmd;
  import mce_ref_pkg::*;

  localparam int N = 8;
  logic clk = 0, rst_n = 0, start = 0;
  mce_pkg::opcode_e op;
  logic [N-1:0][12:0]   a, b, c, gp;
  logic [2*N-1:0][12:0] res;
  logic busy, done, err;
  int checks = 0, failures = 0;
  int n_norm = 0;

  always #5 clk = ~clk;

  goppa_xmd #(.NCOEF(N)) dut (.*);

  function automatic poly_t topoly(logic [N-1:0][12:0] v);
    poly_t p;
    p = new[N];
    foreach (p[i]) p[i] = v[i];
    return p;
  endfunction

  task automatic cmp(string what, int i, logic [12:0] got, logic [12:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s op=%s coef %0d: %h expected %h", what, op.name(), i, got, exp);
    end
  endtask

  task automatic run(mce_pkg::opcode_e o);
    poly_t pa, pb, pc, pg, prod, q, r;
    @(negedge clk);
    op = o; start = 1;
    @(negedge clk);
    start = 0;
    while (!done) @(negedge clk);
    pa = topoly(a); pb = topoly(b); pc = topoly(c); pg = topoly(gp);
    if (o == mce_pkg::OP_DIV) begin
      if (pdeg(pb) < 0) begin
        checks++;
        if (!err) begin failures++; $display("FAIL no error on division by 0"); end
      end else begin
        if (pdeg(pb) < N - 1) n_norm++;
        pdivmod(pa, pb, q, r);
        checks++;
        if (err) begin failures++; $display("FAIL spurious error"); end
        for (int i = 0; i < N; i++) cmp("quot", i, res[i], q[i]);
        for (int i = 0; i < N; i++) cmp("rem", i, res[N+i], r[i]);
      end
    end else begin
      prod = pmul(pa, pb);
      if (o == mce_pkg::OP_MULXOR || o == mce_pkg::OP_MULXORMOD)
        foreach (pc[i]) prod[i] = prod[i] ^ pc[i];
      if (o == mce_pkg::OP_MULMOD || o == mce_pkg::OP_MULXORMOD) begin
        pdivmod(prod, pg, q, r);
        for (int i = 0; i < 2*N; i++) cmp("mod", i, res[i], (i < r.size()) ? r[i] : '0);
      end else begin
        for (int i = 0; i < 2*N; i++) cmp("mul", i, res[i], (i < prod.size()) ? prod[i] : '0);
      end
    end
  endtask

  task automatic randomize_ops(int degb, int degg);
    for (int i = 0; i < N; i++) begin
      a[i]  = 13'($urandom);
      b[i]  = (i <= degb) ? 13'($urandom) : '0;
      c[i]  = 13'($urandom);
      gp[i] = (i <= degg) ? 13'($urandom) : '0;
    end
    if (degb >= 0 && b[degb] == 0) b[degb] = 13'd1;
    if (gp[degg] == 0) gp[degg] = 13'd3;
  endtask

  initial begin
    op = mce_pkg::OP_MUL;
    a = '0; b = '0; c = '0; gp = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 12; t++) begin
      randomize_ops(N - 1, (t < 8) ? N - 1 : 3 + t % 4);
      run(mce_pkg::OP_MUL);
      run(mce_pkg::OP_MULMOD);
      run(mce_pkg::OP_MULXOR);
      run(mce_pkg::OP_MULXORMOD);
    end
    for (int t = 0; t < 20; t++) begin
      randomize_ops(t % N, N - 1);
      run(mce_pkg::OP_DIV);
    end
    randomize_ops(-1, N - 1);
    b = '0;
    run(mce_pkg::OP_DIV);
    checks++;
    if (n_norm == 0) begin failures++; $display("FAIL normalisation never exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
