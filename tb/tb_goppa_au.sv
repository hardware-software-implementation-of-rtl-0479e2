// tb_goppa_au: checks the arithmetic unit at NCOEF = 8, NSUP = 64: opcode
// decoding (every legal code, and 1001 rejected), Set Gp followed by the
// modular operations, error location, the result lengths, and the stall of
// a new start while the previous result has not been taken.
module tb_goppa_au;
  import mce_ref_pkg::*;

  localparam int N = 8, NS = 64;
  logic clk = 0, rst_n = 0, start_req = 0, res_take = 0;
  logic [3:0] opcode;
  logic [N-1:0][12:0] in_op1, in_op2, in_op3, gp_model;
  logic start_ack, busy, done, err, res_valid;
  logic [2*N-1:0][12:0] res;
  logic [4:0] res_len;
  logic [31:0] cycles;
  int checks = 0, failures = 0, n_stall = 0;

  always #5 clk = ~clk;

  goppa_au #(.NCOEF(N), .NSUP(NS)) dut (.*);

  function automatic poly_t topoly(logic [N-1:0][12:0] v);
    poly_t p;
    p = new[N];
    foreach (p[i]) p[i] = v[i];
    return p;
  endfunction

  task automatic issue(logic [3:0] code);
    bit d;
    @(negedge clk);
    opcode = code; start_req = 1;
    @(posedge clk);
    while (!start_ack) begin
      if (res_valid) n_stall++;
      @(posedge clk);
    end
    d = done;
    @(negedge clk);
    start_req = 0;
    if (!d) begin
      @(posedge clk);
      while (!done) @(posedge clk);
    end
    @(negedge clk);
  endtask

  task automatic take();
    @(negedge clk); res_take = 1; @(negedge clk); res_take = 0;
  endtask

  task automatic expect_poly(string what, poly_t e, int len);
    checks++;
    if (res_len != 5'(len)) begin failures++; $display("FAIL %s res_len %0d expected %0d", what, res_len, len); end
    for (int i = 0; i < 2*N; i++) begin
      checks++;
      if (res[i] !== ((i < e.size()) ? e[i] : '0)) begin
        failures++; $display("FAIL %s coef %0d: %h vs %h", what, i, res[i], (i < e.size()) ? e[i] : '0);
      end
    end
  endtask

  initial begin
    poly_t p, q, r;
    opcode = 0; in_op1 = '0; in_op2 = '0; in_op3 = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    // illegal code
    issue(4'b1001);
    checks++;
    if (!err || res_valid) begin failures++; $display("FAIL 1001 not rejected"); end
    // set Gp
    for (int i = 0; i < N; i++) in_op1[i] = 13'($urandom);
    in_op1[N-1] = 13'd1;
    gp_model = in_op1;
    issue(4'b1110);
    checks++;
    if (err || res_valid) begin failures++; $display("FAIL set Gp"); end
    for (int t = 0; t < 6; t++) begin
      for (int i = 0; i < N; i++) begin
        in_op1[i] = 13'($urandom); in_op2[i] = 13'($urandom); in_op3[i] = 13'($urandom);
      end
      issue(4'b0000);
      p = pmul(topoly(in_op1), topoly(in_op2));
      expect_poly("mul", p, 2*N - 1);
      // next start must stall until the result is taken
      fork
        issue(4'b0011);
        begin repeat (4) @(negedge clk); take(); end
      join
      foreach (p[i]) if (i < N) p[i] = p[i] ^ in_op3[i];
      pdivmod(p, topoly(gp_model), q, r);
      expect_poly("mulxormod", r, N - 1);
      take();
      issue(4'b0100);
      pdivmod(topoly(in_op1), topoly(in_op2), q, r);
      begin
        poly_t qr;
        qr = new[2*N];
        for (int i = 0; i < N; i++) begin qr[i] = q[i]; qr[N+i] = r[i]; end
        expect_poly("div", qr, 2*N);
      end
      take();
    end
    // error location with roots 3, 17, 40
    begin
      poly_t s, f;
      logic [2*N*13-1:0] flat;
      s = new[1]; s[0] = 13'd9;
      foreach (s[k]) ;
      for (int k = 0; k < 3; k++) begin
        f = new[2]; f[1] = 13'd1;
        f[0] = (k == 0) ? 13'd3 : (k == 1) ? 13'd17 : 13'd40;
        s = pmul(s, f);
      end
      in_op1 = '0;
      for (int i = 0; i < s.size() && i < N; i++) in_op1[i] = s[i];
      issue(4'b1000);
      flat = res;
      checks++;
      if (res_len != 5'((NS + 12) / 13)) begin failures++; $display("FAIL errloc len"); end
      for (int i = 0; i < NS; i++) begin
        checks++;
        if (flat[i] !== (i == 3 || i == 17 || i == 40)) begin failures++; $display("FAIL eps %0d", i); end
      end
      checks++;
      if (cycles != 32'(NS * 4 + 3)) begin failures++; $display("FAIL errloc cycles %0d", cycles); end
      take();
    end
    checks++;
    if (n_stall == 0) begin failures++; $display("FAIL stall never happened"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
