// tb_goppa_mult: checks the Goppa multiplier at NCOEF = 8 against the
// reference polynomial product, with and without the XOR term, for every
// operand length n1, and checks that it takes max(n1,1) busy cycles.
module tb_goppa_mult;
  import mce_ref_pkg::*;

  localparam int N = 8;
  logic clk = 0, rst_n = 0, start = 0, use_xor = 0;
  logic [3:0] n1;
  logic [N-1:0][12:0]   p1, p2;
  logic [2*N-1:0][12:0] p3, o;
  logic busy, done;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  goppa_mult #(.NCOEF(N)) dut (.*);

  task automatic run(int n, bit x);
    poly_t a, b, c;
    int lat;
    a = new[n]; b = new[N];
    foreach (a[i]) a[i] = p1[i];
    foreach (b[i]) b[i] = p2[i];
    if (n > 0) c = pmul(a, b);
    else begin
      c = new[1];
      c[0] = '0;
    end
    @(negedge clk);
    n1 = 4'(n); use_xor = x; start = 1;
    @(negedge clk);
    start = 0;
    lat = 0;
    while (!done) begin @(negedge clk); lat++; end
    checks++;
    if (lat != ((n == 0) ? 0 : n)) begin
      failures++; $display("FAIL latency %0d for n1=%0d", lat, n);
    end
    for (int i = 0; i < 2*N; i++) begin
      logic [12:0] e;
      e = (i < c.size()) ? c[i] : '0;
      if (x) e = e ^ p3[i];
      checks++;
      if (o[i] !== e) begin
        failures++; $display("FAIL n1=%0d xor=%0d coef %0d: %h vs %h", n, x, i, o[i], e);
      end
    end
  endtask

  initial begin
    p1 = '0; p2 = '0; p3 = '0; n1 = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 40; t++) begin
      for (int i = 0; i < N; i++) begin
        p1[i] = 13'($urandom); p2[i] = 13'($urandom);
      end
      for (int i = 0; i < 2*N; i++) p3[i] = 13'($urandom);
      run(t % (N + 1), t[0]);
    end
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
