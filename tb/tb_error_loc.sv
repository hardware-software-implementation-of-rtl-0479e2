// tb_error_loc: checks the error-location unit at NCOEF = 8 and a support
// of NSUP = 64 points. sigma is built as c * prod (Z - r_k) from chosen
// roots, some inside and some outside the support, and the error vector
// must flag exactly the roots inside it. The run time must be
// NSUP * (deg sigma + 1) cycles.
module tb_error_loc;
  import mce_ref_pkg::*;

  localparam int N = 8, NS = 64;
  logic clk = 0, rst_n = 0, start = 0;
  logic [N-1:0][12:0]   sigma;
  logic [2*N-1:0][12:0] eps;
  logic busy, done;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  error_loc #(.NCOEF(N), .NSUP(NS)) dut (.*);

  task automatic run(int nroots);
    poly_t s, f;
    logic [NS-1:0] exp_e;
    logic [2*N*13-1:0] flat;
    int lat;
    s = new[1]; s[0] = 13'($urandom_range(1, 8191));
    exp_e = '0;
    for (int k = 0; k < nroots; k++) begin
      int rt;
      rt = (k % 3 == 2) ? $urandom_range(NS, 8191) : $urandom_range(0, NS - 1);
      f = new[2]; f[0] = 13'(rt); f[1] = 13'd1;
      s = pmul(s, f);
      if (rt < NS) exp_e[rt] = 1'b1;
    end
    for (int i = 0; i < N; i++) sigma[i] = (i < s.size()) ? s[i] : '0;
    @(negedge clk);
    start = 1;
    @(negedge clk);
    start = 0;
    lat = 1;
    while (!done) begin @(negedge clk); lat++; end
    flat = eps;
    for (int i = 0; i < NS; i++) begin
      checks++;
      if (flat[i] !== exp_e[i] || exp_e[i] !== (peval(s, 13'(i)) == 0)) begin
        failures++; $display("FAIL point %0d eps=%0d expected %0d", i, flat[i], exp_e[i]);
      end
    end
    checks++;
    if (flat[2*N*13-1:NS] != '0) begin failures++; $display("FAIL bits above NSUP"); end
    checks++;
    if (lat != NS * (nroots + 1) + 1) begin
      failures++; $display("FAIL latency %0d expected %0d", lat, NS * (nroots + 1) + 1);
    end
  endtask

  initial begin
    sigma = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 16; t++) run(t % N);
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
