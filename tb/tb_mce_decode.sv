// tb_mce_decode: Patterson decoding of a small binary Goppa code with the
// coprocessor doing the steps it is built for, at t = 7 (NCOEF = 8) and a
// 64-point support (NSUP = 64) over GF(2^13).
//
// The host model picks a random irreducible monic Goppa polynomial G of
// degree 7 (Rabin's test), places 7 errors, and forms the syndrome
// S(Z) = sum 1/(Z - alpha_i) mod G. Then, as in the published partitioning:
//   T = S^-1 mod G      coprocessor: extended Euclid with DIV and MULXORMOD,
//                       final scaling with MULMOD
//   R = sqrt(T + Z)     host (reference arithmetic)
//   a = b*R mod G       coprocessor: extended Euclid stopped at deg a <= t/2
//   sigma = a^2 + Z b^2 host
//   eps                 coprocessor: error location
// Checks: T*S = 1 mod G, a = b*R mod G, and eps equals the error pattern.
// Several codes and error patterns are decoded.
module tb_mce_decode;
  import mce_ref_pkg::*;

  localparam int N = 8, NS = 64, T = N - 1;
  logic clk = 0, rst_n = 0;
  logic [5:0] s_axi_awaddr = 0, s_axi_araddr = 0;
  logic s_axi_awvalid = 0, s_axi_awready, s_axi_wvalid = 0, s_axi_wready;
  logic [31:0] s_axi_wdata = 0, s_axi_rdata;
  logic [3:0] s_axi_wstrb = 4'hF;
  logic [1:0] s_axi_bresp, s_axi_rresp;
  logic s_axi_bvalid, s_axi_bready = 0, s_axi_arvalid = 0, s_axi_arready;
  logic s_axi_rvalid, s_axi_rready = 0;
  logic [31:0] s_axis_tdata = 0, m_axis_tdata;
  logic s_axis_tvalid = 0, s_axis_tready, s_axis_tlast = 0;
  logic m_axis_tvalid, m_axis_tready = 1, m_axis_tlast;
  int checks = 0, failures = 0, n_ops = 0;
  logic [12:0] pkt[$];
  logic [12:0] packets[$][$];

  always #5 clk = ~clk;

  mce_ip #(.NCOEF(N), .NSUP(NS)) dut (.*);

  always @(posedge clk)
    if (rst_n && m_axis_tvalid && m_axis_tready) begin
      pkt.push_back(m_axis_tdata[12:0]);
      if (m_axis_tlast) begin packets.push_back(pkt); pkt.delete(); end
    end

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask

  // ---- host-side polynomial helpers (reference arithmetic) ----
  function automatic poly_t pfit(poly_t a, int n);
    poly_t r;
    r = new[n];
    foreach (r[i]) r[i] = (i < a.size()) ? a[i] : '0;
    return r;
  endfunction

  function automatic poly_t padd(poly_t a, poly_t b);
    poly_t r;
    r = new[(a.size() > b.size()) ? a.size() : b.size()];
    foreach (r[i]) r[i] = ((i < a.size()) ? a[i] : '0) ^ ((i < b.size()) ? b[i] : '0);
    return r;
  endfunction

  function automatic poly_t pmod(poly_t a, poly_t g);
    poly_t q, r;
    pdivmod(a, g, q, r);
    return pfit(r, N);
  endfunction

  function automatic bit pequal(poly_t a, poly_t b);
    poly_t d;
    d = padd(a, b);
    return pdeg(d) < 0;
  endfunction

  function automatic poly_t zpoly();
    poly_t z;
    z = new[2]; z[0] = '0; z[1] = 13'd1;
    return z;
  endfunction

  function automatic poly_t pgcd(poly_t a, poly_t b);
    poly_t q, r;
    while (pdeg(b) >= 0) begin
      pdivmod(a, b, q, r);
      a = b; b = r;
    end
    return a;
  endfunction

  // x^(2^k) mod g
  function automatic poly_t psqr_k(poly_t x, poly_t g, int k);
    for (int i = 0; i < k; i++) x = pmod(pmul(x, x), g);
    return x;
  endfunction

  // ---- coprocessor access ----
  task automatic axi_write(logic [5:0] addr, logic [31:0] data);
    @(negedge clk);
    s_axi_awaddr = addr; s_axi_awvalid = 1; s_axi_wdata = data; s_axi_wvalid = 1;
    @(posedge clk);
    while (!s_axi_awready) @(posedge clk);
    @(negedge clk);
    s_axi_awvalid = 0; s_axi_wvalid = 0; s_axi_bready = 1;
    @(posedge clk);
    while (!s_axi_bvalid) @(posedge clk);
    @(negedge clk);
    s_axi_bready = 0;
  endtask

  task automatic axi_read(logic [5:0] addr, output logic [31:0] data);
    @(negedge clk);
    s_axi_araddr = addr; s_axi_arvalid = 1;
    @(posedge clk);
    while (!s_axi_arready) @(posedge clk);
    @(negedge clk);
    s_axi_arvalid = 0; s_axi_rready = 1;
    @(posedge clk);
    while (!s_axi_rvalid) @(posedge clk);
    data = s_axi_rdata;
    @(negedge clk);
    s_axi_rready = 0;
  endtask

  task automatic send(poly_t p);
    for (int i = 0; i < N; i++) begin
      @(negedge clk);
      s_axis_tvalid = 1;
      s_axis_tdata  = {19'b0, (i < p.size()) ? p[i] : 13'd0};
      s_axis_tlast  = (i == N - 1);
      @(posedge clk);
      while (!s_axis_tready) @(posedge clk);
    end
    @(negedge clk);
    s_axis_tvalid = 0; s_axis_tlast = 0;
  endtask

  // run one operation; returns the result packet (empty for Set Gp)
  task automatic cop(logic [3:0] code, poly_t p1, poly_t p2, poly_t p3, output poly_t res);
    logic [31:0] st;
    n_ops++;
    send(p1);
    if (p2.size() > 0) send(p2);
    if (p3.size() > 0) send(p3);
    axi_write(6'h00, 32'h100 | 32'(code));
    do axi_read(6'h04, st); while (!st[1]);
    check(st[2] == 0, $sformatf("error flag on code %b", code));
    if (code == 4'b1110) res = new[0];
    else begin
      while (packets.size() == 0) @(negedge clk);
      res = new[packets[0].size()];
      foreach (res[i]) res[i] = packets[0][i];
      void'(packets.pop_front());
    end
  endtask

  // extended Euclid on the coprocessor: starting from (r0, r1) = (G, x) and
  // (v0, v1) = (0, 1), iterate while deg r1 > stop; returns r1 and v1 with
  // v1 * x = r1 mod G
  task automatic euclid(poly_t g, poly_t x, int stop, output poly_t r, output poly_t v);
    poly_t r0, r1, v0, v1, qr, q, nv, none;
    none = new[0];
    r0 = g; r1 = x;
    v0 = new[1]; v0[0] = '0;
    v1 = new[1]; v1[0] = 13'd1;
    while (pdeg(r1) > stop) begin
      cop(4'b0100, r0, r1, none, qr);                     // q, r = r0 / r1
      q  = new[N];
      r0 = r1;
      r1 = new[N];
      for (int i = 0; i < N; i++) begin q[i] = qr[i]; r1[i] = qr[N+i]; end
      cop(4'b0011, q, v1, v0, nv);                        // v0 + q*v1 mod G
      v0 = v1;
      v1 = pfit(nv, N);
    end
    r = r1; v = v1;
  endtask

  initial begin
    poly_t g, none;
    none = new[0];
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int trial = 0; trial < 3; trial++) begin
      poly_t s, tz, tinv, sc, rr, a, b, sigma, one, res, f, q, r, h;
      int pos[$];
      logic [NS-1:0] e_exp, e_got;
      bit ok;
      // irreducible monic G of degree 7 (7 is prime: Rabin's test)
      do begin
        g = new[N];
        foreach (g[i]) g[i] = 13'($urandom);
        g[T] = 13'd1;
        h = psqr_k(zpoly(), g, 13 * T);
        ok = pequal(h, zpoly());
        if (ok) ok = (pdeg(pgcd(g, padd(psqr_k(zpoly(), g, 13), zpoly()))) == 0);
      end while (!ok);
      cop(4'b1110, g, none, none, res);
      // error pattern and syndrome
      e_exp = '0;
      pos.delete();
      s = new[N]; foreach (s[i]) s[i] = '0;
      while (pos.size() < T) begin
        int p;
        p = $urandom_range(0, NS - 1);
        if (!e_exp[p]) begin
          gfe_t ga;
          e_exp[p] = 1'b1;
          pos.push_back(p);
          // 1/(Z - a) = (G(Z) - G(a)) / (Z - a) * G(a)^-1 mod G
          ga = peval(g, 13'(p));
          f = new[2]; f[0] = 13'(p); f[1] = 13'd1;
          h = new[N]; foreach (h[i]) h[i] = g[i];
          h[0] = h[0] ^ ga;
          pdivmod(h, f, q, r);
          foreach (q[i]) q[i] = gmul(q[i], ginv(ga));
          s = padd(s, pfit(q, N));
        end
      end
      // T = S^-1 mod G on the coprocessor
      euclid(g, s, 0, rr, tinv);
      one = new[1]; one[0] = ginv(rr[0]);
      cop(4'b0001, one, tinv, none, tz);
      tz = pfit(tz, N);
      one[0] = 13'd1;
      h = pmod(pmul(tz, s), g);
      check(pequal(h, one), $sformatf("T * S != 1 mod G: %p  rr=%p", h, rr));
      // R = sqrt(T + Z) on the host: x^(2^(13*7-1)) in GF(2^13)[Z]/G
      sc = psqr_k(padd(tz, zpoly()), g, 13 * T - 1);
      // key equation on the coprocessor
      euclid(g, sc, T / 2, a, b);
      check(pequal(pmod(pmul(b, sc), g), a), "a != b*R mod G");
      // sigma = a^2 + Z b^2 on the host, error location on the coprocessor
      sigma = padd(pmul(a, a), pmul(zpoly(), pmul(b, b)));
      cop(4'b1000, pfit(sigma, N), none, none, res);
      for (int i = 0; i < NS; i++) e_got[i] = res[i / 13][i % 13];
      check(e_got == e_exp && $countones(e_exp) == T,
            $sformatf("decoded errors %h expected %h", e_got, e_exp));
    end
    $display("decoded 3 error patterns with %0d coprocessor operations", n_ops);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
