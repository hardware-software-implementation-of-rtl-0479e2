// tb_mce_ip: end-to-end test of the McEliece coprocessor at NCOEF = 8,
// NSUP = 64. A host model drives the AXI4-Lite registers and both streams
// and checks every result packet against reference arithmetic: Set Gp, all
// multiply/XOR/mod variants, division, error location, an illegal code,
// division by zero and an over-long operand. It also makes the design's
// flow-control mechanisms happen and counts them: operands streamed while
// the unit is busy, a start stalled because the previous result is still
// waiting for the output buffer, back-pressure on the result stream, and
// every operation code.
module tb_mce_ip;
  import mce_ref_pkg::*;

  localparam int N = 8, NS = 64;
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
  logic m_axis_tvalid, m_axis_tready = 0, m_axis_tlast;

  int checks = 0, failures = 0;
  int n_overlap = 0, n_stall = 0, n_backpressure = 0, n_ops[16];
  bit drain = 1;
  logic [12:0] pkt[$];
  logic [12:0] packets[$][$];

  always #5 clk = ~clk;

  mce_ip #(.NCOEF(N), .NSUP(NS)) dut (.*);

  // result stream sink: random TREADY while draining, none otherwise
  always @(negedge clk) m_axis_tready <= drain && ($urandom_range(0, 3) != 0);
  always @(posedge clk) begin
    if (rst_n && m_axis_tvalid && !m_axis_tready) n_backpressure++;
    if (rst_n && m_axis_tvalid && m_axis_tready) begin
      pkt.push_back(m_axis_tdata[12:0]);
      if (m_axis_tlast) begin
        packets.push_back(pkt);
        pkt.delete();
      end
    end
    if (s_axis_tvalid && s_axis_tready && dut.au_busy) n_overlap++;
    if (dut.start_req && dut.res_valid && !dut.start_ack) n_stall++;
  end

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask

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

  task automatic send(poly_t p, int len);
    for (int i = 0; i < len; i++) begin
      @(negedge clk);
      s_axis_tvalid = 1;
      s_axis_tdata  = {19'b0, (i < p.size()) ? p[i] : 13'd0};
      s_axis_tlast  = (i == len - 1);
      @(posedge clk);
      while (!s_axis_tready) @(posedge clk);
    end
    @(negedge clk);
    s_axis_tvalid = 0; s_axis_tlast = 0;
  endtask

  task automatic start_op(logic [3:0] code);
    n_ops[code]++;
    axi_write(6'h00, 32'h100 | 32'(code));
  endtask

  task automatic wait_done(output logic [31:0] st);
    do axi_read(6'h04, st); while (!st[1]);
  endtask

  task automatic recv(output poly_t p);
    int guard = 0;
    while (packets.size() == 0 && guard < 100000) begin @(negedge clk); guard++; end
    check(packets.size() != 0, "no result packet");
    if (packets.size() != 0) begin
      p = new[packets[0].size()];
      foreach (p[i]) p[i] = packets[0][i];
      void'(packets.pop_front());
    end else p = new[0];
  endtask

  function automatic poly_t rpoly(int deg);
    poly_t p;
    p = new[N];
    foreach (p[i]) p[i] = (i <= deg) ? 13'($urandom) : '0;
    if (deg >= 0 && p[deg] == 0) p[deg] = 13'd1;
    return p;
  endfunction

  task automatic expect_pkt(string what, poly_t got, poly_t e, int len);
    int hi;
    logic [31:0] d;
    check(got.size() == len, $sformatf("%s length %0d expected %0d", what, got.size(), len));
    hi = 0;
    for (int i = 0; i < got.size(); i++) begin
      logic [12:0] x;
      x = (i < e.size()) ? e[i] : '0;
      check(got[i] === x, $sformatf("%s coef %0d: %h expected %h", what, i, got[i], x));
      if (got[i] != 0) hi = i;
    end
    repeat (3) @(negedge clk);
    axi_read(6'h14, d);
    check(d == 32'(hi), $sformatf("%s OUT_DEG %0d expected %0d", what, d, hi));
  endtask

  initial begin
    poly_t gp, a, b, c, na, nb, got, prod, q, r;
    logic [31:0] st, d;
    repeat (3) @(negedge clk);
    rst_n = 1;

    // Set Gp (monic, degree N-1)
    gp = rpoly(N - 1);
    gp[N-1] = 13'd1;
    send(gp, N);
    start_op(4'b1110);
    wait_done(st);
    check(st[2] == 0, "Set Gp error");

    // (a*b) mod Gp, streaming the next operands while the unit is busy
    a = rpoly(N - 1); b = rpoly(N - 3); c = rpoly(N - 1);
    send(a, N); send(b, N - 2);
    axi_read(6'h0C, d);
    check(d == 32'(pdeg(b)), "IN_DEG1");
    start_op(4'b0001);
    na = rpoly(N - 1); nb = rpoly(N - 1);
    send(na, N); send(nb, N); send(c, N);
    wait_done(st);
    recv(got);
    pdivmod(pmul(a, b), gp, q, r);
    expect_pkt("mulmod", got, r, N - 1);

    // ((na*nb) xor c) mod Gp on the operands already loaded
    start_op(4'b0011);
    wait_done(st);
    recv(got);
    prod = pmul(na, nb);
    foreach (c[i]) prod[i] = prod[i] ^ c[i];
    pdivmod(prod, gp, q, r);
    expect_pkt("mulxormod", got, r, N - 1);

    // stall: hold the result stream, run two operations back to back
    drain = 0;
    a = rpoly(N - 1); b = rpoly(N - 1); c = rpoly(N - 1);
    send(a, N); send(b, N); send(c, N);
    start_op(4'b0000);
    wait_done(st);
    send(a, N); send(b, N); send(c, N);
    start_op(4'b0010);
    repeat (60) @(negedge clk);
    axi_read(6'h04, st);
    check(st[3] && st[4], "second result not waiting behind the first");
    start_op(4'b0000);               // must wait until the unit's result moves on
    repeat (20) @(negedge clk);
    axi_read(6'h00, st);
    check(st[8] == 1, "third start not held");
    drain = 1;
    wait_done(st);
    prod = pmul(a, b);
    recv(got);
    expect_pkt("mul", got, prod, 2*N - 1);
    recv(got);
    foreach (c[i]) prod[i] = prod[i] ^ c[i];
    expect_pkt("mulxor", got, prod, 2*N - 1);
    recv(got);
    expect_pkt("mul again", got, pmul(a, b), 2*N - 1);

    // division with a low-degree divisor
    a = rpoly(N - 1); b = rpoly(3);
    send(a, N); send(b, 4);
    start_op(4'b0100);
    wait_done(st);
    recv(got);
    pdivmod(a, b, q, r);
    begin
      poly_t qr;
      qr = new[2*N];
      for (int i = 0; i < N; i++) begin qr[i] = q[i]; qr[N+i] = r[i]; end
      expect_pkt("div", got, qr, 2*N);
    end

    // division by zero
    send(a, N); send(rpoly(-1), N);
    start_op(4'b0100);
    wait_done(st);
    check(st[2] == 1, "division by zero not flagged");

    // error location: roots 1, 5, 33, 63 and one outside the support
    begin
      poly_t s, f;
      logic [NS-1:0] e;
      s = new[1]; s[0] = 13'd77;
      foreach (s[k]) ;
      for (int k = 0; k < 5; k++) begin
        f = new[2]; f[1] = 13'd1;
        f[0] = (k == 0) ? 13'd1 : (k == 1) ? 13'd5 : (k == 2) ? 13'd33 : (k == 3) ? 13'd63 : 13'd4000;
        s = pmul(s, f);
      end
      send(s, 6);
      start_op(4'b1000);
      wait_done(st);
      recv(got);
      check(got.size() == (NS + 12) / 13, "errloc length");
      e = '0;
      for (int i = 0; i < NS; i++) e[i] = got[i / 13][i % 13];
      check(e == (64'h1 << 1 | 64'h1 << 5 | 64'h1 << 33 | 64'h1 << 63), $sformatf("errloc %h", e));
      axi_read(6'h18, d);
      check(d == 32'(NS * 6 + 3), $sformatf("errloc cycles %0d", d));
    end

    // illegal code
    start_op(4'b1001);
    wait_done(st);
    check(st[2] == 1, "code 1001 not rejected");

    // over-long operand sets the overflow flag; CLEAR resets it
    send(rpoly(N - 1), N + 3);
    axi_read(6'h04, st);
    check(st[7] == 1, "overflow not flagged");
    axi_write(6'h00, 32'h200);
    axi_read(6'h04, st);
    check(st[7] == 0 && st[6:5] == 0, "CLEAR did not rewind");

    // mechanisms
    check(n_overlap > 0, "operands never streamed during an operation");
    check(n_stall > 0, "start never stalled by a waiting result");
    check(n_backpressure > 0, "no back-pressure on the result stream");
    foreach (n_ops[k])
      if (k inside {0, 1, 2, 3, 4, 8, 14}) check(n_ops[k] > 0, $sformatf("opcode %0d never used", k));
    $display("overlap=%0d stall=%0d backpressure=%0d", n_overlap, n_stall, n_backpressure);
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
