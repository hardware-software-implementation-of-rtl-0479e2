// tb_mce_ip_full: complete operations on the coprocessor at its full
// size (t = 315, 316-coefficient operands, 8192-point support): load a
// monic degree-315 Goppa polynomial, stream two random 316-coefficient
// operands, run (op1*op2) mod Gp and check the 315 streamed coefficients,
// the output degree and the operation's cycle count against reference
// arithmetic. Then one error location over all 8192 support points with a
// degree-315 sigma whose roots are known, checking every error bit and the
// 8192 * 316 + 3 cycle run time.
module tb_mce_ip_full;
  import mce_ref_pkg::*;

  localparam int N = 316;
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
  int checks = 0, failures = 0;
  logic [12:0] pkt[$];
  int npkt = 0;

  always #2 clk = ~clk;

  mce_ip dut (.*);

  always @(posedge clk)
    if (rst_n && m_axis_tvalid && m_axis_tready) begin
      pkt.push_back(m_axis_tdata[12:0]);
      if (m_axis_tlast) npkt++;
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

  task automatic send(poly_t p);
    foreach (p[i]) begin
      @(negedge clk);
      s_axis_tvalid = 1;
      s_axis_tdata  = {19'b0, p[i]};
      s_axis_tlast  = (i == p.size() - 1);
      @(posedge clk);
      while (!s_axis_tready) @(posedge clk);
    end
    @(negedge clk);
    s_axis_tvalid = 0; s_axis_tlast = 0;
  endtask

  task automatic wait_done();
    logic [31:0] st;
    do axi_read(6'h04, st); while (!st[1]);
    check(st[2] == 0, "error flag");
  endtask

  initial begin
    poly_t gp, a, b, q, r;
    logic [31:0] d;
    int hi;
    gp = new[N]; a = new[N]; b = new[N];
    foreach (gp[i]) begin gp[i] = 13'($urandom); a[i] = 13'($urandom); b[i] = 13'($urandom); end
    gp[N-1] = 13'd1;
    repeat (3) @(negedge clk);
    rst_n = 1;
    send(gp);
    axi_write(6'h00, 32'h10E);          // Set Gp
    wait_done();
    send(a); send(b);
    axi_write(6'h00, 32'h101);          // (op1*op2) mod Gp
    wait_done();
    pdivmod(pmul(a, b), gp, q, r);
    while (npkt == 0) @(negedge clk);
    check(pkt.size() == N - 1, $sformatf("length %0d", pkt.size()));
    hi = 0;
    for (int i = 0; i < N - 1; i++) begin
      check(pkt[i] === r[i], $sformatf("coef %0d: %h expected %h", i, pkt[i], r[i]));
      if (r[i] != 0) hi = i;
    end
    repeat (4) @(negedge clk);
    axi_read(6'h14, d);
    check(d == 32'(hi), "OUT_DEG");
    axi_read(6'h18, d);
    $display("mulmod cycles = %0d", d);
    check(d > 32'(N) && d < 32'(4 * 2 * N), "cycle count out of range");

    // error location over the whole support: sigma with t = 315 distinct
    // roots, the field elements base, base+24, base+48, ...
    begin
      poly_t s, f;
      logic [8191:0] e, exp_e;
      int base;
      pkt.delete();
      npkt = 0;
      s = new[1]; s[0] = 13'd1;
      exp_e = '0;
      base = $urandom_range(0, 2);
      for (int k = 0; k < N - 1; k++) begin
        f = new[2]; f[1] = 13'd1; f[0] = 13'(base + 3 * k * 8);
        exp_e[base + 3 * k * 8] = 1'b1;
        s = pmul(s, f);
      end
      send(s);
      axi_write(6'h00, 32'h108);        // error location
      wait_done();
      while (npkt == 0) @(negedge clk);
      check(pkt.size() == 631, $sformatf("errloc length %0d", pkt.size()));
      for (int i = 0; i < 8192; i++) e[i] = pkt[i / 13][i % 13];
      for (int i = 0; i < 8192; i++)
        check(e[i] == exp_e[i], $sformatf("eps %0d", i));
      axi_read(6'h18, d);
      $display("error location cycles = %0d", d);
      check(d == 32'(8192 * N + 3), "error location cycle count");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
