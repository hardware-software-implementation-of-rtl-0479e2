// tb_axi_slave_if: checks the AXI4-Lite register interface: CTRL writes set
// the opcode and a START request held until start_ack, CLEAR gives a
// one-cycle pulse, STATUS packs the status inputs (done sticky until the
// next START), the degree and cycle registers read back, and read data is
// held while RREADY is low.
module tb_axi_slave_if;
  logic clk = 0, rst_n = 0;
  logic [5:0] s_axi_awaddr, s_axi_araddr;
  logic s_axi_awvalid = 0, s_axi_awready, s_axi_wvalid = 0, s_axi_wready;
  logic [31:0] s_axi_wdata, s_axi_rdata;
  logic [3:0] s_axi_wstrb;
  logic [1:0] s_axi_bresp, s_axi_rresp;
  logic s_axi_bvalid, s_axi_bready = 0, s_axi_arvalid = 0, s_axi_arready;
  logic s_axi_rvalid, s_axi_rready = 0;
  logic [3:0] opcode;
  logic start_req, start_ack = 0, clear;
  logic au_busy = 0, au_done = 0, au_err = 0, res_valid = 0, wr_active = 0;
  logic [1:0] slots = 0;
  logic overflow = 0;
  logic [2:0][8:0] in_deg;
  logic [9:0] out_deg;
  logic [31:0] cycles;
  int checks = 0, failures = 0, n_clear = 0;

  always #5 clk = ~clk;
  always @(negedge clk) if (clear) n_clear++;

  axi_slave_if dut (.*);

  task automatic axi_write(logic [5:0] addr, logic [31:0] data);
    @(negedge clk);
    s_axi_awaddr = addr; s_axi_awvalid = 1;
    s_axi_wdata = data; s_axi_wstrb = 4'hF; s_axi_wvalid = 1;
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
    s_axi_arvalid = 0;
    repeat (2) @(negedge clk);            // hold RREADY low for a while
    checks++;
    if (!s_axi_rvalid) begin failures++; $display("FAIL rvalid dropped"); end
    s_axi_rready = 1;
    @(posedge clk);
    data = s_axi_rdata;
    @(negedge clk);
    s_axi_rready = 0;
  endtask

  task automatic expect_rd(logic [5:0] addr, logic [31:0] exp);
    logic [31:0] d;
    axi_read(addr, d);
    checks++;
    if (d !== exp) begin failures++; $display("FAIL read %h = %h expected %h", addr, d, exp); end
  endtask

  initial begin
    s_axi_awaddr = 0; s_axi_araddr = 0; s_axi_wdata = 0; s_axi_wstrb = 0;
    in_deg = {9'd7, 9'd300, 9'd5}; out_deg = 10'd630; cycles = 32'd12345;
    repeat (2) @(negedge clk);
    rst_n = 1;
    axi_write(6'h00, 32'h0000_0003);
    checks++;
    if (opcode != 4'h3 || start_req) begin failures++; $display("FAIL opcode write"); end
    expect_rd(6'h00, 32'h0000_0003);
    axi_write(6'h00, 32'h0000_0108);
    checks++;
    if (opcode != 4'h8 || !start_req) begin failures++; $display("FAIL start"); end
    expect_rd(6'h00, 32'h0000_0108);
    repeat (3) @(negedge clk);
    checks++;
    if (!start_req) begin failures++; $display("FAIL start not held"); end
    start_ack = 1; au_busy = 1; @(negedge clk); start_ack = 0;
    checks++;
    if (start_req) begin failures++; $display("FAIL start not cleared by ack"); end
    expect_rd(6'h04, 32'h1);
    au_busy = 0; au_done = 1; @(negedge clk); au_done = 0;
    au_err = 1; res_valid = 1; wr_active = 1; slots = 2'd2; overflow = 1;
    expect_rd(6'h04, 32'hDE);
    au_err = 0; res_valid = 0; wr_active = 0; slots = 0; overflow = 0;
    expect_rd(6'h04, 32'h2);
    axi_write(6'h00, 32'h0000_0100);
    expect_rd(6'h04, 32'h0);
    axi_write(6'h00, 32'h0000_0200);
    checks++;
    if (n_clear != 1) begin failures++; $display("FAIL clear pulses %0d", n_clear); end
    expect_rd(6'h08, 32'd5);
    expect_rd(6'h0C, 32'd300);
    expect_rd(6'h10, 32'd7);
    expect_rd(6'h14, 32'd630);
    expect_rd(6'h18, 32'd12345);
    expect_rd(6'h1C, 32'd0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
