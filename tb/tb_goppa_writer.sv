// tb_goppa_writer: checks the AXI4-Stream result writer at NCOEF = 8 with
// random TREADY: each result is sent as one packet of exactly len beats in
// order with TLAST on the last, the buffer is released afterwards, the
// output degree is the highest non-zero index, and a zero-length result is
// released without a packet.
module tb_goppa_writer;
  localparam int N = 8;
  logic clk = 0, rst_n = 0, full = 0;
  logic [4:0] len;
  logic [3:0] rd_idx, out_deg;
  logic [12:0] rd_data;
  logic release_buf, active;
  logic [31:0] m_axis_tdata;
  logic m_axis_tvalid, m_axis_tready = 0, m_axis_tlast;
  logic [12:0] mem [2*N];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  assign rd_data = mem[rd_idx];

  goppa_writer #(.NCOEF(N)) dut (.*);

  initial begin
    len = 0;
    foreach (mem[i]) mem[i] = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 30; t++) begin
      int l, got, deg;
      bit seen_rel;
      l = (t == 3) ? 0 : $urandom_range(1, 2*N);
      deg = 0;
      for (int i = 0; i < 2*N; i++) begin
        mem[i] = ($urandom_range(0, 2) != 0) ? 13'($urandom) : '0;
        if (i < l && mem[i] != 0) deg = i;
      end
      len = 5'(l);
      full = 1;
      got = 0;
      seen_rel = 0;
      while (!seen_rel) begin
        m_axis_tready = ($urandom_range(0, 2) != 0);
        @(posedge clk);
        if (release_buf) seen_rel = 1;
        else if (m_axis_tvalid && m_axis_tready) begin
          checks++;
          if (m_axis_tdata !== {19'b0, mem[got]} || m_axis_tlast !== (got == l - 1)) begin
            failures++; $display("FAIL beat %0d of %0d", got, l);
          end
          got++;
        end
        @(negedge clk);
        if (release_buf) full = 0;
      end
      full = 0;
      checks++;
      if (got != l) begin failures++; $display("FAIL %0d beats for len %0d", got, l); end
      if (l > 0) begin
        checks++;
        if (out_deg != 4'(deg)) begin failures++; $display("FAIL out_deg %0d vs %0d", out_deg, deg); end
      end
      @(negedge clk);
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
