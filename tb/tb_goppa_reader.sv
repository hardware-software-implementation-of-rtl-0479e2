// tb_goppa_reader: checks the AXI4-Stream operand reader at NCOEF = 8 with
// random gaps in TVALID: packet k lands in slot k coefficient by
// coefficient, the first beat clears the slot, the input degree is the
// highest non-zero index, a fourth packet is held off (TREADY low) until
// rewind, and an over-long packet sets the overflow flag.
module tb_goppa_reader;
  localparam int N = 8;
  logic clk = 0, rst_n = 0;
  logic [31:0] s_axis_tdata;
  logic s_axis_tvalid = 0, s_axis_tready, s_axis_tlast = 0, rewind = 0;
  logic wr_en, clr;
  logic [1:0] wr_slot, slots;
  logic [2:0] wr_idx;
  logic [12:0] wr_data;
  logic [2:0][2:0] in_deg;
  logic overflow;
  logic [12:0] model [3][N];
  int checks = 0, failures = 0;
  int n_backpressure = 0;

  always #5 clk = ~clk;

  goppa_reader #(.NCOEF(N)) dut (.*);

  // model of the buffer the reader writes
  always @(posedge clk) begin
    if (clr && wr_slot != 3) for (int i = 0; i < N; i++) model[wr_slot][i] <= '0;
    if (wr_en && wr_slot != 3) model[wr_slot][wr_idx] <= wr_data;
  end

  task automatic send(logic [12:0] p[], int len);
    for (int i = 0; i < len; i++) begin
      while ($urandom_range(0, 2) == 0) @(negedge clk);
      s_axis_tvalid = 1;
      s_axis_tdata  = {19'h7FFFF, p[i]};
      s_axis_tlast  = (i == len - 1);
      @(posedge clk);
      while (!s_axis_tready) begin n_backpressure++; @(posedge clk); end
      @(negedge clk);
      s_axis_tvalid = 0;
      s_axis_tlast  = 0;
    end
  endtask

  initial begin
    logic [12:0] pk [3][];
    int deg [3];
    foreach (model[s, i]) model[s][i] = '0;
    s_axis_tdata = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 10; t++) begin
      for (int s = 0; s < 3; s++) begin
        int len;
        len = $urandom_range(1, N);
        pk[s] = new[N];
        deg[s] = 0;
        for (int i = 0; i < N; i++) begin
          pk[s][i] = (i < len && $urandom_range(0, 3) != 0) ? 13'($urandom) : '0;
          if (pk[s][i] != 0) deg[s] = i;
        end
        send(pk[s], len);
        for (int i = len; i < N; i++) pk[s][i] = '0;
      end
      @(negedge clk);
      checks++;
      if (slots != 3 || s_axis_tready) begin failures++; $display("FAIL not full after 3 packets"); end
      for (int s = 0; s < 3; s++) begin
        checks++;
        if (in_deg[s] != 3'(deg[s])) begin failures++; $display("FAIL deg slot %0d: %0d vs %0d", s, in_deg[s], deg[s]); end
        for (int i = 0; i < N; i++) begin
          checks++;
          if (model[s][i] !== pk[s][i]) begin failures++; $display("FAIL slot %0d coef %0d", s, i); end
        end
      end
      // a fourth packet waits for rewind
      fork
        begin
          logic [12:0] q[];
          q = new[1]; q[0] = 13'h5;
          send(q, 1);
        end
        begin
          repeat (5) @(negedge clk);
          rewind = 1;
          @(negedge clk);
          rewind = 0;
        end
      join
      @(negedge clk);
      checks++;
      if (slots != 1 || model[0][0] != 13'h5) begin failures++; $display("FAIL after rewind"); end
      rewind = 1; @(negedge clk); rewind = 0;
    end
    // overflow: N+2 beats in one packet
    begin
      logic [12:0] q[];
      q = new[N + 2];
      foreach (q[i]) q[i] = 13'(i + 1);
      send(q, N + 2);
      @(negedge clk);
      checks++;
      if (!overflow || model[0][N-1] != 13'(N)) begin failures++; $display("FAIL overflow"); end
    end
    checks++;
    if (n_backpressure == 0) begin failures++; $display("FAIL back-pressure never seen"); end
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
