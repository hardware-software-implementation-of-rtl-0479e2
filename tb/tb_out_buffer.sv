// tb_out_buffer: checks the output buffer at NCOEF = 8: a result is taken
// only while the buffer is empty, is held against later results until
// release, and every coefficient reads back through rd_idx.
module tb_out_buffer;
  localparam int N = 8;
  logic clk = 0, rst_n = 0, load_valid = 0, release_buf = 0;
  logic [2*N-1:0][12:0] load_data, held;
  logic [4:0] load_len, len;
  logic [3:0] rd_idx;
  logic [12:0] rd_data;
  logic load_take, full;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  out_buffer #(.NCOEF(N)) dut (.*);

  task automatic readback(logic [2*N-1:0][12:0] exp);
    for (int i = 0; i < 2*N; i++) begin
      rd_idx = 4'(i);
      #1;
      checks++;
      if (rd_data !== exp[i]) begin failures++; $display("FAIL coef %0d", i); end
    end
  endtask

  initial begin
    load_data = '0; load_len = 0; rd_idx = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 20; t++) begin
      for (int i = 0; i < 2*N; i++) load_data[i] = 13'($urandom);
      load_len = 5'($urandom_range(0, 2*N));
      load_valid = 1;
      #1;
      checks++;
      if (!load_take) begin failures++; $display("FAIL empty buffer did not take"); end
      @(negedge clk);
      held = load_data;
      checks++;
      if (!full || len != load_len) begin failures++; $display("FAIL not full / len"); end
      // a second result must wait
      for (int i = 0; i < 2*N; i++) load_data[i] = 13'($urandom);
      #1;
      checks++;
      if (load_take) begin failures++; $display("FAIL took while full"); end
      @(negedge clk);
      load_valid = 0;
      readback(held);
      @(negedge clk);
      release_buf = 1;
      @(negedge clk);
      release_buf = 0;
      checks++;
      if (full) begin failures++; $display("FAIL still full after release"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
