// tb_in_buffer: checks the input operand buffer at NCOEF = 8: random writes
// to the three slots, clearing of a slot together with a write, and that
// the three parallel outputs always match a reference copy.
module tb_in_buffer;
  localparam int N = 8;
  logic clk = 0, rst_n = 0, wr_en = 0, clr = 0;
  logic [1:0] wr_slot;
  logic [2:0] wr_idx;
  logic [12:0] wr_data;
  logic [N-1:0][12:0] op1, op2, op3;
  logic [12:0] model [3][N];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  in_buffer #(.NCOEF(N)) dut (.*);

  task automatic compare();
    for (int i = 0; i < N; i++) begin
      checks += 3;
      if (op1[i] !== model[0][i]) begin failures++; $display("FAIL op1[%0d]", i); end
      if (op2[i] !== model[1][i]) begin failures++; $display("FAIL op2[%0d]", i); end
      if (op3[i] !== model[2][i]) begin failures++; $display("FAIL op3[%0d]", i); end
    end
  endtask

  initial begin
    wr_slot = 0; wr_idx = 0; wr_data = 0;
    foreach (model[s, i]) model[s][i] = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    compare();
    for (int t = 0; t < 400; t++) begin
      wr_en   = ($urandom_range(0, 3) != 0);
      clr     = ($urandom_range(0, 15) == 0);
      wr_slot = 2'($urandom_range(0, 3));
      wr_idx  = 3'($urandom);
      wr_data = 13'($urandom);
      @(negedge clk);
      if (wr_slot != 3) begin
        if (clr) for (int i = 0; i < N; i++) model[wr_slot][i] = '0;
        if (wr_en) model[wr_slot][wr_idx] = wr_data;
      end
      compare();
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
