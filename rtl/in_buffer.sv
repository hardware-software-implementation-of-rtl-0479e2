// in_buffer: input operand buffer between the Goppa Reader and the
// arithmetic unit.
//
// Three slots of NCOEF coefficients hold op1, op2 and op3. The reader
// writes one coefficient per cycle; the arithmetic unit sees all three
// operands in parallel and copies them when an operation starts, after
// which the buffer may be refilled while the unit computes. That buffering
// role is specified; the slot organisation and the clear-on-first-word
// behaviour (so that a short polynomial leaves no stale high coefficients)
// are this design's choices.
//
// Interface: clr clears slot wr_slot in the same cycle as a write (the write
// wins for its own word). Writes take effect at the next clock edge.
module in_buffer #(
  parameter int unsigned  M     = mce_pkg::M,
  parameter int unsigned  NCOEF = mce_pkg::NCOEF,
  localparam int unsigned IW    = $clog2(NCOEF)
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     wr_en,
  input  logic                     clr,
  input  logic [1:0]               wr_slot,
  input  logic [IW-1:0]            wr_idx,
  input  logic [M-1:0]             wr_data,
  output logic [NCOEF-1:0][M-1:0]  op1,
  output logic [NCOEF-1:0][M-1:0]  op2,
  output logic [NCOEF-1:0][M-1:0]  op3
);

  logic [2:0][NCOEF-1:0][M-1:0] mem_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      mem_q <= '0;
    end else begin
      if (clr && wr_slot < 2'd3) mem_q[wr_slot] <= '0;
      if (wr_en && wr_slot < 2'd3) mem_q[wr_slot][wr_idx] <= wr_data;
    end
  end

  assign op1 = mem_q[0];
  assign op2 = mem_q[1];
  assign op3 = mem_q[2];

endmodule
