// out_buffer: result buffer between the arithmetic unit and the Goppa
// Writer.
//
// When the arithmetic unit holds a result and the buffer is empty, the
// whole result (RCOEF coefficients) and its length are copied in one cycle
// and load_take is pulsed; the unit is then free for its next operation
// while the writer streams the copy out coefficient by coefficient. The
// buffering role is specified; the take/release handshake is this design's.
//
// Interface: full is high from the copy until the writer pulses release.
// rd_data is a combinational read of coefficient rd_idx.
module out_buffer #(
  parameter int unsigned  M     = mce_pkg::M,
  parameter int unsigned  NCOEF = mce_pkg::NCOEF,
  localparam int unsigned RCOEF = 2 * NCOEF,
  localparam int unsigned LW    = $clog2(RCOEF + 1),
  localparam int unsigned RW    = $clog2(RCOEF)
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     load_valid,
  input  logic [RCOEF-1:0][M-1:0]  load_data,
  input  logic [LW-1:0]            load_len,
  output logic                     load_take,
  output logic                     full,
  output logic [LW-1:0]            len,
  input  logic [RW-1:0]            rd_idx,
  output logic [M-1:0]             rd_data,
  input  logic                     release_buf
);

  logic [RCOEF-1:0][M-1:0] mem_q;

  assign load_take = load_valid && !full;
  assign rd_data   = mem_q[rd_idx];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      mem_q <= '0;
      len   <= '0;
      full  <= 1'b0;
    end else begin
      if (load_take) begin
        mem_q <= load_data;
        len   <= load_len;
        full  <= 1'b1;
      end else if (release_buf) begin
        full <= 1'b0;
      end
    end
  end

endmodule
