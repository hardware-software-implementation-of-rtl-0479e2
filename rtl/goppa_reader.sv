// goppa_reader: AXI4-Stream slave that loads polynomial operands.
//
// Each stream packet (ended by TLAST) is one polynomial, coefficient 0
// first, one 13-bit coefficient in the low bits of each 32-bit beat. The
// first packet goes to operand slot 0 (op1), the next to op1's successor,
// up to three. While all three slots are full, TREADY is low until rewind
// (an operation started, or software cleared the buffer) points the reader
// back at slot 0. For each slot the reader reports the input degree, the
// index of the highest non-zero coefficient received. Coefficients beyond
// NCOEF are dropped and flagged as overflow.
// That the reader takes polynomials from an AXI4-Stream and reports input
// degree is specified; the beat format, the slot order, the back-pressure
// rule and the overflow flag are this design's choices.
//
// Timing: one coefficient per cycle; a beat is written to the buffer at the
// clock edge on which it is accepted.
module goppa_reader #(
  parameter int unsigned  M     = mce_pkg::M,
  parameter int unsigned  NCOEF = mce_pkg::NCOEF,
  localparam int unsigned IW    = $clog2(NCOEF)
) (
  input  logic                clk,
  input  logic                rst_n,
  // AXI4-Stream slave
  input  logic [31:0]         s_axis_tdata,
  input  logic                s_axis_tvalid,
  output logic                s_axis_tready,
  input  logic                s_axis_tlast,
  // control
  input  logic                rewind,
  // buffer write port
  output logic                wr_en,
  output logic                clr,
  output logic [1:0]          wr_slot,
  output logic [IW-1:0]       wr_idx,
  output logic [M-1:0]        wr_data,
  // status
  output logic [2:0][IW-1:0]  in_deg,
  output logic [1:0]          slots,
  output logic                overflow
);

  logic [1:0]    slot_q;
  logic [IW:0]   cnt_q;       // beats received in the current packet
  logic          beat;

  assign s_axis_tready = (slot_q != 2'd3) && !rewind;
  assign beat          = s_axis_tvalid && s_axis_tready;
  assign wr_en         = beat && (cnt_q < (IW+1)'(NCOEF));
  assign clr           = beat && (cnt_q == '0);
  assign wr_slot       = slot_q;
  assign wr_idx        = cnt_q[IW-1:0];
  assign wr_data       = s_axis_tdata[M-1:0];
  assign slots         = slot_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      slot_q   <= '0;
      cnt_q    <= '0;
      in_deg   <= '0;
      overflow <= 1'b0;
    end else if (rewind) begin
      slot_q   <= '0;
      cnt_q    <= '0;
      overflow <= 1'b0;
    end else if (beat) begin
      if (cnt_q == '0) in_deg[slot_q] <= '0;
      if (wr_en && wr_data != '0) in_deg[slot_q] <= cnt_q[IW-1:0];
      if (!wr_en) overflow <= 1'b1;
      if (s_axis_tlast) begin
        slot_q <= slot_q + 1'b1;
        cnt_q  <= '0;
      end else if (cnt_q <= (IW+1)'(NCOEF)) begin
        cnt_q <= cnt_q + 1'b1;
      end
    end
  end

endmodule
