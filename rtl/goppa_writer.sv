// goppa_writer: AXI4-Stream master that sends results to memory.
//
// When the output buffer is full the writer sends its first len
// coefficients as one packet, coefficient 0 first, one per beat in the low
// 13 bits of a 32-bit word, with TLAST on the last beat, then releases the
// buffer. While sending it tracks the index of the highest non-zero
// coefficient and reports it as the output degree when the packet ends.
// Streaming results out and reporting the output degree are specified; the
// beat format and the degree rule are this design's choices.
//
// Timing: one beat per cycle while TREADY is high. TVALID, TDATA and TLAST
// stay stable until the beat is taken. A zero-length result is released
// without a packet.
module goppa_writer #(
  parameter int unsigned  M     = mce_pkg::M,
  parameter int unsigned  NCOEF = mce_pkg::NCOEF,
  localparam int unsigned RCOEF = 2 * NCOEF,
  localparam int unsigned LW    = $clog2(RCOEF + 1),
  localparam int unsigned RW    = $clog2(RCOEF)
) (
  input  logic           clk,
  input  logic           rst_n,
  // output buffer
  input  logic           full,
  input  logic [LW-1:0]  len,
  output logic [RW-1:0]  rd_idx,
  input  logic [M-1:0]   rd_data,
  output logic           release_buf,
  // AXI4-Stream master
  output logic [31:0]    m_axis_tdata,
  output logic           m_axis_tvalid,
  input  logic           m_axis_tready,
  output logic           m_axis_tlast,
  // status
  output logic [RW-1:0]  out_deg,
  output logic           active
);

  logic [LW-1:0] idx_q;
  logic [RW-1:0] deg_q;
  logic          last;

  assign active        = full && !release_buf;
  assign rd_idx        = idx_q[RW-1:0];
  assign m_axis_tvalid = active && (len != '0);
  assign m_axis_tdata  = {{(32-M){1'b0}}, rd_data};
  assign last          = (idx_q == len - 1'b1);
  assign m_axis_tlast  = last;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      idx_q       <= '0;
      deg_q       <= '0;
      out_deg     <= '0;
      release_buf <= 1'b0;
    end else begin
      release_buf <= 1'b0;
      if (active && len == '0) begin
        release_buf <= 1'b1;
      end else if (m_axis_tvalid && m_axis_tready) begin
        if (last) begin
          out_deg     <= (rd_data != '0) ? idx_q[RW-1:0] : deg_q;
          deg_q       <= '0;
          idx_q       <= '0;
          release_buf <= 1'b1;
        end else begin
          if (rd_data != '0) deg_q <= idx_q[RW-1:0];
          idx_q <= idx_q + 1'b1;
        end
      end
    end
  end

  a_hold : assert property (@(posedge clk) disable iff (!rst_n)
      m_axis_tvalid && !m_axis_tready |=> m_axis_tvalid && $stable(m_axis_tdata)
                                          && $stable(m_axis_tlast));

endmodule
