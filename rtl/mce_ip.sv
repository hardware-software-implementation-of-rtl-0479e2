// mce_ip: McEliece coprocessor ("McEliece IP"), top level.
//
// The coprocessor takes over the three slowest steps of Patterson decoding
// of a binary Goppa code over GF(2^13) with t = 315 from the host processor:
// the syndrome inverse and the key equation (both extended-Euclid loops
// built from the polynomial operations below) and the error-vector search.
// It is a slave peripheral: the host writes an operation code and START
// through the AXI4-Lite register interface; operands arrive as polynomials
// on an AXI4-Stream slave port and the result leaves on an AXI4-Stream
// master port.
//
// Data path, as specified: Goppa Reader -> input buffer -> 316 x 13-bit
// Goppa Arithmetic Unit (XOR-Mod Multiplier/Divisor and Error Location) ->
// output buffer -> Goppa Writer, with the reader's input degrees and the
// writer's output degree reported to the register interface, which in turn
// controls the unit and reads its status. See axi_slave_if for the register
// map and goppa_au for the operation codes and result lengths.
//
// Operation: stream op1 (and op2, op3 as needed) as separate packets, write
// CTRL = START | opcode, poll STATUS.done, read the result packet from the
// master stream. Starting an operation rewinds the reader, so the next
// operands may be streamed while the unit is busy; a finished result is
// held in the unit until the output buffer is free.
module mce_ip #(
  parameter int unsigned   M     = mce_pkg::M,
  parameter int unsigned   NCOEF = mce_pkg::NCOEF,
  parameter int unsigned   NSUP  = mce_pkg::NSUP,
  parameter logic [M-1:0]  POLY  = mce_pkg::GF_POLY,
  parameter int unsigned   AW    = 6
) (
  input  logic           clk,
  input  logic           rst_n,
  // AXI4-Lite slave (host registers)
  input  logic [AW-1:0]  s_axi_awaddr,
  input  logic           s_axi_awvalid,
  output logic           s_axi_awready,
  input  logic [31:0]    s_axi_wdata,
  input  logic [3:0]     s_axi_wstrb,
  input  logic           s_axi_wvalid,
  output logic           s_axi_wready,
  output logic [1:0]     s_axi_bresp,
  output logic           s_axi_bvalid,
  input  logic           s_axi_bready,
  input  logic [AW-1:0]  s_axi_araddr,
  input  logic           s_axi_arvalid,
  output logic           s_axi_arready,
  output logic [31:0]    s_axi_rdata,
  output logic [1:0]     s_axi_rresp,
  output logic           s_axi_rvalid,
  input  logic           s_axi_rready,
  // AXI4-Stream slave (operands in)
  input  logic [31:0]    s_axis_tdata,
  input  logic           s_axis_tvalid,
  output logic           s_axis_tready,
  input  logic           s_axis_tlast,
  // AXI4-Stream master (results out)
  output logic [31:0]    m_axis_tdata,
  output logic           m_axis_tvalid,
  input  logic           m_axis_tready,
  output logic           m_axis_tlast
);

  localparam int unsigned RCOEF = 2 * NCOEF;
  localparam int unsigned IW    = $clog2(NCOEF);
  localparam int unsigned LW    = $clog2(RCOEF + 1);
  localparam int unsigned RW    = $clog2(RCOEF);

  // register interface <-> core
  logic [3:0]  opcode;
  logic        start_req, start_ack, clear;
  logic        au_busy, au_done, au_err, res_valid, wr_active;
  logic [31:0] cycles;

  // reader -> input buffer
  logic                    wr_en, clr;
  logic [1:0]              wr_slot, slots;
  logic [IW-1:0]           wr_idx;
  logic [M-1:0]            wr_data;
  logic [2:0][IW-1:0]      in_deg;
  logic                    overflow;
  logic [NCOEF-1:0][M-1:0] op1, op2, op3;

  // unit -> output buffer -> writer
  logic [RCOEF-1:0][M-1:0] res;
  logic [LW-1:0]           res_len, ob_len;
  logic                    res_take, ob_full, ob_release;
  logic [RW-1:0]           ob_idx, out_deg;
  logic [M-1:0]            ob_data;

  axi_slave_if #(.AW(AW), .DW(IW)) u_axi (
    .clk, .rst_n,
    .s_axi_awaddr, .s_axi_awvalid, .s_axi_awready, .s_axi_wdata, .s_axi_wstrb,
    .s_axi_wvalid, .s_axi_wready, .s_axi_bresp, .s_axi_bvalid, .s_axi_bready,
    .s_axi_araddr, .s_axi_arvalid, .s_axi_arready, .s_axi_rdata, .s_axi_rresp,
    .s_axi_rvalid, .s_axi_rready,
    .opcode, .start_req, .start_ack, .clear,
    .au_busy, .au_done, .au_err, .res_valid, .wr_active, .slots, .overflow,
    .in_deg, .out_deg(out_deg), .cycles
  );

  goppa_reader #(.M(M), .NCOEF(NCOEF)) u_reader (
    .clk, .rst_n,
    .s_axis_tdata, .s_axis_tvalid, .s_axis_tready, .s_axis_tlast,
    .rewind(start_ack || clear),
    .wr_en, .clr, .wr_slot, .wr_idx, .wr_data,
    .in_deg, .slots, .overflow
  );

  in_buffer #(.M(M), .NCOEF(NCOEF)) u_inbuf (
    .clk, .rst_n, .wr_en, .clr, .wr_slot, .wr_idx, .wr_data,
    .op1, .op2, .op3
  );

  goppa_au #(.M(M), .NCOEF(NCOEF), .NSUP(NSUP), .POLY(POLY)) u_au (
    .clk, .rst_n, .start_req, .opcode,
    .in_op1(op1), .in_op2(op2), .in_op3(op3),
    .start_ack, .busy(au_busy), .done(au_done), .err(au_err),
    .res_valid, .res, .res_len, .res_take, .cycles
  );

  out_buffer #(.M(M), .NCOEF(NCOEF)) u_outbuf (
    .clk, .rst_n, .load_valid(res_valid), .load_data(res), .load_len(res_len),
    .load_take(res_take), .full(ob_full), .len(ob_len), .rd_idx(ob_idx),
    .rd_data(ob_data), .release_buf(ob_release)
  );

  goppa_writer #(.M(M), .NCOEF(NCOEF)) u_writer (
    .clk, .rst_n, .full(ob_full), .len(ob_len), .rd_idx(ob_idx),
    .rd_data(ob_data), .release_buf(ob_release),
    .m_axis_tdata, .m_axis_tvalid, .m_axis_tready, .m_axis_tlast,
    .out_deg, .active(wr_active)
  );

endmodule
