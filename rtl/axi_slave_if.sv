// axi_slave_if: AXI4-Lite slave register file of the McEliece coprocessor.
//
// The host processor configures and polls the coprocessor through these
// registers; the operation code written here selects what the arithmetic
// unit does. That the host reaches the coprocessor over an AXI4-Lite slave
// interface, sends control to the arithmetic unit and reads back status and
// the input and output degrees is specified. The register map below is this
// design's:
//   0x00 CTRL    W: [3:0] opcode, [8] START, [9] CLEAR (rewind the reader)
//                R: [3:0] opcode, [8] start pending
//   0x04 STATUS  R: [0] busy, [1] done (sticky, cleared by START),
//                   [2] error, [3] result waiting in the unit,
//                   [4] writer sending, [6:5] operand slots filled,
//                   [7] operand overflow
//   0x08 IN_DEG0, 0x0C IN_DEG1, 0x10 IN_DEG2   R: input degrees
//   0x14 OUT_DEG R: degree of the last polynomial sent
//   0x18 CYCLES  R: clock cycles of the last operation
// START sets a request that is held until the arithmetic unit acknowledges
// it. Write strobes are ignored (whole-word writes); unknown addresses read
// 0 and responses are always OKAY.
//
// Timing: a write is accepted when address and data are both valid and no
// response is pending, with BVALID one cycle later; a read returns RVALID
// the cycle after ARVALID is accepted.
module axi_slave_if #(
  parameter int unsigned  AW = 6,
  parameter int unsigned  DW = $clog2(mce_pkg::NCOEF)  // input-degree width
) (
  input  logic                clk,
  input  logic                rst_n,
  // AXI4-Lite slave
  input  logic [AW-1:0]       s_axi_awaddr,
  input  logic                s_axi_awvalid,
  output logic                s_axi_awready,
  input  logic [31:0]         s_axi_wdata,
  input  logic [3:0]          s_axi_wstrb,
  input  logic                s_axi_wvalid,
  output logic                s_axi_wready,
  output logic [1:0]          s_axi_bresp,
  output logic                s_axi_bvalid,
  input  logic                s_axi_bready,
  input  logic [AW-1:0]       s_axi_araddr,
  input  logic                s_axi_arvalid,
  output logic                s_axi_arready,
  output logic [31:0]         s_axi_rdata,
  output logic [1:0]          s_axi_rresp,
  output logic                s_axi_rvalid,
  input  logic                s_axi_rready,
  // control to the arithmetic unit and the reader
  output logic [3:0]          opcode,
  output logic                start_req,
  input  logic                start_ack,
  output logic                clear,
  // status
  input  logic                au_busy,
  input  logic                au_done,
  input  logic                au_err,
  input  logic                res_valid,
  input  logic                wr_active,
  input  logic [1:0]          slots,
  input  logic                overflow,
  input  logic [2:0][DW-1:0]  in_deg,
  input  logic [DW:0]         out_deg,
  input  logic [31:0]         cycles
);

  logic wr_fire, rd_fire, done_q;

  assign s_axi_awready = s_axi_awvalid && s_axi_wvalid && !s_axi_bvalid;
  assign s_axi_wready  = s_axi_awready;
  assign wr_fire       = s_axi_awready;
  assign s_axi_arready = !s_axi_rvalid;
  assign rd_fire       = s_axi_arvalid && s_axi_arready;
  assign s_axi_bresp   = 2'b00;
  assign s_axi_rresp   = 2'b00;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s_axi_bvalid <= 1'b0;
      s_axi_rvalid <= 1'b0;
      s_axi_rdata  <= '0;
      opcode       <= '0;
      start_req    <= 1'b0;
      clear        <= 1'b0;
      done_q       <= 1'b0;
    end else begin
      clear <= 1'b0;
      if (start_ack) start_req <= 1'b0;
      if (au_done) done_q <= 1'b1;
      // write channel
      if (wr_fire) begin
        s_axi_bvalid <= 1'b1;
        if (s_axi_awaddr[AW-1:2] == '0) begin
          opcode <= s_axi_wdata[3:0];
          if (s_axi_wdata[8]) begin
            start_req <= 1'b1;
            done_q    <= 1'b0;
          end
          clear <= s_axi_wdata[9];
        end
      end else if (s_axi_bvalid && s_axi_bready) begin
        s_axi_bvalid <= 1'b0;
      end
      // read channel
      if (rd_fire) begin
        s_axi_rvalid <= 1'b1;
        unique case (s_axi_araddr[AW-1:2])
          (AW-2)'(0): s_axi_rdata <= {23'b0, start_req, 4'b0, opcode};
          (AW-2)'(1): s_axi_rdata <= {24'b0, overflow, slots, wr_active,
                                      res_valid, au_err, done_q, au_busy};
          (AW-2)'(2): s_axi_rdata <= 32'(in_deg[0]);
          (AW-2)'(3): s_axi_rdata <= 32'(in_deg[1]);
          (AW-2)'(4): s_axi_rdata <= 32'(in_deg[2]);
          (AW-2)'(5): s_axi_rdata <= 32'(out_deg);
          (AW-2)'(6): s_axi_rdata <= cycles;
          default:    s_axi_rdata <= '0;
        endcase
      end else if (s_axi_rvalid && s_axi_rready) begin
        s_axi_rvalid <= 1'b0;
      end
    end
  end

  // AXI rule: a response stays valid and unchanged until it is taken
  a_rhold : assert property (@(posedge clk) disable iff (!rst_n)
      s_axi_rvalid && !s_axi_rready |=> s_axi_rvalid && $stable(s_axi_rdata));
  a_bhold : assert property (@(posedge clk) disable iff (!rst_n)
      s_axi_bvalid && !s_axi_bready |=> s_axi_bvalid);

endmodule
