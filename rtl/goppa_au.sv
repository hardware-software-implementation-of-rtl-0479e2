// goppa_au: the 316 x 13-bit Goppa Arithmetic Unit.
//
// It decodes the 4-bit operation code written by software and runs one
// operation on up to three polynomial operands of NCOEF coefficients:
//   0000 op1*op2            0001 (op1*op2) mod Gp
//   0010 (op1*op2) xor op3  0011 ((op1*op2) xor op3) mod Gp
//   0100 op1/op2            1000 error location of op1
//   1110 set Gp := op1      any other code (1001 included) is rejected.
// The operation codes, the two sub-units (XOR-Mod Multiplier/Divisor and
// Error Location) and the Gp register follow the specification; the start
// handshake, the result hand-off and the result lengths are this design's.
//
// Operands are copied from the input buffer when an operation starts, so
// the buffer can be refilled while the unit is busy. The result stays in the
// unit (res_valid) until the output buffer takes it with res_take; a new
// operation is not started before that, which stalls start_req. res_len is
// the number of result coefficients worth sending:
//   MUL, MULXOR: 2*NCOEF-1    MULMOD, MULXORMOD: NCOEF-1
//   DIV: 2*NCOEF (quotient, then remainder)    ERRLOC: ceil(NSUP/M)
// cycles counts the clock cycles of the last operation, start to done.
//
// Interface: hold start_req with opcode and operands valid; start_ack
// pulses when they are taken. done pulses when the operation ends; err
// (illegal code or division by zero) holds until the next start.
module goppa_au #(
  parameter int unsigned   M     = mce_pkg::M,
  parameter int unsigned   NCOEF = mce_pkg::NCOEF,
  parameter int unsigned   NSUP  = mce_pkg::NSUP,
  parameter logic [M-1:0]  POLY  = mce_pkg::GF_POLY,
  localparam int unsigned  RCOEF = 2 * NCOEF,
  localparam int unsigned  LW    = $clog2(RCOEF + 1)
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     start_req,
  input  logic [3:0]               opcode,
  input  logic [NCOEF-1:0][M-1:0]  in_op1,
  input  logic [NCOEF-1:0][M-1:0]  in_op2,
  input  logic [NCOEF-1:0][M-1:0]  in_op3,
  output logic                     start_ack,
  output logic                     busy,
  output logic                     done,
  output logic                     err,
  output logic                     res_valid,
  output logic [RCOEF-1:0][M-1:0]  res,
  output logic [LW-1:0]            res_len,
  input  logic                     res_take,
  output logic [31:0]              cycles
);

  typedef enum logic [1:0] { A_IDLE, A_XMD, A_ELOC, A_SET } astate_e;

  astate_e                  st_q;
  mce_pkg::opcode_e         op_q;
  logic [NCOEF-1:0][M-1:0]  op1_q, op2_q, op3_q, gp_q;
  logic                     x_start_q, e_start_q;
  logic                     x_busy, x_done, x_err, e_busy, e_done;
  logic [RCOEF-1:0][M-1:0]  x_res, e_res;
  logic                     legal_c, is_xmd_c;

  always_comb begin
    legal_c  = 1'b1;
    is_xmd_c = 1'b0;
    unique case (opcode)
      4'b0000, 4'b0001, 4'b0010, 4'b0011, 4'b0100: is_xmd_c = 1'b1;
      4'b1000, 4'b1110: ;
      default: legal_c = 1'b0;
    endcase
  end

  goppa_xmd #(.M(M), .NCOEF(NCOEF), .POLY(POLY)) u_xmd (
    .clk, .rst_n, .start(x_start_q), .op(op_q), .a(op1_q), .b(op2_q),
    .c(op3_q), .gp(gp_q), .busy(x_busy), .done(x_done), .err(x_err),
    .res(x_res)
  );

  error_loc #(.M(M), .NCOEF(NCOEF), .NSUP(NSUP), .POLY(POLY)) u_eloc (
    .clk, .rst_n, .start(e_start_q), .sigma(op1_q), .busy(e_busy),
    .done(e_done), .eps(e_res)
  );

  assign busy = (st_q != A_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st_q      <= A_IDLE;
      op_q      <= mce_pkg::OP_MUL;
      op1_q     <= '0;
      op2_q     <= '0;
      op3_q     <= '0;
      gp_q      <= '0;
      x_start_q <= 1'b0;
      e_start_q <= 1'b0;
      start_ack <= 1'b0;
      done      <= 1'b0;
      err       <= 1'b0;
      res_valid <= 1'b0;
      res       <= '0;
      res_len   <= '0;
      cycles    <= '0;
    end else begin
      x_start_q <= 1'b0;
      e_start_q <= 1'b0;
      start_ack <= 1'b0;
      done      <= 1'b0;
      if (res_take) res_valid <= 1'b0;
      if (st_q != A_IDLE) cycles <= cycles + 1'b1;
      unique case (st_q)
        A_IDLE: if (start_req && !start_ack && !res_valid) begin
          start_ack <= 1'b1;
          cycles    <= 32'd1;
          err       <= 1'b0;
          op1_q     <= in_op1;
          op2_q     <= in_op2;
          op3_q     <= in_op3;
          op_q      <= mce_pkg::opcode_e'(opcode);
          if (!legal_c) begin
            err  <= 1'b1;
            done <= 1'b1;
          end else if (is_xmd_c) begin
            x_start_q <= 1'b1;
            st_q      <= A_XMD;
          end else if (opcode == 4'b1000) begin
            e_start_q <= 1'b1;
            st_q      <= A_ELOC;
          end else begin
            st_q <= A_SET;
          end
        end
        A_XMD: if (x_done) begin
          res       <= x_res;
          err       <= x_err;
          res_valid <= !x_err;
          unique case (op_q)
            mce_pkg::OP_MUL, mce_pkg::OP_MULXOR: res_len <= LW'(2 * NCOEF - 1);
            mce_pkg::OP_DIV:                     res_len <= LW'(RCOEF);
            default:                             res_len <= LW'(NCOEF - 1);
          endcase
          done <= 1'b1;
          st_q <= A_IDLE;
        end
        A_ELOC: if (e_done) begin
          res       <= e_res;
          res_valid <= 1'b1;
          res_len   <= LW'((NSUP + M - 1) / M);
          done      <= 1'b1;
          st_q      <= A_IDLE;
        end
        A_SET: begin
          gp_q <= op1_q;
          done <= 1'b1;
          st_q <= A_IDLE;
        end
        default: st_q <= A_IDLE;
      endcase
    end
  end

endmodule
