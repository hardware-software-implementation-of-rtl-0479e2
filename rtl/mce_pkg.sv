// mce_pkg: constants and types shared by the McEliece coprocessor.
//
// The code is a binary Goppa code over GF(2^13) with error capacity t = 315,
// so the Goppa polynomial has t+1 = 316 coefficients of 13 bits and a
// product of two such polynomials has up to 631 coefficients. The support
// has n = 2^13 = 8192 points. These numbers are the ones the coprocessor was
// specified with. The field's reduction polynomial z^13+z^4+z^3+z+1 and the
// numeric opcode type below are choices of this design; the opcode values
// themselves are the specified ones.
package mce_pkg;

  parameter int unsigned M       = 13;          // GF(2^m) degree
  parameter int unsigned T       = 315;         // errors corrected
  parameter int unsigned NCOEF   = T + 1;       // coefficients per operand
  parameter int unsigned RCOEF   = 2 * NCOEF;   // coefficients per result
  parameter int unsigned NSUP    = 1 << M;      // support size n
  // z^13 + z^4 + z^3 + z + 1 without the z^13 term
  parameter logic [M-1:0] GF_POLY = 13'h001B;

  typedef logic [M-1:0] gf_t;

  // Operation codes written by software into the control register
  typedef enum logic [3:0] {
    OP_MUL       = 4'b0000,   // op1 * op2
    OP_MULMOD    = 4'b0001,   // (op1 * op2) mod Gp
    OP_MULXOR    = 4'b0010,   // (op1 * op2) xor op3
    OP_MULXORMOD = 4'b0011,   // ((op1 * op2) xor op3) mod Gp
    OP_DIV       = 4'b0100,   // op1 / op2 (quotient and remainder)
    OP_ERRLOC    = 4'b1000,   // error location of sigma = op1
    OP_SETGP     = 4'b1110    // Gp := op1
  } opcode_e;

endpackage
