// gf_mult: combinational multiplier in GF(2^M), polynomial basis.
//
// res = op1 * op2 mod (z^M + POLY). It is the element the Goppa multiplier
// replicates 316 times and the error-location unit uses once. The structure
// (shift-and-add with interleaved reduction, an M-by-M AND/XOR array) is a
// choice of this design; only the block's role is specified. No clock, no
// latency: the product is valid in the same cycle.
module gf_mult #(
  parameter int unsigned   M    = mce_pkg::M,
  parameter logic [M-1:0]  POLY = mce_pkg::GF_POLY
) (
  input  logic [M-1:0] op1,
  input  logic [M-1:0] op2,
  output logic [M-1:0] res
);

  always_comb begin
    logic [M-1:0] acc;
    acc = '0;
    // Horner over the bits of op2, MSB first: acc = acc*z + op2[i]*op1
    for (int i = M - 1; i >= 0; i--) begin
      acc = acc[M-1] ? ({acc[M-2:0], 1'b0} ^ POLY) : {acc[M-2:0], 1'b0};
      if (op2[i]) acc = acc ^ op1;
    end
    res = acc;
  end

endmodule
