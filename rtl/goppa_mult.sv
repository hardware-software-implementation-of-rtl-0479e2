// goppa_mult: polynomial multiplier over GF(2^M) with an optional XOR term,
//   o(Z) = p1(Z) * p2(Z)            (use_xor = 0)
//   o(Z) = p1(Z) * p2(Z) xor p3(Z)  (use_xor = 1).
//
// As specified, NCOEF GF multipliers (316 for t = 315) work in parallel: in
// each cycle every one of them multiplies the same coefficient of p1 with
// its own coefficient of p2, so a whole row p1[i]*p2(Z) is formed per cycle.
// A separate XOR adds p3 and a multiplexer picks the plain or the XORed
// product. How the rows are accumulated is this design's choice: the control
// unit walks p1 from coefficient n1-1 down to 0 and updates the accumulator
// Horner-style, acc = acc*Z + p1[i]*p2(Z), so only a fixed one-coefficient
// shift is needed instead of a barrel shifter.
//
// Interface: pulse start while idle. p1, p2, p3, n1 and use_xor must stay
// stable until done. Only the n1 low coefficients of p1 are used, so a
// scalar times a polynomial (n1 = 1) costs one cycle. busy is high for
// max(n1,1) cycles, done pulses one cycle after, and o holds until the next
// start.
module goppa_mult #(
  parameter int unsigned   M     = mce_pkg::M,
  parameter int unsigned   NCOEF = mce_pkg::NCOEF,
  parameter logic [M-1:0]  POLY  = mce_pkg::GF_POLY,
  localparam int unsigned  RCOEF = 2 * NCOEF,
  localparam int unsigned  CW    = $clog2(NCOEF + 1)
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic                        start,
  input  logic [CW-1:0]               n1,
  input  logic                        use_xor,
  input  logic [NCOEF-1:0][M-1:0]     p1,
  input  logic [NCOEF-1:0][M-1:0]     p2,
  input  logic [RCOEF-1:0][M-1:0]     p3,
  output logic                        busy,
  output logic                        done,
  output logic [RCOEF-1:0][M-1:0]     o
);

  logic [RCOEF-1:0][M-1:0] acc_q;
  logic [CW-1:0]           idx_q;
  logic [M-1:0]            coef;
  logic [NCOEF-1:0][M-1:0] row;

  // control unit: select the p1 coefficient for this cycle
  assign coef = p1[idx_q];

  // the array of GF multipliers, GF_Mult 1 .. NCOEF
  for (genvar j = 0; j < NCOEF; j++) begin : g_mul
    gf_mult #(.M(M), .POLY(POLY)) u_gf (.op1(coef), .op2(p2[j]), .res(row[j]));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc_q <= '0;
      idx_q <= '0;
      busy  <= 1'b0;
      done  <= 1'b0;
    end else begin
      done <= 1'b0;
      if (start && !busy) begin
        acc_q <= '0;
        if (n1 == '0) begin
          done <= 1'b1;
        end else begin
          busy  <= 1'b1;
          idx_q <= n1 - 1'b1;
        end
      end else if (busy) begin
        acc_q <= {acc_q[RCOEF-2:0], {M{1'b0}}} ^ {{NCOEF{{M{1'b0}}}}, row};
        if (idx_q == '0) begin
          busy <= 1'b0;
          done <= 1'b1;
        end else begin
          idx_q <= idx_q - 1'b1;
        end
      end
    end
  end

  // XOR block and output multiplexer
  assign o = use_xor ? (acc_q ^ p3) : acc_q;

  // operands must not change while the multiplication runs
  a_stable : assert property (@(posedge clk) disable iff (!rst_n)
                              busy |-> ($stable(p1) && $stable(p2) && $stable(n1)));

endmodule
