// error_loc: error location, eps_i = 1 exactly when sigma(alpha_i) = 0.
//
// As specified, the unit is a control unit around a single GF multiplier:
// the error-locator polynomial sigma(Z) is evaluated at every point of the
// support by Horner's rule, v = v*alpha + sigma[j], one multiplication per
// cycle. The support order is this design's choice: alpha_i is the field
// element whose polynomial-basis bit pattern is the integer i, for
// i = 0 .. NSUP-1 (all of GF(2^13) when NSUP = 8192).
//
// The degree d of sigma is found at start (highest non-zero coefficient);
// each point then takes d+1 cycles, so an evaluation takes NSUP*(d+1) cycles.
// The error vector is returned packed into the result register of the
// arithmetic unit: eps_i is bit i of the flattened RCOEF x M result, i.e.
// bit i%M of coefficient i/M (8192 bits fit in 632 x 13 = 8216).
//
// Interface: pulse start while idle with sigma valid and stable until done.
// done pulses one cycle; eps holds until the next start.
module error_loc #(
  parameter int unsigned   M     = mce_pkg::M,
  parameter int unsigned   NCOEF = mce_pkg::NCOEF,
  parameter int unsigned   NSUP  = mce_pkg::NSUP,
  parameter logic [M-1:0]  POLY  = mce_pkg::GF_POLY,
  localparam int unsigned  RCOEF = 2 * NCOEF
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     start,
  input  logic [NCOEF-1:0][M-1:0]  sigma,
  output logic                     busy,
  output logic                     done,
  output logic [RCOEF-1:0][M-1:0]  eps
);

  localparam int unsigned DW = $clog2(NCOEF);
  localparam int unsigned IW = $clog2(NSUP);

  if (NSUP > RCOEF * M) begin : g_chk
    $error("error_loc: NSUP does not fit the result register");
  end
  if (NSUP > (1 << M)) begin : g_chk2
    $error("error_loc: NSUP exceeds the field size");
  end

  logic [DW-1:0] deg_c, deg_q, j_q;
  logic [IW-1:0] i_q;
  logic [M-1:0]  v_q, alpha, prod;
  logic [RCOEF*M-1:0] eps_q;   // flat view: bit i is eps_i

  assign eps = eps_q;

  // degree of sigma: index of the highest non-zero coefficient
  always_comb begin
    deg_c = '0;
    for (int k = 0; k < NCOEF; k++)
      if (sigma[k] != '0) deg_c = DW'(k);
  end

  assign alpha = M'(i_q);

  gf_mult #(.M(M), .POLY(POLY)) u_gf (.op1(v_q), .op2(alpha), .res(prod));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy  <= 1'b0;
      done  <= 1'b0;
      eps_q <= '0;
      deg_q <= '0;
      j_q   <= '0;
      i_q   <= '0;
      v_q   <= '0;
    end else begin
      done <= 1'b0;
      if (start && !busy) begin
        busy  <= 1'b1;
        eps_q <= '0;
        deg_q <= deg_c;
        j_q   <= deg_c;
        v_q   <= sigma[deg_c];
        i_q   <= '0;
      end else if (busy) begin
        if (j_q != '0) begin
          v_q <= prod ^ sigma[j_q - 1'b1];
          j_q <= j_q - 1'b1;
        end else begin
          eps_q[i_q] <= (v_q == '0);
          if (i_q == IW'(NSUP - 1)) begin
            busy <= 1'b0;
            done <= 1'b1;
          end else begin
            i_q <= i_q + 1'b1;
            v_q <= sigma[deg_q];
            j_q <= deg_q;
          end
        end
      end
    end
  end

endmodule
