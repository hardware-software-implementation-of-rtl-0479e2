// gf_div: sequential divider in GF(2^M), res = op1 / op2.
//
// The divisor is inverted by Fermat's little theorem,
//   op2^-1 = op2^(2^M - 2) = prod_{i=1..M-1} op2^(2^i),
// one squaring and one multiplication per cycle, and the quotient is one
// further multiplication. The block's place (the GF_Div beside the Goppa
// multiplier) is specified; the inversion method is this design's choice.
//
// Interface: pulse start for one cycle with op1/op2 valid (they are latched).
// busy is high for M cycles; done pulses for one cycle in the cycle after the
// last step, and res/div0 then hold until the next start. Division by zero
// gives res = 0 and div0 = 1.
module gf_div #(
  parameter int unsigned   M    = mce_pkg::M,
  parameter logic [M-1:0]  POLY = mce_pkg::GF_POLY
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,
  input  logic [M-1:0] op1,
  input  logic [M-1:0] op2,
  output logic         busy,
  output logic         done,
  output logic [M-1:0] res,
  output logic         div0
);

  localparam int unsigned CW = $clog2(M + 1);

  logic [M-1:0]  a_q, x_q, r_q;
  logic [CW-1:0] step_q;
  logic [M-1:0]  sq, rx, fin;

  gf_mult #(.M(M), .POLY(POLY)) u_sq  (.op1(x_q), .op2(x_q), .res(sq));
  gf_mult #(.M(M), .POLY(POLY)) u_acc (.op1(r_q), .op2(sq),  .res(rx));
  gf_mult #(.M(M), .POLY(POLY)) u_fin (.op1(a_q), .op2(r_q), .res(fin));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy   <= 1'b0;
      done   <= 1'b0;
      res    <= '0;
      div0   <= 1'b0;
      a_q    <= '0;
      x_q    <= '0;
      r_q    <= '0;
      step_q <= '0;
    end else begin
      done <= 1'b0;
      if (start && !busy) begin
        busy   <= 1'b1;
        a_q    <= op1;
        x_q    <= op2;
        r_q    <= {{(M-1){1'b0}}, 1'b1};
        step_q <= '0;
        div0   <= (op2 == '0);
      end else if (busy) begin
        if (step_q == CW'(M - 1)) begin
          busy <= 1'b0;
          done <= 1'b1;
          res  <= fin;
        end else begin
          x_q    <= sq;
          r_q    <= rx;
          step_q <= step_q + 1'b1;
        end
      end
    end
  end

endmodule
