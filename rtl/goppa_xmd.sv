// goppa_xmd: the Goppa XOR-Mod Multiplier/Divisor.
//
// It performs the five polynomial operations of the coprocessor that are not
// error location, with one Goppa multiplier (goppa_mult), one GF divider
// (gf_div) and a control unit that sequences them:
//   MUL        res = a*b
//   MULMOD     res = (a*b) mod gp
//   MULXOR     res = (a*b) xor c
//   MULXORMOD  res = ((a*b) xor c) mod gp
//   DIV        res[0 .. NCOEF-1]        = quotient  of a / b
//              res[NCOEF .. 2*NCOEF-1]  = remainder of a / b
// The block composition (Goppa multiplier + GF divider under a control unit)
// and the operation set are specified; the reduction and division algorithm
// and the result layout of DIV are this design's own.
//
// Reduction and division share one long-division engine. The divisor D is
// first normalised (shifted up one coefficient per cycle until its leading
// coefficient sits at index NCOEF-1, sh shifts), its leading coefficient is
// inverted by gf_div, and D is scaled to a monic D' with a one-cycle
// scalar multiplication. The dividend lives in a rotating register W of
// WL = 2*NCOEF-1 coefficients. In each of NCOEF+sh elimination steps the top
// coefficient c = W[WL-1] is cancelled by W[WL-NCOEF..WL-1] ^= c*D' (the
// Goppa multiplier with n1 = 1 and its XOR input) and W rotates left by one;
// c is shifted into the quotient. deg(D) further rotations bring W back to
// its original alignment, leaving the remainder in W[0 .. deg(D)-1]. Steps
// with c = 0 take one cycle, others three.
//
// Interface: pulse start while idle with op, a, b, c, gp valid; these must
// stay stable until done. done pulses for one cycle; res and err (division by
// a zero polynomial) hold until the next start.
module goppa_xmd #(
  parameter int unsigned   M     = mce_pkg::M,
  parameter int unsigned   NCOEF = mce_pkg::NCOEF,
  parameter logic [M-1:0]  POLY  = mce_pkg::GF_POLY,
  localparam int unsigned  RCOEF = 2 * NCOEF,
  localparam int unsigned  WL    = 2 * NCOEF - 1
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     start,
  input  mce_pkg::opcode_e                  op,
  input  logic [NCOEF-1:0][M-1:0]  a,
  input  logic [NCOEF-1:0][M-1:0]  b,
  input  logic [NCOEF-1:0][M-1:0]  c,
  input  logic [NCOEF-1:0][M-1:0]  gp,
  output logic                     busy,
  output logic                     done,
  output logic                     err,
  output logic [RCOEF-1:0][M-1:0]  res
);

  localparam int unsigned CW  = $clog2(NCOEF + 1);
  localparam int unsigned KW  = $clog2(WL + 1);

  typedef enum logic [3:0] {
    S_IDLE, S_MUL, S_NORM, S_INV, S_SCALE, S_STEP, S_STEPW, S_QSCALE, S_DONE
  } state_e;

  state_e                   state_q;
  logic                     is_div_q, do_mod_q, use_xor_q;
  logic [WL-1:0][M-1:0]     w_q;
  logic [NCOEF-1:0][M-1:0]  d_q, q_q;
  logic [M-1:0]             inv_q, scal_q;
  logic [KW-1:0]            cnt_q, sh_q;
  logic                     gm_start_q, gd_start_q;

  // Goppa multiplier and its operand multiplexers
  logic [NCOEF-1:0][M-1:0]  gm_p1, gm_p2;
  logic [RCOEF-1:0][M-1:0]  gm_p3, gm_o;
  logic [CW-1:0]            gm_n1;
  logic                     gm_xor, gm_busy, gm_done;

  always_comb begin
    if (state_q == S_MUL) begin
      gm_p1  = a;
      gm_p2  = b;
      gm_p3  = {{NCOEF{{M{1'b0}}}}, c};
      gm_n1  = CW'(NCOEF);
      gm_xor = use_xor_q;
    end else begin
      gm_p1  = {{(NCOEF-1){{M{1'b0}}}}, scal_q};
      gm_p2  = (state_q == S_QSCALE) ? q_q : d_q;
      gm_p3  = {{NCOEF{{M{1'b0}}}}, w_q[WL-1 -: NCOEF]};
      gm_n1  = CW'(1);
      gm_xor = (state_q == S_STEPW);
    end
  end

  goppa_mult #(.M(M), .NCOEF(NCOEF), .POLY(POLY)) u_gmult (
    .clk, .rst_n, .start(gm_start_q), .n1(gm_n1), .use_xor(gm_xor),
    .p1(gm_p1), .p2(gm_p2), .p3(gm_p3),
    .busy(gm_busy), .done(gm_done), .o(gm_o)
  );

  // GF divider: inverse of the divisor's leading coefficient
  logic [M-1:0] gd_res;
  logic         gd_busy, gd_done, gd_div0;

  gf_div #(.M(M), .POLY(POLY)) u_gdiv (
    .clk, .rst_n, .start(gd_start_q), .op1({{(M-1){1'b0}}, 1'b1}),
    .op2(d_q[NCOEF-1]), .busy(gd_busy), .done(gd_done), .res(gd_res),
    .div0(gd_div0)
  );

  function automatic logic [WL-1:0][M-1:0] rotl(input logic [WL-1:0][M-1:0] v);
    return {v[WL-2:0], v[WL-1]};
  endfunction

  assign busy = (state_q != S_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q    <= S_IDLE;
      is_div_q   <= 1'b0;
      do_mod_q   <= 1'b0;
      use_xor_q  <= 1'b0;
      w_q        <= '0;
      d_q        <= '0;
      q_q        <= '0;
      inv_q      <= '0;
      scal_q     <= '0;
      cnt_q      <= '0;
      sh_q       <= '0;
      gm_start_q <= 1'b0;
      gd_start_q <= 1'b0;
      done       <= 1'b0;
      err        <= 1'b0;
      res        <= '0;
    end else begin
      gm_start_q <= 1'b0;
      gd_start_q <= 1'b0;
      done       <= 1'b0;
      unique case (state_q)
        S_IDLE: if (start) begin
          err       <= 1'b0;
          is_div_q  <= (op == mce_pkg::OP_DIV);
          do_mod_q  <= (op == mce_pkg::OP_MULMOD) || (op == mce_pkg::OP_MULXORMOD);
          use_xor_q <= (op == mce_pkg::OP_MULXOR) || (op == mce_pkg::OP_MULXORMOD);
          sh_q      <= '0;
          if (op == mce_pkg::OP_DIV) begin
            w_q     <= {{(WL-NCOEF){{M{1'b0}}}}, a};
            d_q     <= b;
            state_q <= S_NORM;
          end else begin
            gm_start_q <= 1'b1;
            state_q    <= S_MUL;
          end
        end
        S_MUL: if (gm_done) begin
          if (do_mod_q) begin
            w_q     <= gm_o[WL-1:0];
            d_q     <= gp;
            state_q <= S_NORM;
          end else begin
            res     <= gm_o;
            state_q <= S_DONE;
          end
        end
        S_NORM: begin
          if (d_q == '0) begin
            err     <= 1'b1;
            res     <= '0;
            state_q <= S_DONE;
          end else if (d_q[NCOEF-1] != '0) begin
            gd_start_q <= 1'b1;
            state_q    <= S_INV;
          end else begin
            d_q  <= {d_q[NCOEF-2:0], {M{1'b0}}};
            sh_q <= sh_q + 1'b1;
          end
        end
        S_INV: if (gd_done) begin
          inv_q      <= gd_res;
          scal_q     <= gd_res;
          gm_start_q <= 1'b1;
          state_q    <= S_SCALE;
        end
        S_SCALE: if (gm_done) begin
          d_q     <= gm_o[NCOEF-1:0];
          cnt_q   <= '0;
          q_q     <= '0;
          state_q <= S_STEP;
        end
        S_STEP: begin
          if (cnt_q == KW'(WL)) begin
            if (is_div_q) begin
              scal_q     <= inv_q;
              gm_start_q <= 1'b1;
              state_q    <= S_QSCALE;
            end else begin
              res     <= {{NCOEF{{M{1'b0}}}}, w_q[NCOEF-1:0]};
              state_q <= S_DONE;
            end
          end else if (cnt_q < KW'(NCOEF) + sh_q) begin
            if (w_q[WL-1] != '0) begin
              scal_q     <= w_q[WL-1];
              gm_start_q <= 1'b1;
              state_q    <= S_STEPW;
            end else begin
              w_q   <= rotl(w_q);
              q_q   <= {q_q[NCOEF-2:0], {M{1'b0}}};
              cnt_q <= cnt_q + 1'b1;
            end
          end else begin
            w_q   <= rotl(w_q);
            cnt_q <= cnt_q + 1'b1;
          end
        end
        S_STEPW: if (gm_done) begin
          w_q     <= rotl({gm_o[NCOEF-1:0], w_q[WL-NCOEF-1:0]});
          q_q     <= {q_q[NCOEF-2:0], scal_q};
          cnt_q   <= cnt_q + 1'b1;
          state_q <= S_STEP;
        end
        S_QSCALE: if (gm_done) begin
          res     <= {w_q[NCOEF-1:0], gm_o[NCOEF-1:0]};
          state_q <= S_DONE;
        end
        S_DONE: begin
          done    <= 1'b1;
          state_q <= S_IDLE;
        end
        default: state_q <= S_IDLE;
      endcase
    end
  end

endmodule
