// koblitz_point_adder: affine point addition on the Koblitz curve K-233,
// (x3, y3) = (x1, y1) + (x2, y2) on y^2 + xy = x^3 + a x^2 + 1.
//
// The data path follows the register-after-every-operation structure of
// the design:
//   1. sx = x1 + x2, sy = y1 + y2                      (two registers)
//   2. lambda = sy / sx              (gf_divider)      (lambda register)
//   3. lambda^2                      (classic_squarer) (squaring register)
//   4. lambda + sx + lambda^2                          (register)
//   5. x3 = previous + a                               (x3 register)
//   6. x1 + x3                                         (register)
//   7. lambda * (x1 + x3)            (multiplier)      (product register)
//   8. y3 = product + x3 + y1                          (y3 register)
// MULT selects the field multiplier. With MULT_MONTGOMERY the multiplier
// returns lambda*(x1+x3)*x^-233, so a second pass multiplies that by
// x^466 mod f to recover the plain product; this correction step is this
// design's own. The constant a defaults to 0 (K-233).
// Equal x coordinates cannot go through the divider: when y1 != y2 the sum
// is the point at infinity (r_inf), when y1 == y2 it would be a doubling,
// which this unit does not do, and error is raised instead.
//
// Interface: start (pulse, accepted when idle) latches the two points.
// done pulses for one cycle; x3, y3, r_inf and error then hold until the
// next start. Latency: 8 cycles plus the divider (at most 466) plus one
// (interleaved) or two (Montgomery) multiplier passes of 233 cycles each.
module koblitz_point_adder
  import gf233_pkg::*;
#(
  parameter mult_kind_e MULT   = MULT_INTERLEAVED,
  parameter gf_t        A_COEF = '0
) (
  input  logic clk,
  input  logic rst,
  input  logic start,
  input  gf_t  x1,
  input  gf_t  y1,
  input  gf_t  x2,
  input  gf_t  y2,
  output gf_t  x3,
  output gf_t  y3,
  output logic r_inf,
  output logic error,
  output logic busy,
  output logic done
);

  typedef enum logic [3:0] {
    S_IDLE, S_CHECK, S_DIV, S_SQ, S_XSUM, S_X3, S_X13,
    S_MUL, S_MUL2, S_Y3
  } state_e;

  state_e state;

  gf_t x1_r, y1_r, sx, sy, lam, lam2, xsum, x13, prod;

  // divider
  logic div_start, div_busy, div_done;
  gf_t  div_q;

  gf_divider u_div (
    .clk, .rst,
    .start (div_start),
    .num   (sy),
    .den   (sx),
    .quo   (div_q),
    .busy  (div_busy),
    .done  (div_done)
  );

  // squarer
  gf_t lam_sq;
  classic_squarer u_sq (.a(lam), .sq(lam_sq));

  // multiplier
  logic mul_start, mul_busy, mul_done, second_pass;
  gf_t  mul_c, mul_d, mul_e;

  always_comb begin
    mul_c = second_pass ? prod    : lam;
    mul_d = second_pass ? MONT_R2 : x13;
  end

  generate
    if (MULT == MULT_MONTGOMERY) begin : g_mont
      montgomery_multiplier u_mul (
        .clk, .rst, .start(mul_start), .c(mul_c), .d(mul_d),
        .e(mul_e), .busy(mul_busy), .done(mul_done)
      );
    end else begin : g_intl
      interleaved_multiplier u_mul (
        .clk, .rst, .start(mul_start), .c(mul_c), .d(mul_d),
        .e(mul_e), .busy(mul_busy), .done(mul_done)
      );
    end
  endgenerate

  always_ff @(posedge clk) begin
    if (rst) begin
      state       <= S_IDLE;
      x1_r        <= '0;
      y1_r        <= '0;
      sx          <= '0;
      sy          <= '0;
      lam         <= '0;
      lam2        <= '0;
      xsum        <= '0;
      x13         <= '0;
      prod        <= '0;
      x3          <= '0;
      y3          <= '0;
      r_inf       <= 1'b0;
      error       <= 1'b0;
      done        <= 1'b0;
      div_start   <= 1'b0;
      mul_start   <= 1'b0;
      second_pass <= 1'b0;
    end else begin
      done      <= 1'b0;
      div_start <= 1'b0;
      mul_start <= 1'b0;
      unique case (state)
        S_IDLE: if (start) begin
          x1_r  <= x1;
          y1_r  <= y1;
          sx    <= x1 ^ x2;
          sy    <= y1 ^ y2;
          r_inf <= 1'b0;
          error <= 1'b0;
          state <= S_CHECK;
        end
        S_CHECK: begin
          if (sx == '0) begin
            r_inf <= (sy != '0);
            error <= (sy == '0);
            done  <= 1'b1;
            state <= S_IDLE;
          end else begin
            div_start <= 1'b1;
            state     <= S_DIV;
          end
        end
        S_DIV: if (div_done) begin
          lam   <= div_q;
          state <= S_SQ;
        end
        S_SQ: begin
          lam2  <= lam_sq;
          state <= S_XSUM;
        end
        S_XSUM: begin
          xsum  <= lam ^ sx ^ lam2;
          state <= S_X3;
        end
        S_X3: begin
          x3    <= xsum ^ A_COEF;
          state <= S_X13;
        end
        S_X13: begin
          x13         <= x1_r ^ x3;
          second_pass <= 1'b0;
          mul_start   <= 1'b1;
          state       <= S_MUL;
        end
        S_MUL: if (mul_done) begin
          prod <= mul_e;
          if (MULT == MULT_MONTGOMERY) begin
            second_pass <= 1'b1;
            mul_start   <= 1'b1;
            state       <= S_MUL2;
          end else begin
            state <= S_Y3;
          end
        end
        S_MUL2: if (mul_done) begin
          prod  <= mul_e;
          state <= S_Y3;
        end
        S_Y3: begin
          y3    <= prod ^ x3 ^ y1_r;
          done  <= 1'b1;
          state <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  assign busy = (state != S_IDLE);

  // The divider is never started with a zero denominator.
  a_div_nonzero : assert property (@(posedge clk) disable iff (rst)
    div_start |-> sx != '0);

  // Neither sub-unit is started while it is still working.
  a_div_idle : assert property (@(posedge clk) disable iff (rst)
    div_start |-> !div_busy);
  a_mul_idle : assert property (@(posedge clk) disable iff (rst)
    mul_start |-> !mul_busy);

endmodule
