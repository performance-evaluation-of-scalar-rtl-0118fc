// k233_point_multiplication: scalar multiplication Q = k*P on the Koblitz
// curve K-233 with the Frobenius map in place of point doubling.
//
// On a Koblitz curve the Frobenius map phi(x, y) = (x^2, y^2) acts as
// multiplication by the complex number tau. With k written in tau-adic
// form, k = sum k_i tau^i, Horner's rule gives
//   Q <- O;  for i = 232 downto 0:  Q <- phi(Q);  if k_i = 1: Q <- Q + P
// so the whole multiplication needs one point adder and two squarers (one
// for each coordinate of Q) and never doubles a point. The k input holds
// the digits k_i in {0, 1}, digit i in bit i; converting an integer scalar
// to tau-adic form is done outside this block. The point at infinity is a
// flag: phi(O) = O is skipped and O + P simply loads P. The digit loop,
// the flag handling and the cycle schedule are this design's own.
//
// Timing per digit: one cycle for phi(Q) (squarers, registered) and one
// cycle to examine the digit, plus one koblitz_point_adder run for every
// 1-digit met once Q is not O. If an addition ever meets Q = P (a
// doubling, outside the adder's range) the run stops with error set.
//
// Interface: start (pulse, accepted when idle) latches k, xp, yp. done
// pulses for one cycle; xq, yq, q_inf and error hold until the next start.
module k233_point_multiplication
  import gf233_pkg::*;
#(
  parameter mult_kind_e MULT = MULT_INTERLEAVED
) (
  input  logic clk,
  input  logic rst,
  input  logic start,
  input  gf_t  k,
  input  gf_t  xp,
  input  gf_t  yp,
  output gf_t  xq,
  output gf_t  yq,
  output logic q_inf,
  output logic error,
  output logic busy,
  output logic done
);

  typedef enum logic [1:0] {S_IDLE, S_FROB, S_DIGIT, S_ADD} state_e;

  state_e     state;
  gf_t        k_r, xp_r, yp_r;
  logic [7:0] idx;

  // Frobenius: two classic squarers
  gf_t xq_sq, yq_sq;
  classic_squarer u_sqx (.a(xq), .sq(xq_sq));
  classic_squarer u_sqy (.a(yq), .sq(yq_sq));

  // point adder: Q + P
  logic add_start, add_busy, add_done, add_inf, add_err;
  gf_t  add_x, add_y;

  koblitz_point_adder #(.MULT(MULT)) u_add (
    .clk, .rst,
    .start (add_start),
    .x1    (xq),
    .y1    (yq),
    .x2    (xp_r),
    .y2    (yp_r),
    .x3    (add_x),
    .y3    (add_y),
    .r_inf (add_inf),
    .error (add_err),
    .busy  (add_busy),
    .done  (add_done)
  );

  always_ff @(posedge clk) begin
    if (rst) begin
      state     <= S_IDLE;
      k_r       <= '0;
      xp_r      <= '0;
      yp_r      <= '0;
      xq        <= '0;
      yq        <= '0;
      q_inf     <= 1'b1;
      error     <= 1'b0;
      idx       <= '0;
      add_start <= 1'b0;
      done      <= 1'b0;
    end else begin
      done      <= 1'b0;
      add_start <= 1'b0;
      unique case (state)
        S_IDLE: if (start) begin
          k_r   <= k;
          xp_r  <= xp;
          yp_r  <= yp;
          xq    <= '0;
          yq    <= '0;
          q_inf <= 1'b1;
          error <= 1'b0;
          idx   <= 8'(M - 1);
          state <= S_FROB;
        end
        S_FROB: begin
          if (!q_inf) begin
            xq <= xq_sq;
            yq <= yq_sq;
          end
          state <= S_DIGIT;
        end
        S_DIGIT: begin
          if (k_r[idx] && !q_inf) begin
            add_start <= 1'b1;
            state     <= S_ADD;
          end else begin
            if (k_r[idx]) begin
              xq    <= xp_r;
              yq    <= yp_r;
              q_inf <= 1'b0;
            end
            if (idx == 8'd0) begin
              done  <= 1'b1;
              state <= S_IDLE;
            end else begin
              idx   <= idx - 8'd1;
              state <= S_FROB;
            end
          end
        end
        S_ADD: if (add_done) begin
          xq    <= add_x;
          yq    <= add_y;
          q_inf <= add_inf;
          if (add_err || idx == 8'd0) begin
            error <= add_err;
            done  <= 1'b1;
            state <= S_IDLE;
          end else begin
            idx   <= idx - 8'd1;
            state <= S_FROB;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  assign busy = (state != S_IDLE);

  a_add_idle : assert property (@(posedge clk) disable iff (rst)
    add_start |-> !add_busy);

endmodule
