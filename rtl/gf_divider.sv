// gf_divider: sequential divider in GF(2^233), quo = num / den mod f.
//
// Binary extended-Euclid division, one step per clock. The unit keeps
// A (starts at den), B (starts at f), U (starts at num) and V (starts at 0)
// with the invariants U = q*A and V = q*B (mod f), q being the quotient.
// Each step does one of:
//   A even            : A <- A/x,          U <- U/x mod f
//   B even            : B <- B/x,          V <- V/x mod f
//   both odd, dA >= dB: A <- (A+B)/x,      U <- (U+V)/x mod f
//   both odd, dA <  dB: B <- (A+B)/x,      V <- (U+V)/x mod f
// dA and dB are upper bounds on the degrees of A and B; each step lowers
// one of them by one, so A or B reaches 1 after at most 2m-1 = 465 steps.
// When A = 1 the quotient is U, when B = 1 it is V. The design names only
// a binary division algorithm with Start_div / Div_done; the step rules and
// the degree-bound counters are this design's own.
//
// Interface: start (pulse, accepted when idle) latches num and den; den
// must be nonzero. done pulses for one cycle with quo valid, quo holds
// until the next start. Latency depends on the operands: at most 466
// cycles from start to done.
module gf_divider
  import gf233_pkg::*;
(
  input  logic clk,
  input  logic rst,
  input  logic start,
  input  gf_t  num,
  input  gf_t  den,
  output gf_t  quo,
  output logic busy,
  output logic done
);

  logic [M:0] a, b;
  gf_t        u, v;
  logic [8:0] da, db;
  logic [9:0] steps;

  localparam logic [M:0] ONE = (M+1)'(1);

  always_ff @(posedge clk) begin
    if (rst) begin
      a     <= '0;
      b     <= '0;
      u     <= '0;
      v     <= '0;
      da    <= '0;
      db    <= '0;
      steps <= '0;
      quo   <= '0;
      busy  <= 1'b0;
      done  <= 1'b0;
    end else begin
      done <= 1'b0;
      if (!busy) begin
        if (start) begin
          a     <= {1'b0, den};
          b     <= {1'b1, F_LOW};
          u     <= num;
          v     <= '0;
          da    <= 9'(M - 1);
          db    <= 9'(M);
          steps <= '0;
          busy  <= 1'b1;
        end
      end else if (a == ONE) begin
        quo  <= u;
        busy <= 1'b0;
        done <= 1'b1;
      end else if (b == ONE) begin
        quo  <= v;
        busy <= 1'b0;
        done <= 1'b1;
      end else begin
        steps <= steps + 10'd1;
        if (!a[0]) begin
          a  <= a >> 1;
          u  <= gf_divx(u);
          da <= da - 9'd1;
        end else if (!b[0]) begin
          b  <= b >> 1;
          v  <= gf_divx(v);
          db <= db - 9'd1;
        end else if (da >= db) begin
          a  <= (a ^ b) >> 1;
          u  <= gf_divx(u ^ v);
          da <= da - 9'd1;
        end else begin
          b  <= (a ^ b) >> 1;
          v  <= gf_divx(u ^ v);
          db <= db - 9'd1;
        end
      end
    end
  end

  // The degree bounds guarantee termination within 2m-1 steps.
  a_step_bound : assert property (@(posedge clk) disable iff (rst)
    busy |-> steps <= 10'(2*M - 1));

endmodule
