// montgomery_multiplier: bit-serial Montgomery multiplier in GF(2^233),
// e = c * d * x^-233 mod f.
//
// C sits in a right-shift register, D in a plain register and the partial
// result E in a third. Each cycle uses the lowest bit c0 of C:
//   T = E + c0 * D,   E <- (T + t0 * f) / x
// where t0 is the lowest bit of T, so that adding f makes T divisible by x.
// After 233 steps E = C * D * x^-233 mod f, the Montgomery product with
// M(x) = x^233. The three registers, the right-shifting C and the per-bit
// AND/XOR slice follow the data path of the design; choosing M(x) = x^233
// (one bit of C per step) is this design's reading of it.
//
// Interface: start (pulse, accepted when idle) latches c and d. Exactly
// M = 233 cycles later done pulses for one cycle and e holds the result
// until the next start. busy is high while running.
module montgomery_multiplier
  import gf233_pkg::*;
(
  input  logic clk,
  input  logic rst,
  input  logic start,
  input  gf_t  c,
  input  gf_t  d,
  output gf_t  e,
  output logic busy,
  output logic done
);

  gf_t        c_sh;
  gf_t        d_r;
  logic [7:0] cnt;
  gf_t        t;

  always_comb t = e ^ (c_sh[0] ? d_r : '0);

  always_ff @(posedge clk) begin
    if (rst) begin
      c_sh <= '0;
      d_r  <= '0;
      e    <= '0;
      cnt  <= '0;
      busy <= 1'b0;
      done <= 1'b0;
    end else begin
      done <= 1'b0;
      if (!busy) begin
        if (start) begin
          c_sh <= c;
          d_r  <= d;
          e    <= '0;
          cnt  <= '0;
          busy <= 1'b1;
        end
      end else begin
        e    <= gf_divx(t);
        c_sh <= c_sh >> 1;
        cnt  <= cnt + 8'd1;
        if (cnt == 8'(M - 1)) begin
          busy <= 1'b0;
          done <= 1'b1;
        end
      end
    end
  end

endmodule
