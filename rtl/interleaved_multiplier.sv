// interleaved_multiplier: bit-serial shift-and-add multiplier in GF(2^233),
// e = c * d mod f.
//
// The operand C is scanned from its least significant bit. A running
// multiple D_i = d * x^i mod f is kept in a register; every cycle the
// accumulator takes E += c_i * D_i and the multiple advances to
// D_{i+1} = D_i * x mod f (a one-bit shift plus a conditional XOR with
// x^74 + 1). This is the chain of AND gates, XOR gates and "x mod f"
// stages of the interleaved multiplier, folded onto one stage that is
// reused for 233 cycles; folding it in time is this design's choice.
//
// Interface: start (pulse, accepted when idle) latches c and d. Exactly
// M = 233 cycles later done pulses for one cycle and e holds the product
// until the next start. busy is high while the multiplication runs.
module interleaved_multiplier
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

  gf_t         c_sh;   // remaining bits of C, shifted right
  gf_t         d_i;    // d * x^i mod f
  logic [7:0]  cnt;

  always_ff @(posedge clk) begin
    if (rst) begin
      c_sh <= '0;
      d_i  <= '0;
      e    <= '0;
      cnt  <= '0;
      busy <= 1'b0;
      done <= 1'b0;
    end else begin
      done <= 1'b0;
      if (!busy) begin
        if (start) begin
          c_sh <= c;
          d_i  <= d;
          e    <= '0;
          cnt  <= '0;
          busy <= 1'b1;
        end
      end else begin
        if (c_sh[0]) e <= e ^ d_i;
        d_i  <= gf_mulx(d_i);
        c_sh <= c_sh >> 1;
        cnt  <= cnt + 8'd1;
        if (cnt == 8'(M - 1)) begin
          busy <= 1'b0;
          done <= 1'b1;
        end
      end
    end
  end

  a_no_start_when_busy_done : assert property (@(posedge clk) disable iff (rst)
    done |-> !busy);

endmodule
