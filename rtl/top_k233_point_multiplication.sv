// top_k233_point_multiplication: pin-level wrapper of the K-233 scalar
// multiplier.
//
// The scalar and the base point are not brought in on separate 233-bit
// pins: one shared 233-bit input bus feeds three load-enabled registers
// (k, xP, yP), and one 233-bit output bus carries xQ or yQ, chosen by
// out_sel. This keeps the pin count near 2 x 233 and follows the structure
// of the design's top level (three enable registers on the input, a
// multiplexer per output bit); pin names and the sticky done flag are this
// design's own.
//
// Operation: pulse k_load, xp_load and yp_load with the matching value on
// in_data (one per cycle, any order), then pulse start. done goes low on
// start and high when the result is ready, and stays high until the next
// start. q_inf reports the point at infinity, error a doubling met inside
// the loop (see k233_point_multiplication). MULT chooses the interleaved
// (default) or the Montgomery field multiplier.
module top_k233_point_multiplication
  import gf233_pkg::*;
#(
  parameter mult_kind_e MULT = MULT_INTERLEAVED
) (
  input  logic clk,
  input  logic rst,
  input  gf_t  in_data,
  input  logic k_load,
  input  logic xp_load,
  input  logic yp_load,
  input  logic start,
  input  logic out_sel,
  output gf_t  out_data,
  output logic done,
  output logic q_inf,
  output logic error
);

  gf_t  k_r, xp_r, yp_r;
  gf_t  xq, yq;
  logic core_busy, core_done;

  always_ff @(posedge clk) begin
    if (rst) begin
      k_r  <= '0;
      xp_r <= '0;
      yp_r <= '0;
      done <= 1'b0;
    end else begin
      if (k_load)  k_r  <= in_data;
      if (xp_load) xp_r <= in_data;
      if (yp_load) yp_r <= in_data;
      if (start && !core_busy) done <= 1'b0;
      else if (core_done)      done <= 1'b1;
    end
  end

  k233_point_multiplication #(.MULT(MULT)) the_comp (
    .clk, .rst,
    .start (start),
    .k     (k_r),
    .xp    (xp_r),
    .yp    (yp_r),
    .xq    (xq),
    .yq    (yq),
    .q_inf (q_inf),
    .error (error),
    .busy  (core_busy),
    .done  (core_done)
  );

  assign out_data = out_sel ? yq : xq;

endmodule
