// tb_workload_k52: the evaluated operation, one scalar multiplication of
// the K-233 base point G, run through the pin-level top in both
// configurations: the interleaved multiplier and the Montgomery
// multiplier. The scalar is printed as 52 in the results; it is run both
// as the digit string 0x52 (as loaded into the 233-bit k register) and as
// decimal 52 (0x34). Each result is compared with the reference model and
// checked to lie on the curve; the cycle counts are checked against the
// schedule (2 cycles per digit plus the point additions) and printed with
// the time they take at 86.4 MHz, 115.9 MHz, 190 MHz and 221 MHz. The
// interleaved run of 0x52 is also held to the published 1884 cycles (1 %).
module tb_workload_k52;
  import tb_gf_ref_pkg::*;
  import gf233_pkg::*;

  logic clk = 0, rst = 1;
  fe_t  in_data;
  logic k_load = 0, xp_load = 0, yp_load = 0, start = 0, out_sel = 0;
  fe_t  out_data [2];
  logic done [2], q_inf [2], error [2];
  int   checks = 0, failures = 0;

  top_k233_point_multiplication #(.MULT(MULT_INTERLEAVED)) dut_i (
    .clk, .rst, .in_data, .k_load, .xp_load, .yp_load, .start, .out_sel,
    .out_data(out_data[0]), .done(done[0]), .q_inf(q_inf[0]), .error(error[0]));

  top_k233_point_multiplication #(.MULT(MULT_MONTGOMERY)) dut_m (
    .clk, .rst, .in_data, .k_load, .xp_load, .yp_load, .start, .out_sel,
    .out_data(out_data[1]), .done(done[1]), .q_inf(q_inf[1]), .error(error[1]));

  always #5 clk = ~clk;

  task automatic load(input fe_t v, input int which);
    @(negedge clk);
    in_data = v;
    k_load  = (which == 0);
    xp_load = (which == 1);
    yp_load = (which == 2);
    @(negedge clk);
    k_load = 0; xp_load = 0; yp_load = 0;
  endtask

  task automatic run(input fe_t kk);
    int  cyc [2];
    bit  seen [2];
    fe_t ex, ey, gx, gy;
    bit  inf;
    int  adds;
    real mhz [4] = '{86.4, 115.9, 190.0, 221.0};
    ref_tau_mul(kk, GX, GY, ex, ey, inf);
    adds = $countones(kk) - 1;
    load(kk, 0);
    load(GX, 1);
    load(GY, 2);
    @(negedge clk);
    start = 1;
    @(negedge clk);
    start = 0;
    seen = '{0, 0};
    cyc  = '{0, 0};
    for (int n = 1; n < 100000 && !(seen[0] && seen[1]); n++) begin
      for (int j = 0; j < 2; j++)
        if (done[j] && !seen[j]) begin seen[j] = 1; cyc[j] = n; end
      @(negedge clk);
    end
    for (int j = 0; j < 2; j++) begin
      out_sel = 0; #1 gx = out_data[j];
      out_sel = 1; #1 gy = out_data[j];
      checks++;
      if (!seen[j] || error[j] || q_inf[j] || inf || gx !== ex || gy !== ey || !on_curve(gx, gy)) begin
        failures++;
        $display("FAIL %s k=%h Q=(%h,%h) exp (%h,%h)", j ? "montgomery " : "interleaved", kk, gx, gy, ex, ey);
      end
      checks++;
      if (cyc[j] < 2 * 233 || cyc[j] > 2 * 233 + adds * (12 + 466 + 233 * (j + 1)) + 3) begin
        failures++;
        $display("FAIL cycles %0d", cyc[j]);
      end
      // published count for this operation with the interleaved multiplier:
      // 1884 cycles; this schedule should land within 1 % of it
      if (j == 0 && kk == 233'h52) begin
        checks++;
        if (cyc[j] < 1865 || cyc[j] > 1903) begin
          failures++;
          $display("FAIL interleaved k=0x52 took %0d cycles, expected about 1884", cyc[j]);
        end
      end
      $display("%s k=0x%0h: xQ=%h yQ=%h, %0d cycles = %.3f / %.3f / %.3f / %.3f us at 86.4 / 115.9 / 190 / 221 MHz",
               j ? "montgomery " : "interleaved", kk, gx, gy, cyc[j],
               cyc[j] / mhz[0], cyc[j] / mhz[1], cyc[j] / mhz[2], cyc[j] / mhz[3]);
    end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    in_data = '0;
    repeat (3) @(negedge clk);
    rst = 0;
    run(233'h52);
    run(233'd52);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
