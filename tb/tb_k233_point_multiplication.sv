// tb_k233_point_multiplication: tau-adic scalar multiplication in both
// multiplier configurations. Checks k = 0x52 on the K-233 base point
// against a value worked out off-line, several random digit strings
// against the reference Horner model, k = 0 (point at infinity) and
// k = 1 (Q = P, no addition), and that every result lies on the curve.
// The cycle count of each run is checked against the schedule: 2 cycles
// per digit plus the additions, each bounded by the point adder latency.
module tb_k233_point_multiplication;
  import tb_gf_ref_pkg::*;
  import gf233_pkg::*;

  logic clk = 0, rst = 1, start = 0;
  fe_t  k, xp, yp;
  fe_t  xq [2], yq [2];
  logic q_inf [2], error [2], busy [2], done [2];
  int   checks = 0, failures = 0;

  k233_point_multiplication #(.MULT(MULT_INTERLEAVED)) dut_i (
    .clk, .rst, .start, .k, .xp, .yp,
    .xq(xq[0]), .yq(yq[0]), .q_inf(q_inf[0]), .error(error[0]),
    .busy(busy[0]), .done(done[0]));

  k233_point_multiplication #(.MULT(MULT_MONTGOMERY)) dut_m (
    .clk, .rst, .start, .k, .xp, .yp,
    .xq(xq[1]), .yq(yq[1]), .q_inf(q_inf[1]), .error(error[1]),
    .busy(busy[1]), .done(done[1]));

  always #5 clk = ~clk;

  task automatic run(input fe_t kk, input fe_t px, input fe_t py,
                     input bit exp_inf, input fe_t ex, input fe_t ey);
    int cyc [2];
    bit seen [2];
    int adds;
    // additions = ones of k after the first one
    adds = $countones(kk) > 0 ? $countones(kk) - 1 : 0;
    @(negedge clk);
    k = kk; xp = px; yp = py; start = 1;
    @(negedge clk);
    start = 0;
    seen = '{0, 0};
    cyc  = '{0, 0};
    for (int n = 1; n < 2000000 && !(seen[0] && seen[1]); n++) begin
      for (int j = 0; j < 2; j++)
        if (done[j] && !seen[j]) begin seen[j] = 1; cyc[j] = n; end
      @(negedge clk);
    end
    for (int j = 0; j < 2; j++) begin
      checks++;
      if (!seen[j] || error[j]) begin
        failures++;
        $display("FAIL cfg %0d k=%h not done or error", j, kk);
        continue;
      end
      checks++;
      if (exp_inf) begin
        if (!q_inf[j]) begin failures++; $display("FAIL cfg %0d expected O", j); end
      end else if (q_inf[j] || xq[j] !== ex || yq[j] !== ey || !on_curve(xq[j], yq[j])) begin
        failures++;
        $display("FAIL cfg %0d k=%h Q=(%h,%h) exp (%h,%h)", j, kk, xq[j], yq[j], ex, ey);
      end
      checks++;
      if (cyc[j] < 2 * 233 || cyc[j] > 2 * 233 + adds * (12 + 466 + 233 * (j + 1)) + 3) begin
        failures++;
        $display("FAIL cfg %0d cycles %0d for %0d additions", j, cyc[j], adds);
      end
      $display("cfg %0d k=%h: %0d cycles, %0d additions", j, kk, cyc[j], adds);
    end
  endtask

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    fe_t ex, ey, kk;
    bit  inf;
    k = '0; xp = '0; yp = '0;
    repeat (3) @(negedge clk);
    rst = 0;

    run(233'h52, GX, GY, 0, K52_X, K52_Y);
    run('0, GX, GY, 1, '0, '0);
    run(233'(1), GX, GY, 0, GX, GY);
    // a single top digit: Q = phi^232(P), no addition
    ref_tau_mul(233'(1) << 232, GX, GY, ex, ey, inf);
    run(233'(1) << 232, GX, GY, inf, ex, ey);
    for (int i = 0; i < 4; i++) begin
      kk = 233'($urandom & 32'h0000_ffff) | (233'($urandom & 32'hff) << 200);
      ref_tau_mul(kk, GX, GY, ex, ey, inf);
      run(kk, GX, GY, inf, ex, ey);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
