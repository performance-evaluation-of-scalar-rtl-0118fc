// tb_koblitz_point_adder: runs the affine point adder in both multiplier
// configurations (interleaved and Montgomery) side by side. Sums of
// curve points are compared with a precomputed value (G + phi(G)) and with
// the reference model; each result is also checked to lie on the curve.
// The special cases are covered too: P + (-P) gives the point at infinity,
// P + P raises error. Latency is checked against its bound.
module tb_koblitz_point_adder;
  import tb_gf_ref_pkg::*;
  import gf233_pkg::*;

  logic clk = 0, rst = 1, start = 0;
  fe_t  x1, y1, x2, y2;
  fe_t  x3 [2], y3 [2];
  logic r_inf [2], error [2], busy [2], done [2];
  int   checks = 0, failures = 0;

  koblitz_point_adder #(.MULT(MULT_INTERLEAVED)) dut_i (
    .clk, .rst, .start, .x1, .y1, .x2, .y2,
    .x3(x3[0]), .y3(y3[0]), .r_inf(r_inf[0]), .error(error[0]),
    .busy(busy[0]), .done(done[0]));

  koblitz_point_adder #(.MULT(MULT_MONTGOMERY)) dut_m (
    .clk, .rst, .start, .x1, .y1, .x2, .y2,
    .x3(x3[1]), .y3(y3[1]), .r_inf(r_inf[1]), .error(error[1]),
    .busy(busy[1]), .done(done[1]));

  always #5 clk = ~clk;

  // exp_kind: 0 normal sum, 1 infinity, 2 error
  task automatic run(input fe_t ax, input fe_t ay, input fe_t bx, input fe_t by,
                     input int exp_kind, input fe_t ex, input fe_t ey);
    int  cyc [2];
    bit  seen [2];
    @(negedge clk);
    x1 = ax; y1 = ay; x2 = bx; y2 = by; start = 1;
    @(negedge clk);
    start = 0;
    seen = '{0, 0};
    cyc  = '{0, 0};
    for (int n = 1; n < 3000 && !(seen[0] && seen[1]); n++) begin
      for (int j = 0; j < 2; j++)
        if (done[j] && !seen[j]) begin seen[j] = 1; cyc[j] = n; end
      @(negedge clk);
    end
    for (int j = 0; j < 2; j++) begin
      checks++;
      if (!seen[j]) begin
        failures++;
        $display("FAIL cfg %0d never done", j);
        continue;
      end
      case (exp_kind)
        0: begin
          checks += 2;
          if (r_inf[j] || error[j] || x3[j] !== ex || y3[j] !== ey) begin
            failures++;
            $display("FAIL cfg %0d sum (%h,%h) exp (%h,%h)", j, x3[j], y3[j], ex, ey);
          end
          if (!on_curve(x3[j], y3[j])) begin
            failures++;
            $display("FAIL cfg %0d result off the curve", j);
          end
          // 8 register steps + divider (<= 466) + 233 per multiplier pass
          if (cyc[j] > 8 + 466 + 233 * (j + 1) + 4) begin
            failures++;
            $display("FAIL cfg %0d latency %0d", j, cyc[j]);
          end
        end
        1: if (!r_inf[j] || error[j]) begin
          failures++;
          $display("FAIL cfg %0d expected infinity", j);
        end
        default: if (!error[j]) begin
          failures++;
          $display("FAIL cfg %0d expected error flag", j);
        end
      endcase
    end
  endtask

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    fe_t px, py, qx, qy, rx, ry;
    x1 = '0; y1 = '0; x2 = '0; y2 = '0;
    repeat (3) @(negedge clk);
    rst = 0;

    checks++;
    if (!on_curve(GX, GY)) begin failures++; $display("FAIL base point"); end

    // phi(G) + G against the off-line value
    px = ref_sq(GX); py = ref_sq(GY);
    run(px, py, GX, GY, 0, PG_X, PG_Y);

    // a walk of points: P <- phi(P) + G, each sum against the model
    for (int i = 0; i < 6; i++) begin
      qx = ref_sq(px); qy = ref_sq(py);
      ref_add(qx, qy, GX, GY, rx, ry);
      run(qx, qy, GX, GY, 0, rx, ry);
      // the same sum with the operands swapped
      run(GX, GY, qx, qy, 0, rx, ry);
      px = rx; py = ry;
    end

    // P + (-P) = O, with -P = (x, x + y)
    run(GX, GY, GX, GX ^ GY, 1, '0, '0);
    // P + P: doubling, flagged
    run(GX, GY, GX, GY, 2, '0, '0);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
